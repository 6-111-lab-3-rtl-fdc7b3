// voice_pkg: types and constants shared by the voice recorder.
//
// The recorder works on 8-bit two's-complement audio samples (-128..+127), the
// format the audio wrapper hands over. The AC97 link carries 256-bit frames:
// a 16-bit tag slot followed by twelve 20-bit slots. Only the tag, the two
// command slots and the two PCM slots (left, right) are used; the codec
// converters are 18 bits wide and take the upper 18 bits of a 20-bit slot.
// The frame layout and register addresses follow the AC'97 standard; the
// addresses 02h, 04h, 0Eh, 18h and 1Ch are the ones printed on the codec
// block diagram, 1Ah (record select) is the standard address for the
// record-select multiplexer.
package voice_pkg;

  typedef logic signed [7:0] sample_t;   // one mono audio sample

  // AC97 frame geometry (bit positions counted from the first tag bit)
  localparam int unsigned TAG_BITS   = 16;
  localparam int unsigned SLOT_BITS  = 20;
  localparam int unsigned PCM_BITS   = 18;
  localparam int unsigned SLOT1_POS  = TAG_BITS;                  // 16: command address
  localparam int unsigned SLOT2_POS  = TAG_BITS + SLOT_BITS;      // 36: command data
  localparam int unsigned SLOT3_POS  = TAG_BITS + 2 * SLOT_BITS;  // 56: PCM left
  localparam int unsigned SLOT4_POS  = TAG_BITS + 3 * SLOT_BITS;  // 76: PCM right
  localparam int unsigned USED_BITS  = TAG_BITS + 4 * SLOT_BITS;  // 96 bits carry data

  // Codec register addresses (7-bit register index)
  localparam logic [6:0] REG_MASTER_VOL   = 7'h02;
  localparam logic [6:0] REG_HEADPHONE_VOL= 7'h04;
  localparam logic [6:0] REG_MIC_VOL      = 7'h0E;
  localparam logic [6:0] REG_PCM_OUT_VOL  = 7'h18;
  localparam logic [6:0] REG_RECORD_SEL   = 7'h1A;
  localparam logic [6:0] REG_RECORD_GAIN  = 7'h1C;

  // One codec register write as carried in slots 1 and 2.
  typedef struct packed {
    logic [6:0]  addr;
    logic [15:0] data;
  } ac97_cmd_t;

endpackage
