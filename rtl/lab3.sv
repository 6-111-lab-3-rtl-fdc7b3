// lab3: voice recorder top level for the labkit FPGA.
//
// Wires the AC97 codec interface (audio), the recorder, a 64K x 8 block-RAM
// sample store and a debouncer for the ENTER pushbutton:
//
//   AC97 pins <-> audio --ready, 8-bit mic sample--> recorder <-> bram_64kx8
//                       <--8-bit headphone sample---
//
// Controls: ENTER (button_enter, active low) is push-to-record: while it is
// held the recorder records, when released it plays back. switch[0] turns the
// playback interpolator on, switch[1] selects instant-replay recording and
// switch[2] the tone/loop-back test mode. Switches are used as levels; they
// change slowly compared with the clock and only steer which output value is
// chosen, so they are not debounced.
//
// All logic runs on clock_27mhz except the AC-link controller inside
// 'audio', which runs on the codec's 12.288 MHz bit clock. 'reset' is active
// high and synchronous to clock_27mhz; it also holds the codec in reset.
//
// Debug: three 16-bit logic-analyzer pods carry the signals worth watching.
// Pod 1 is clocked by 'ready' and shows the microphone and headphone samples;
// capturing on the falling edge of ready shows the playback waveform sample
// by sample, straight segments of eight points when interpolating. Pods 2
// and 3 show the memory port (address, write enable, read data) and the mode
// on the system clock.
//
// Parameters: ADDR_W sets the sample memory depth (2^ADDR_W, 64K by
// default), DEBOUNCE_DELAY the number of clocks the button must be steady
// (10 ms at 27 MHz). The block structure, the ENTER button's role, the switch
// for the interpolator and the 64K x 8 memory follow the specification; the
// switch assignments, active-low button and reset port are this design's.
module lab3
  import voice_pkg::*;
#(
  parameter int unsigned ADDR_W         = 16,
  parameter int unsigned DEBOUNCE_DELAY = 270000
) (
  input  logic       clock_27mhz,
  input  logic       reset,
  input  logic       button_enter,   // active low: pressed = record
  input  logic [2:0] switch,         // [0] interpolate, [1] instant replay, [2] test mode
  // AC97 codec
  output logic       audio_reset_b,
  output logic       ac97_sdata_out,
  input  logic       ac97_sdata_in,
  output logic       ac97_synch,
  input  logic       ac97_bit_clk,
  // logic-analyzer pods
  output logic        analyzer1_clock,   // ready
  output logic [15:0] analyzer1_data,    // {from_ac97_data, to_ac97_data}
  output logic        analyzer2_clock,   // clock_27mhz
  output logic [15:0] analyzer2_data,    // memory address
  output logic        analyzer3_clock,   // clock_27mhz
  output logic [15:0] analyzer3_data     // {we, playback, 6'b0, memory read data}
);

  logic              playback;
  logic              ready;
  sample_t           from_ac97_data, to_ac97_data;
  logic [ADDR_W-1:0] mem_addr;
  logic              mem_we;
  sample_t           mem_din, mem_dout;

  debounce #(.DELAY(DEBOUNCE_DELAY)) u_enter (
    .clk   (clock_27mhz),
    .reset (reset),
    .noisy (button_enter),
    .clean (playback)           // released (1) = playback, pressed (0) = record
  );

  audio u_audio (
    .clock_27mhz    (clock_27mhz),
    .reset          (reset),
    .to_ac97_data   (to_ac97_data),
    .from_ac97_data (from_ac97_data),
    .ready          (ready),
    .audio_reset_b  (audio_reset_b),
    .ac97_sdata_out (ac97_sdata_out),
    .ac97_sdata_in  (ac97_sdata_in),
    .ac97_synch     (ac97_synch),
    .ac97_bit_clk   (ac97_bit_clk)
  );

  recorder #(.ADDR_W(ADDR_W)) u_recorder (
    .clock_27mhz    (clock_27mhz),
    .reset          (reset),
    .playback       (playback),
    .ready          (ready),
    .from_ac97_data (from_ac97_data),
    .to_ac97_data   (to_ac97_data),
    .filter         (switch[0]),
    .replay         (switch[1]),
    .test_mode      (switch[2]),
    .mem_addr       (mem_addr),
    .mem_we         (mem_we),
    .mem_din        (mem_din),
    .mem_dout       (mem_dout)
  );

  bram_64kx8 #(.ADDR_W(ADDR_W), .DATA_W(8)) u_mem (
    .clk  (clock_27mhz),
    .addr (mem_addr),
    .we   (mem_we),
    .din  (mem_din),
    .dout (mem_dout)
  );

  assign analyzer1_clock = ready;
  assign analyzer1_data  = {from_ac97_data, to_ac97_data};
  assign analyzer2_clock = clock_27mhz;
  assign analyzer2_data  = 16'(mem_addr);
  assign analyzer3_clock = clock_27mhz;
  assign analyzer3_data  = {mem_we, playback, 6'd0, mem_dout};

endmodule
