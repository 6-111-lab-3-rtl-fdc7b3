// ac97: AC-link serial controller for the AC97 audio codec.
//
// The codec supplies BIT_CLK at 12.288 MHz = 256 x 48 kHz. Every 256 bit
// clocks the controller sends one output frame on SDATA_OUT and receives one
// input frame on SDATA_IN, so one stereo sample moves in each direction at
// 48 kHz. A frame is a 16-bit tag followed by twelve 20-bit slots, MSB first:
//   tag    bit 15 frame valid, bits 14..11 slots 1..4 valid
//   slot 1 command address: bit 19 = 0 (write), bits 18..12 register index
//   slot 2 command data: bits 19..4
//   slot 3 / slot 4  left / right PCM, 18-bit sample in bits 19..2
// Slots 5..12 are sent as zeros and ignored on input.
//
// Timing: SYNC and SDATA_OUT change on the rising edge of BIT_CLK; SYNC is high
// during the 16 tag bits. The codec samples on the falling edge. The codec
// answers one bit later: it drives input bit n on the rising edge after it has
// sampled output bit n, and the controller samples SDATA_IN on the falling
// edge, so input bit n is taken in the bit period of output bit n+1.
// Command and PCM output fields are captured at the start of each frame.
// When the two input PCM slots of a frame are complete the controller updates
// left_in_data/right_in_data and raises 'ready' for READY_BITS bit clocks;
// the outputs then hold until the same point of the next frame. Whoever
// drives the output fields has from the rise of 'ready' to the next frame
// start (about 160 bit clocks) to present the next sample.
//
// The frame size, the 12.288 MHz rate, the 18-bit PCM width and the pin names
// come from the specification and the codec block diagram; the slot layout is
// the AC'97 standard's, and the ready window and its position are this
// design's choices.
module ac97
  import voice_pkg::*;
#(
  parameter int unsigned READY_BITS = 32   // length of the ready pulse in bit clocks
) (
  input  logic                bit_clk,
  input  logic                reset,          // active high, synchronous to bit_clk release
  // AC-link pins
  output logic                ac97_sdata_out,
  input  logic                ac97_sdata_in,
  output logic                ac97_synch,
  // frame contents
  input  ac97_cmd_t           command,
  input  logic                command_valid,
  input  logic [PCM_BITS-1:0] left_out_data,
  input  logic                left_out_valid,
  input  logic [PCM_BITS-1:0] right_out_data,
  input  logic                right_out_valid,
  output logic [PCM_BITS-1:0] left_in_data,
  output logic [PCM_BITS-1:0] right_in_data,
  output logic                ready
);

  localparam int unsigned READY_POS = USED_BITS + 1;   // first bit after the PCM slots are in

  logic [7:0]           bit_count;     // index of the output bit now on SDATA_OUT
  logic [7:0]           next_count;
  logic [USED_BITS-1:0] out_shift;
  logic [USED_BITS-1:0] out_frame;

  // input side (falling edge)
  logic [2*SLOT_BITS-1:0] in_shift;    // slots 3 and 4 as received

  assign next_count = bit_count + 8'd1;

  always_comb begin
    out_frame = '0;
    // tag
    out_frame[USED_BITS-1]      = 1'b1;             // frame valid
    out_frame[USED_BITS-2]      = command_valid;    // slot 1
    out_frame[USED_BITS-3]      = command_valid;    // slot 2
    out_frame[USED_BITS-4]      = left_out_valid;   // slot 3
    out_frame[USED_BITS-5]      = right_out_valid;  // slot 4
    // slot 1: write flag 0, register index, 12 reserved zeros
    out_frame[USED_BITS-SLOT1_POS-1 -: SLOT_BITS] = {1'b0, command.addr, 12'd0};
    // slot 2: 16 data bits, 4 reserved zeros
    out_frame[USED_BITS-SLOT2_POS-1 -: SLOT_BITS] = {command.data, 4'd0};
    // slots 3, 4: 18-bit PCM left-justified in 20 bits
    out_frame[USED_BITS-SLOT3_POS-1 -: SLOT_BITS] = {left_out_data, 2'd0};
    out_frame[USED_BITS-SLOT4_POS-1 -: SLOT_BITS] = {right_out_data, 2'd0};
  end

  // Output frame generation
  always_ff @(posedge bit_clk) begin
    if (reset) begin
      bit_count      <= 8'd255;
      ac97_synch     <= 1'b0;
      ac97_sdata_out <= 1'b0;
      out_shift      <= '0;
    end else begin
      bit_count  <= next_count;
      ac97_synch <= (next_count < 8'(TAG_BITS));
      if (next_count == 8'd0) begin
        ac97_sdata_out <= out_frame[USED_BITS-1];
        out_shift      <= {out_frame[USED_BITS-2:0], 1'b0};
      end else begin
        ac97_sdata_out <= out_shift[USED_BITS-1];
        out_shift      <= {out_shift[USED_BITS-2:0], 1'b0};
      end
    end
  end

  // Input capture: during output bit bit_count the codec presents input bit
  // bit_count-1; slots 3 and 4 are input bits 56..95.
  always_ff @(negedge bit_clk) begin
    if (reset) begin
      in_shift <= '0;
    end else if (bit_count >= 8'(SLOT3_POS + 1) && bit_count <= 8'(USED_BITS)) begin
      in_shift <= {in_shift[2*SLOT_BITS-2:0], ac97_sdata_in};
    end
  end

  // Publish the received samples and the ready window
  always_ff @(posedge bit_clk) begin
    if (reset) begin
      left_in_data  <= '0;
      right_in_data <= '0;
      ready         <= 1'b0;
    end else begin
      if (next_count == 8'(READY_POS)) begin
        left_in_data  <= in_shift[2*SLOT_BITS-1 -: PCM_BITS];
        right_in_data <= in_shift[SLOT_BITS-1 -: PCM_BITS];
        ready         <= 1'b1;
      end else if (next_count == 8'(READY_POS + READY_BITS)) begin
        ready         <= 1'b0;
      end
    end
  end

endmodule
