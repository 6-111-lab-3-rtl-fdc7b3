// audio: mono 8-bit sample interface to the AC97 codec.
//
// Wraps the AC-link controller (ac97) and its register-write sequencer
// (ac97commands) and presents the codec to the rest of the design, in the
// system clock domain, as three signals: 'ready' rises once per 48 kHz frame
// when a new microphone sample is on from_ac97_data, and to_ac97_data is the
// sample to send to the headphones.
//
// Clocking: the controller runs on the codec's BIT_CLK (12.288 MHz); the user
// side runs on the 27 MHz system clock. 'ready' crosses through two
// flip-flops; the 8-bit input sample (the upper 8 of the 18 left-channel bits)
// is stable for a whole frame around the ready rise and is re-registered on
// the system clock. The outgoing sample is placed in the upper 8 bits of
// both 18-bit PCM channels; the controller captures it at the next frame
// start, about 160 bit clocks after ready rises, by which time the user side
// has long since updated it.
//
// Codec reset: RESET# (audio_reset_b) is held low while 'reset' is high and
// for RESET_HOLD system clocks after, and the controller is held in reset as
// long as the codec is.
//
// The three user-side ports and the wrapper structure follow the
// specification; the use of the left channel (the microphone is mono, so
// both channels carry the same data), the 8-bit truncation, the
// synchronizer and the reset timing are this design's choices.
module audio
  import voice_pkg::*;
#(
  parameter int unsigned RESET_HOLD = 64   // system clocks of codec reset after 'reset' falls
) (
  input  logic    clock_27mhz,
  input  logic    reset,
  input  sample_t to_ac97_data,     // sample for the headphones
  output sample_t from_ac97_data,   // sample from the microphone
  output logic    ready,            // rises when a new sample is available
  // codec pins
  output logic    audio_reset_b,
  output logic    ac97_sdata_out,
  input  logic    ac97_sdata_in,
  output logic    ac97_synch,
  input  logic    ac97_bit_clk
);

  localparam int unsigned RW = $clog2(RESET_HOLD + 1);

  // ---- codec reset (system clock) ----
  logic [RW-1:0] reset_count;

  always_ff @(posedge clock_27mhz) begin
    if (reset) begin
      reset_count   <= '0;
      audio_reset_b <= 1'b0;
    end else if (reset_count != RW'(RESET_HOLD)) begin
      reset_count   <= reset_count + 1'b1;
      audio_reset_b <= 1'b0;
    end else begin
      audio_reset_b <= 1'b1;
    end
  end

  // ---- bit-clock domain ----
  logic                link_reset;
  ac97_cmd_t           command;
  logic                command_valid;
  logic [PCM_BITS-1:0] left_in, right_in, pcm_out;
  logic                link_ready;

  reset_sync u_link_reset (
    .clk     (ac97_bit_clk),
    .rst_in  (!audio_reset_b),
    .rst_out (link_reset)
  );

  assign pcm_out = {to_ac97_data, {(PCM_BITS - 8){1'b0}}};

  ac97 u_ac97 (
    .bit_clk         (ac97_bit_clk),
    .reset           (link_reset),
    .ac97_sdata_out  (ac97_sdata_out),
    .ac97_sdata_in   (ac97_sdata_in),
    .ac97_synch      (ac97_synch),
    .command         (command),
    .command_valid   (command_valid),
    .left_out_data   (pcm_out),
    .left_out_valid  (1'b1),
    .right_out_data  (pcm_out),
    .right_out_valid (1'b1),
    .left_in_data    (left_in),
    .right_in_data   (right_in),
    .ready           (link_ready)
  );

  ac97commands u_commands (
    .clk           (ac97_bit_clk),
    .reset         (link_reset),
    .ready         (link_ready),
    .command       (command),
    .command_valid (command_valid)
  );

  // ---- crossing to the system clock ----
  logic ready_meta;

  always_ff @(posedge clock_27mhz) begin
    if (reset) begin
      ready_meta     <= 1'b0;
      ready          <= 1'b0;
      from_ac97_data <= '0;
    end else begin
      ready_meta     <= link_ready;
      ready          <= ready_meta;
      from_ac97_data <= sample_t'(left_in[PCM_BITS-1 -: 8]);
    end
  end

  // right_in carries the same microphone signal; it is not used.
  logic unused_right;
  assign unused_right = ^right_in;

endmodule
