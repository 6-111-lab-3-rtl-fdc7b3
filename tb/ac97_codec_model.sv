// ac97_codec_model: behavioural model of the AC-link side of an AC97 codec.
//
// Not synthesizable; for testbenches only. It stands in for the codec chip:
// once RESET# is high it runs BIT_CLK at 12.288 MHz (81.38 ns period), samples
// SYNC and SDATA_OUT on the falling edge and drives SDATA_IN on the rising
// edge, one bit behind the output frame. A rising SYNC marks output bit 0.
// Each input frame carries a valid tag (frame, slot 3, slot 4) and the 18-bit
// 'mic' value, taken at the start of the frame, in both PCM slots.
// After output bit 95 of each frame it publishes what it received: the
// command slots and the two PCM slots, and bumps 'frames'.
module ac97_codec_model (
  input  logic        reset_b,
  input  logic        sync,
  input  logic        sdata_out,
  output logic        bit_clk,
  output logic        sdata_in,
  input  logic [17:0] mic,          // microphone sample to send
  output logic [15:0] tag,          // received tag
  output logic [6:0]  cmd_addr,
  output logic        cmd_read,
  output logic [15:0] cmd_data,
  output logic [17:0] dac_left,
  output logic [17:0] dac_right,
  output int          frames        // output frames received
);

  logic [255:0] in_frame;
  logic [95:0]  rx;
  logic         sync_prev;
  int           cnt;

  initial begin
    bit_clk   = 1'b0;
    sdata_in  = 1'b0;
    frames    = 0;
    sync_prev = 1'b0;
    cnt       = 300;
    in_frame  = '0;
    rx        = '0;
    tag = '0; cmd_addr = '0; cmd_read = 1'b0; cmd_data = '0;
    dac_left = '0; dac_right = '0;
    forever begin
      if (!reset_b) begin
        bit_clk = 1'b0;
        @(posedge reset_b);
        #100ns;
      end
      #40.690ns bit_clk = 1'b1;
      #40.690ns bit_clk = 1'b0;
    end
  end

  always @(negedge bit_clk) begin
    if (sync && !sync_prev) cnt = 0;
    else                    cnt = cnt + 1;
    sync_prev = sync;
    if (cnt == 0)
      in_frame = {16'h9800, 20'd0, 20'd0, mic, 2'b00, mic, 2'b00, 160'd0};
    if (cnt >= 0 && cnt < 96) rx[95 - cnt] = sdata_out;
    if (cnt == 95) begin
      tag       = rx[95:80];
      cmd_read  = rx[79];
      cmd_addr  = rx[78:72];
      cmd_data  = rx[59:44];
      dac_left  = rx[39:22];
      dac_right = rx[19:2];
      frames    = frames + 1;
    end
  end

  always @(posedge bit_clk) begin
    if (cnt >= 0 && cnt < 256) sdata_in <= in_frame[255 - cnt];
    else                       sdata_in <= 1'b0;
  end

endmodule
