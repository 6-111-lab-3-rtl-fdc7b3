// tb_audio: the audio wrapper (ac97 + ac97commands) against the codec model.
//
// Checks: RESET# is held low for RESET_HOLD system clocks after reset; 'ready'
// rises once per 48 kHz frame, i.e. every 562 or 563 clocks of 27 MHz;
// from_ac97_data is the upper 8 bits of the microphone word the codec sent;
// the sample presented on to_ac97_data after one ready rise arrives in both
// codec PCM slots in the next frame; and the codec receives all six
// configuration writes with the expected data.
module tb_audio;
  import voice_pkg::*;
  localparam int HOLD = 16;

  logic        clk = 1'b0, reset;
  sample_t     to_data, from_data;
  logic        ready;
  logic        reset_b, sdata_out, sdata_in, synch, bit_clk;
  logic [17:0] mic;
  logic [15:0] tag;
  logic [6:0]  cmd_addr;
  logic        cmd_read;
  logic [15:0] cmd_data;
  logic [17:0] dac_left, dac_right;
  int          frames;
  int checks = 0, failures = 0;

  audio #(.RESET_HOLD(HOLD)) dut (
    .clock_27mhz(clk), .reset(reset), .to_ac97_data(to_data), .from_ac97_data(from_data),
    .ready(ready), .audio_reset_b(reset_b), .ac97_sdata_out(sdata_out),
    .ac97_sdata_in(sdata_in), .ac97_synch(synch), .ac97_bit_clk(bit_clk)
  );

  ac97_codec_model codec (
    .reset_b(reset_b), .sync(synch), .sdata_out(sdata_out),
    .bit_clk(bit_clk), .sdata_in(sdata_in), .mic(mic),
    .tag(tag), .cmd_addr(cmd_addr), .cmd_read(cmd_read), .cmd_data(cmd_data),
    .dac_left(dac_left), .dac_right(dac_right), .frames(frames)
  );

  always #18.519ns clk = ~clk;   // 27 MHz

  int cyc = 0;
  always @(posedge clk) cyc++;

  // record which codec registers were written with which data
  logic [15:0] seen_data [128];
  logic        seen [128];
  initial for (int k = 0; k < 128; k++) seen[k] = 1'b0;
  always @(frames) if (tag[14] && tag[13] && !cmd_read) begin
    seen[cmd_addr] = 1'b1; seen_data[cmd_addr] = cmd_data;
  end

  initial begin
    #30ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    int n, last, gap;
    logic ready_d;
    reset = 1; to_data = '0; mic = '0;
    repeat (5) @(negedge clk);
    chk(!reset_b, "RESET# low during reset");
    reset = 0;
    n = 0;
    while (!reset_b && n < 1000) begin @(negedge clk); n++; end
    chk(n >= HOLD && n <= HOLD + 1, $sformatf("RESET# held %0d clocks", n));
    @(posedge ready);
    @(posedge ready);
    last = cyc;
    for (int f = 0; f < 40; f++) begin
      sample_t prev_to;
      logic [17:0] prev_mic;
      @(negedge clk);
      prev_to = to_data; prev_mic = mic;
      to_data = sample_t'($urandom);
      mic     = 18'($urandom);
      @(posedge ready);
      gap = cyc - last; last = cyc;
      if (f > 0) chk(gap >= 562 && gap <= 563, $sformatf("ready period %0d", gap));
      @(negedge clk);
      chk(from_data == sample_t'(mic[17:10]), $sformatf("mic %h want %h", from_data, mic[17:10]));
      chk(dac_left == {to_data, 10'd0} && dac_right == {to_data, 10'd0},
          $sformatf("dac %h want %h", dac_left, {to_data, 10'd0}));
    end
    chk(seen[7'h02] && seen_data[7'h02] == 16'h0000, "master volume write");
    chk(seen[7'h04] && seen_data[7'h04] == 16'h0000, "headphone volume write");
    chk(seen[7'h0E] && seen_data[7'h0E] == 16'h0048, "mic volume write");
    chk(seen[7'h18] && seen_data[7'h18] == 16'h0808, "pcm out volume write");
    chk(seen[7'h1A] && seen_data[7'h1A] == 16'h0000, "record select write");
    chk(seen[7'h1C] && seen_data[7'h1C] == 16'h0000, "record gain write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
