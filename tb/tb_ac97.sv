// tb_ac97: AC-link controller against the codec model.
//
// Each frame the testbench presents a new random command and random 18-bit
// PCM output words (changed right after 'ready' rises) and a new random
// microphone word in the codec model. At the next ready rise it checks that
// the codec received the tag, command and PCM words of the previous frame,
// and that left_in_data/right_in_data hold the microphone word. It also
// checks the frame rate: ready rises every 256 bit clocks and stays high
// for 32, and SYNC is high for 16 bit clocks per frame.
module tb_ac97;
  import voice_pkg::*;

  logic        reset, reset_b;
  logic        bit_clk, sdata_out, sdata_in, synch;
  ac97_cmd_t   command;
  logic        command_valid;
  logic [17:0] left_out, right_out, left_in, right_in, mic;
  logic        ready;
  logic [15:0] tag;
  logic [6:0]  cmd_addr;
  logic        cmd_read;
  logic [15:0] cmd_data;
  logic [17:0] dac_left, dac_right;
  int          frames;
  int checks = 0, failures = 0;

  ac97 dut (
    .bit_clk(bit_clk), .reset(reset),
    .ac97_sdata_out(sdata_out), .ac97_sdata_in(sdata_in), .ac97_synch(synch),
    .command(command), .command_valid(command_valid),
    .left_out_data(left_out), .left_out_valid(1'b1),
    .right_out_data(right_out), .right_out_valid(1'b1),
    .left_in_data(left_in), .right_in_data(right_in), .ready(ready)
  );

  ac97_codec_model codec (
    .reset_b(reset_b), .sync(synch), .sdata_out(sdata_out),
    .bit_clk(bit_clk), .sdata_in(sdata_in), .mic(mic),
    .tag(tag), .cmd_addr(cmd_addr), .cmd_read(cmd_read), .cmd_data(cmd_data),
    .dac_left(dac_left), .dac_right(dac_right), .frames(frames)
  );

  // bit clocks between ready rises, ready high time, sync high time
  int bclk = 0, last_rise = -1, rise_gap = 0, high_len = 0, sync_len = 0, sync_run = 0;
  always @(posedge bit_clk) begin
    bclk++;
    if (ready) high_len++;
    if (synch) sync_run++;
    else if (sync_run != 0) begin sync_len = sync_run; sync_run = 0; end
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    ac97_cmd_t   prev_cmd;
    logic [17:0] prev_l, prev_r, prev_mic;
    reset = 1; reset_b = 0; mic = '0;
    command = '{addr: 7'h00, data: 16'h0}; command_valid = 1;
    left_out = '0; right_out = '0;
    #500ns reset_b = 1;
    repeat (4) @(negedge bit_clk);
    reset = 0;
    // first ready rise: start the random sequence
    @(posedge ready);
    for (int f = 0; f < 60; f++) begin
      prev_cmd = command; prev_l = left_out; prev_r = right_out; prev_mic = mic;
      @(negedge bit_clk);
      command   = '{addr: 7'($urandom), data: 16'($urandom)};
      left_out  = 18'($urandom);
      right_out = 18'($urandom);
      mic       = 18'($urandom);
      high_len  = 0;
      last_rise = bclk;
      @(posedge ready);
      rise_gap = bclk - last_rise;
      chk(rise_gap == 256, $sformatf("ready period %0d", rise_gap));
      chk(high_len == 32 || f == 0, $sformatf("ready high %0d", high_len));
      chk(sync_len == 16, $sformatf("sync length %0d", sync_len));
      chk(tag == 16'hF800, $sformatf("tag %h", tag));
      chk(!cmd_read && cmd_addr == command.addr && cmd_data == command.data,
          $sformatf("command %h=%h want %h=%h", cmd_addr, cmd_data, command.addr, command.data));
      chk(dac_left == left_out && dac_right == right_out,
          $sformatf("pcm out %h %h want %h %h", dac_left, dac_right, left_out, right_out));
      chk(left_in == mic && right_in == mic,
          $sformatf("pcm in %h %h want %h", left_in, right_in, mic));
    end
    // command_valid low clears the slot-valid bits
    @(negedge bit_clk); command_valid = 0;
    @(posedge ready); @(posedge ready);
    chk(tag == 16'h9800, $sformatf("tag without command %h", tag));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
