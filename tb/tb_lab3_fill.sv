// tb_lab3_fill: fills the whole 64K-word sample memory at the design's own
// sizes: about 10.9 s of audio stored at 6 kHz.
//
// The top is instantiated with its default parameters. The ENTER button is
// held for 8 x 65536 + 200 frames, so recording runs past the end of memory
// with instant replay off. The testbench checks that recording stopped when
// the memory was full, that all 65536 words are every eighth microphone
// sample from address 0, and that playback then starts at the first
// recorded sample with the interpolator on.
module tb_lab3_fill;
  import voice_pkg::*;
  localparam int AW    = 16;
  localparam int DEPTH = 1 << AW;
  localparam int DEB   = 270000;

  logic        clk = 1'b0, reset, button_enter;
  logic [2:0]  switches;
  logic        reset_b, sdata_out, sdata_in, synch, bit_clk;
  logic [17:0] mic;
  logic [15:0] tag;
  logic [6:0]  cmd_addr;
  logic        cmd_read;
  logic [15:0] cmd_data;
  logic [17:0] dac_left, dac_right;
  int          frames;
  logic        a1_clk, a2_clk, a3_clk;
  logic [15:0] a1_data, a2_data, a3_data;
  int checks = 0, failures = 0;

  lab3 dut (
    .clock_27mhz(clk), .reset(reset), .button_enter(button_enter), .switch(switches),
    .audio_reset_b(reset_b), .ac97_sdata_out(sdata_out), .ac97_sdata_in(sdata_in),
    .ac97_synch(synch), .ac97_bit_clk(bit_clk),
    .analyzer1_clock(a1_clk), .analyzer1_data(a1_data),
    .analyzer2_clock(a2_clk), .analyzer2_data(a2_data),
    .analyzer3_clock(a3_clk), .analyzer3_data(a3_data)
  );

  ac97_codec_model codec (
    .reset_b(reset_b), .sync(synch), .sdata_out(sdata_out),
    .bit_clk(bit_clk), .sdata_in(sdata_in), .mic(mic),
    .tag(tag), .cmd_addr(cmd_addr), .cmd_read(cmd_read), .cmd_data(cmd_data),
    .dac_left(dac_left), .dac_right(dac_right), .frames(frames)
  );

  always #18.519ns clk = ~clk;   // 27 MHz

  // per-frame history: microphone word sent and PCM word received
  sample_t mic_of [int];
  sample_t dac_of [int];
  always @(frames) begin
    dac_of[frames - 1] = sample_t'(dac_left[17:10]);
    mic = 18'($urandom);
    mic_of[frames] = sample_t'(mic[17:10]);
  end

  // mechanism counters, observed at the recorder
  int n_writes = 0, n_full = 0, n_wrap = 0, n_loop = 0, n_repl = 0, n_interp = 0,
      n_tone = 0, n_loopback = 0, n_mode = 0, n_bounce = 0;
  logic full_d = 0, wrapped_d = 0, pb_d = 1, recorded = 0;
  always @(posedge clk) begin
    if (dut.mem_we) n_writes++;
    if (dut.u_recorder.full && !full_d) n_full++;
    if (dut.u_recorder.wrapped && !wrapped_d) n_wrap++;
    if (recorded && dut.u_recorder.state == 2 && !dut.u_recorder.prime &&
        dut.u_recorder.addr == dut.u_recorder.last_addr) n_loop++;
    if (dut.playback != pb_d) n_mode++;
    full_d = dut.u_recorder.full; wrapped_d = dut.u_recorder.wrapped; pb_d = dut.playback;
  end

  initial begin
    #12s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic wait_frames(input int n);
    int f0 = frames;
    while (frames < f0 + n) @(frames);
  endtask

  // press (0) or release (1) ENTER with bounce, and wait for the mode to follow
  task automatic push(input logic level);
    int n;
    logic pb0;
    pb0 = dut.playback;
    if (pb0 == level) return;
    for (int b = 0; b < 3; b++) begin
      @(negedge clk); button_enter = level;
      repeat (DEB / 2) @(negedge clk);
      button_enter = !level;
      repeat (DEB + 4) @(negedge clk);
    end
    chk(dut.playback == pb0, "bounce switched the mode");
    if (dut.playback == pb0) n_bounce++;
    @(negedge clk); button_enter = level;
    n = 0;
    while (dut.playback != level && n < DEB + 1000) begin @(negedge clk); n++; end
    chk(dut.playback == level, "mode did not follow the button");
  endtask

  function automatic sample_t interp_ref(sample_t a, sample_t b, int i);
    int e, q;
    e = (8 - i) * int'(a) + i * int'(b);
    q = e / 8;
    if (e < 0 && (e % 8) != 0) q = q - 1;
    return sample_t'(q);
  endfunction

  // record for n frames; returns the frame range of the recording
  task automatic record(input int n, output int f_first, output int f_last);
    push(1'b0);
    recorded = 1'b1;
    f_first = frames;
    wait_frames(n);
    f_last = frames - 1;
    // loop-back: the word received in frame f is the one sent in frame f-1
    for (int f = f_first + 3; f < f_last; f++) begin
      chk(dac_of[f] == mic_of[f - 1], $sformatf("loop-back frame %0d", f));
      if (dac_of[f] == mic_of[f - 1]) n_loopback++;
    end
  endtask

  // find the stored sequence: memory word k must be the microphone word of
  // frame j0 + 8k for one j0 in the recording window
  task automatic stored_from(input int f_first, input int f_last, input int first_k,
                             input int count, output sample_t st [$]);
    int j0 = -1;
    st = {};
    for (int j = f_first; j <= f_last && j0 < 0; j++) begin
      automatic logic ok = 1'b1;
      for (int k = 0; k < count && ok; k++) begin
        automatic int f = j + 8 * (first_k + k);
        if (!mic_of.exists(f) || sample_t'(dut.u_mem.mem[(first_k + k) % DEPTH]) != mic_of[f]) ok = 1'b0;
      end
      if (ok) j0 = j;
    end
    chk(j0 >= 0, "stored samples are not every eighth microphone sample");
    for (int k = 0; k < count; k++) st.push_back(sample_t'(dut.u_mem.mem[(first_k + k) % DEPTH]));
  endtask

  // play for n frames and match against the looping stream built from st
  task automatic playback_check(input sample_t st [$], input logic interp, input int n,
                                input logic fresh);
    int f_first, l, period, best;
    sample_t want [$];
    switches[0] = interp;
    if (fresh) push(1'b1);
    f_first = frames + 3;
    wait_frames(n + 4);
    l = st.size();
    period = 8 * l;
    for (int j = 0; j < period; j++)
      want.push_back(interp ? interp_ref(st[j / 8], st[(j / 8 + 1) % l], j % 8) : st[j / 8]);
    best = -1;
    for (int o = 0; o < period && best < 0; o++) begin
      automatic logic ok = 1'b1;
      for (int f = f_first; f < f_first + n && ok; f++)
        if (dac_of[f] != want[(f - f_first + o) % period]) ok = 1'b0;
      if (ok) best = o;
    end
    chk(best >= 0, $sformatf("playback stream (interp=%0b) matches no alignment", interp));
    if (best < 0) begin
      for (int k = 0; k < l; k++) $write("%0d ", st[k]);
      $display("");
      for (int f = f_first; f < f_first + n; f++) $write("%0d ", dac_of[f]);
      $display("");
    end
    if (best >= 0) begin
      if (interp) n_interp += n; else n_repl += n;
      // a fresh playback starts with the oldest sample within a few frames
      if (fresh) chk(best <= 4, $sformatf("playback started at stream position %0d", best));
    end
    checks += n;
  endtask

  initial begin
    int f0, f1;
    sample_t st [$];
    reset = 1; button_enter = 1; switches = 3'b000; mic = '0;
    repeat (20) @(negedge clk);
    reset = 0;
    wait_frames(10);

    // fill the memory
    switches[0] = 1'b1;
    record(8 * DEPTH + 200, f0, f1);
    push(1'b1);
    f1 = frames;
    chk(dut.u_recorder.full, "memory not full");
    chk(n_writes == DEPTH, $sformatf("%0d writes, want %0d", n_writes, DEPTH));
    chk(int'(dut.u_recorder.last_addr) == DEPTH - 1, "highest address");
    stored_from(f0, f1, 0, DEPTH, st);
    playback_check(st, 1'b1, 8 * 20, 1'b1);
    chk(n_full > 0,   "memory full not reached");
    chk(n_interp > 0, "interpolation not exercised");
    $display("writes=%0d full=%0d wrap=%0d loops=%0d repl=%0d interp=%0d tone=%0d loopback=%0d modes=%0d bounces=%0d",
             n_writes, n_full, n_wrap, n_loop, n_repl, n_interp, n_tone, n_loopback, n_mode, n_bounce);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
