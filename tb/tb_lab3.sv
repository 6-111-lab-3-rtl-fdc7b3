// tb_lab3: end-to-end test of the voice recorder through the AC97 link.
//
// The top is built with a 32-word sample memory (ADDR_W = 5) and a 16-clock
// debounce so that a full memory and an instant-replay wrap fit in a short
// run; everything else is as in the real design. An AC97 codec model sends a
// new random microphone word every frame and records what the design sends
// back. The ENTER button is driven with contact bounce.
//
// Scenarios and what is checked (expected values come only from the words
// the codec sent and received):
//   A  record 83 frames: memory holds every eighth microphone sample from
//      address 0; the codec hears the microphone looped back one frame later.
//      Then playback by replication (each stored sample eight times, in a loop).
//   B  playback with the interpolator switched on: 8-step linear
//      interpolation between successive stored samples, looping.
//   C  record 300 frames (replay off): the memory fills and recording stops;
//      playback plays the first 32 stored samples.
//   D  instant replay: record 400 frames; playback plays the newest 32 stored
//      samples, oldest first.
//   E  test mode: a 750 Hz tone on playback; loop-back without writes on record.
// A received stream is matched against the expected periodic stream at the
// best alignment and then must agree frame for frame. Bounces shorter than
// the debounce interval must not switch the mode. The logic-analyzer pods
// must mirror the ready strobe, the sample ports and the memory port. Each mechanism (write,
// memory full, replay wrap, playback loop, replication, interpolation, tone,
// loop-back, mode switch, rejected bounce) is counted and must occur.
module tb_lab3;
  import voice_pkg::*;
  localparam int AW    = 5;
  localparam int DEPTH = 1 << AW;
  localparam int DEB   = 16;

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

  lab3 #(.ADDR_W(AW), .DEBOUNCE_DELAY(DEB)) dut (
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
    #200ms;
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
    int f0, f1, w0;
    sample_t st [$], saved [DEPTH];
    reset = 1; button_enter = 1; switches = 3'b000; mic = '0;
    repeat (20) @(negedge clk);
    reset = 0;
    wait_frames(10);

    // A: short recording, replicated playback
    w0 = n_writes;
    record(8 * 10 + 3, f0, f1);
    push(1'b1);
    f1 = frames;
    chk(int'(dut.u_recorder.last_addr) + 1 == n_writes - w0,
        $sformatf("highest address %0d after %0d writes", dut.u_recorder.last_addr, n_writes - w0));
    chk(n_writes - w0 >= 11, "too few samples stored");
    stored_from(f0, f1, 0, n_writes - w0, st);
    playback_check(st, 1'b0, 8 * 14, 1'b1);
    // B: interpolated playback of the same recording
    playback_check(st, 1'b1, 8 * 14, 1'b0);

    // C: memory full
    record(300, f0, f1);
    push(1'b1);
    f1 = frames;
    chk(dut.u_recorder.full, "memory not full");
    stored_from(f0, f1, 0, DEPTH, st);
    playback_check(st, 1'b1, 8 * (DEPTH + 2), 1'b1);

    // D: instant replay
    switches[1] = 1'b1;
    w0 = n_writes;
    record(400, f0, f1);
    push(1'b1);
    f1 = frames;
    chk(dut.u_recorder.wrapped, "replay did not wrap");
    chk(n_writes - w0 > DEPTH, "replay wrote too few samples");
    stored_from(f0, f1, n_writes - w0 - DEPTH, DEPTH, st);
    playback_check(st, 1'b0, 8 * (DEPTH + 2), 1'b1);
    switches[1] = 1'b0;

    // E: test mode
    for (int k = 0; k < DEPTH; k++) saved[k] = sample_t'(dut.u_mem.mem[k]);
    switches[2] = 1'b1;
    begin
      int fs, p_found;
      push(1'b1);
      fs = frames + 3;
      wait_frames(82);
      p_found = -1;
      for (int p = 0; p < 64 && p_found < 0; p++) begin
        automatic logic ok = 1'b1;
        for (int f = fs; f < fs + 70; f++) begin
          automatic int want = $rtoi($floor(524287.0 * $sin(2.0 * 3.14159265358979 * ((f - fs + p) % 64) / 64.0) / 4096.0));
          if (int'(dac_of[f]) - want > 1 || want - int'(dac_of[f]) > 1) ok = 1'b0;
        end
        if (ok) p_found = p;
      end
      chk(p_found >= 0, "750 Hz tone not heard in test mode");
      if (p_found < 0) begin
        for (int f = fs; f < fs + 70; f++) $write("%0d ", dac_of[f]);
        $display("");
      end
      if (p_found >= 0) n_tone++;
      f0 = n_writes;
      record(40, fs, f1);
      chk(n_writes == f0, "test mode wrote memory");
      for (int k = 0; k < DEPTH; k++) chk(sample_t'(dut.u_mem.mem[k]) == saved[k], "memory changed in test mode");
    end
    switches[2] = 1'b0;

    // logic-analyzer pods mirror the internal signals
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      chk(a1_clk == dut.ready && a1_data == {dut.from_ac97_data, dut.to_ac97_data}, "analyzer pod 1");
      chk(a2_clk == clk && a2_data == 16'(dut.mem_addr), "analyzer pod 2");
      chk(a3_data == {dut.mem_we, dut.playback, 6'd0, dut.mem_dout}, "analyzer pod 3");
    end

    chk(n_writes > 0,   "no memory writes");
    chk(n_full > 0,     "memory full not reached");
    chk(n_wrap > 0,     "replay wrap not reached");
    chk(n_loop > 0,     "playback loop not reached");
    chk(n_repl > 0,     "replication not exercised");
    chk(n_interp > 0,   "interpolation not exercised");
    chk(n_tone > 0,     "tone not exercised");
    chk(n_loopback > 0, "loop-back not exercised");
    chk(n_mode > 0,     "no mode switch");
    chk(n_bounce > 0,   "no bounce rejected");
    $display("writes=%0d full=%0d wrap=%0d loops=%0d repl=%0d interp=%0d tone=%0d loopback=%0d modes=%0d bounces=%0d",
             n_writes, n_full, n_wrap, n_loop, n_repl, n_interp, n_tone, n_loopback, n_mode, n_bounce);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
