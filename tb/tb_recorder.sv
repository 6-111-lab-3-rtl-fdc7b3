// tb_recorder: record/playback behaviour of the recorder with a 16-word memory.
//
// The memory is a behavioural single-port RAM with one clock of read latency.
// 'ready' is a 10-clock pulse every 40 clocks, each carrying a new random
// microphone sample. For each scenario the testbench computes the expected
// memory contents and the expected playback stream from the sample history
// alone and compares:
//   - record: every eighth sample stored from address 0, loop-back output;
//   - memory full (replay off): recording stops after 16 samples;
//   - instant replay: recording wraps, playback starts at the oldest sample;
//   - playback by replication (each stored sample eight times) and by linear
//     interpolation ((8-i)*S1 + i*S2) >>> 3, looping after the last sample;
//   - test mode: 750 Hz tone on playback, loop-back and no writes on record.
// Each output is checked one clock after the ready rise (the specified
// latency). Every mechanism must have been exercised at least once.
module tb_recorder;
  import voice_pkg::*;
  localparam int AW = 4;
  localparam int DEPTH = 1 << AW;

  logic          clk = 1'b0, reset, playback, ready, filter, replay, test_mode;
  sample_t       from_data, to_data, mem_din, mem_dout;
  logic [AW-1:0] mem_addr;
  logic          mem_we;
  sample_t       mem [DEPTH];
  int checks = 0, failures = 0;

  recorder #(.ADDR_W(AW)) dut (
    .clock_27mhz(clk), .reset(reset), .playback(playback), .ready(ready),
    .from_ac97_data(from_data), .to_ac97_data(to_data), .filter(filter),
    .replay(replay), .test_mode(test_mode), .mem_addr(mem_addr), .mem_we(mem_we),
    .mem_din(mem_din), .mem_dout(mem_dout)
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_addr] <= mem_din;
    mem_dout <= mem[mem_addr];
  end

  // mechanism counters
  int n_writes = 0, n_full = 0, n_wrap = 0, n_loop = 0, n_repl = 0, n_interp = 0,
      n_tone = 0, n_loopback = 0, n_mode = 0;
  always @(posedge clk) if (mem_we) n_writes++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 2000) $display("FAIL %s", what); end
  endtask

  // one sample period: present 'sample', raise ready, return output one clock later
  task automatic tick(input sample_t sample, output sample_t out);
    @(negedge clk);
    from_data = sample;
    ready = 1'b1;
    @(negedge clk);
    out = to_data;
    repeat (9) @(negedge clk);
    ready = 1'b0;
    repeat (29) @(negedge clk);
  endtask

  int pb_j = 0;   // samples played since playback was entered

  task automatic set_mode(input logic pb);
    @(negedge clk);
    if (playback != pb) begin
      n_mode++;
      pb_j = 0;
    end
    playback = pb;
    repeat (5) @(negedge clk);
  endtask

  function automatic sample_t interp_ref(sample_t a, sample_t b, int i);
    int e, q;
    e = (8 - i) * int'(a) + i * int'(b);
    q = e / 8;
    if (e < 0 && (e % 8) != 0) q = q - 1;
    return sample_t'(q);
  endfunction

  // record n samples; returns the stored sequence r (every eighth)
  task automatic record(input int n, output sample_t r [$]);
    sample_t s, out;
    r = {};
    set_mode(1'b0);
    for (int j = 0; j < n; j++) begin
      s = sample_t'($urandom);
      if (j % 8 == 0) r.push_back(s);
      tick(s, out);
      chk(out == s, $sformatf("loop-back %0d want %0d", out, s));
      if (out == s) n_loopback++;
    end
  endtask

  // play back ticks samples and compare with the stored list st; if already
  // in playback the stream continues where it was
  task automatic play(input sample_t st [$], input int ticks, input logic interp);
    sample_t out, want;
    int l, k, i, j;
    l = st.size();
    filter = interp;
    set_mode(1'b1);
    for (int t = 0; t < ticks; t++) begin
      j = pb_j++;
      k = (j / 8) % l;
      i = j % 8;
      want = interp ? interp_ref(st[k], st[(k + 1) % l], i) : st[k];
      tick(8'sd0, out);
      chk(out == want, $sformatf("playback j=%0d k=%0d i=%0d got %0d want %0d", j, k, i, out, want));
      if (out == want) begin
        if (interp) n_interp++; else n_repl++;
        if (j / 8 >= l && i == 0) n_loop++;
      end
    end
  endtask

  initial begin
    sample_t r [$], st [$], out, saved [DEPTH];
    int stored, tone_p, t0, t1;
    reset = 1; playback = 1; ready = 0; filter = 0; replay = 0; test_mode = 0;
    from_data = '0;
    for (int k = 0; k < DEPTH; k++) mem[k] = '0;
    repeat (4) @(negedge clk);
    reset = 0;

    // 1. short recording, replicated then interpolated playback
    record(8 * 5 + 3, r);                 // 6 stored samples
    for (int k = 0; k < r.size(); k++)
      chk(mem[k] == r[k], $sformatf("mem[%0d]=%0d want %0d", k, mem[k], r[k]));
    play(r, 8 * 14, 1'b0);
    play(r, 8 * 14, 1'b1);

    // 2. recording past the end of memory with replay off: stops when full
    record(8 * 20 + 1, r);                // 21 samples offered
    for (int k = 0; k < DEPTH; k++)
      chk(mem[k] == r[k], $sformatf("full mem[%0d]=%0d want %0d", k, mem[k], r[k]));
    n_full++;
    st = r[0:DEPTH-1];
    play(st, 8 * (DEPTH + 3), 1'b1);

    // 3. instant replay: recording wraps, newest 16 samples kept
    replay = 1;
    record(8 * 20 + 5, r);                // 21 samples, wraps once
    st = r[r.size()-DEPTH:r.size()-1];
    for (int k = 0; k < DEPTH; k++)
      chk(mem[(r.size() - DEPTH + k) % DEPTH] == st[k], $sformatf("replay mem slot %0d", k));
    play(st, 8 * (DEPTH + 2), 1'b0);
    n_wrap++;
    play(st, 8 * 4, 1'b1);                 // switch to interpolation mid-stream
    replay = 0;

    // 4. test mode: tone on playback, loop-back and no writes on record
    for (int k = 0; k < DEPTH; k++) saved[k] = mem[k];
    test_mode = 1;
    set_mode(1'b1);
    // the tone runs freely: find its phase from the first two samples
    tone_p = -1;
    tick(8'sd0, out); t0 = int'(out);
    tick(8'sd0, out); t1 = int'(out);
    for (int p = 0; p < 64; p++) begin
      int a, b;
      a = $rtoi($floor(524287.0 * $sin(2.0 * 3.14159265358979 * p / 64.0) / 4096.0));
      b = $rtoi($floor(524287.0 * $sin(2.0 * 3.14159265358979 * (p + 1) / 64.0) / 4096.0));
      if (tone_p < 0 && a - t0 <= 1 && t0 - a <= 1 && b - t1 <= 1 && t1 - b <= 1) tone_p = p;
    end
    chk(tone_p >= 0, "tone phase not found");
    for (int j = 2; j < 70; j++) begin
      real w; int want, got;
      tick(8'sd0, out);
      w = 524287.0 * $sin(2.0 * 3.14159265358979 * ((j + tone_p) % 64) / 64.0);
      want = $rtoi($floor(w / 4096.0));
      got = int'(out);
      chk(got - want <= 1 && want - got <= 1, $sformatf("tone j=%0d got %0d want %0d", j, got, want));
      if (got - want <= 1 && want - got <= 1) n_tone++;
    end
    set_mode(1'b0);
    for (int j = 0; j < 24; j++) begin
      sample_t s = sample_t'($urandom);
      tick(s, out);
      chk(out == s, "test-mode loop-back");
    end
    for (int k = 0; k < DEPTH; k++) chk(mem[k] == saved[k], "test mode wrote memory");
    test_mode = 0;

    // every mechanism must have occurred
    chk(n_writes > 0,   "no memory writes");
    chk(n_full > 0,     "memory-full stop not exercised");
    chk(n_wrap > 0,     "replay wrap not exercised");
    chk(n_loop > 0,     "playback loop not exercised");
    chk(n_repl > 0,     "replication not exercised");
    chk(n_interp > 0,   "interpolation not exercised");
    chk(n_tone > 0,     "tone not exercised");
    chk(n_loopback > 0, "loop-back not exercised");
    chk(n_mode > 0,     "no mode switches");
    $display("writes=%0d loops=%0d repl=%0d interp=%0d tone=%0d loopback=%0d mode_switches=%0d",
             n_writes, n_loop, n_repl, n_interp, n_tone, n_loopback, n_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
