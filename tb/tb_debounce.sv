// tb_debounce: checks filtering of contact bounce.
//
// With DELAY = 8: after reset the output equals the input; glitches shorter
// than DELAY clocks never reach the output; a level held steady changes the
// output exactly DELAY + 2 clocks after the raw change (two synchronizer
// stages plus DELAY clocks of stability).
module tb_debounce;
  localparam int DELAY = 8;
  logic clk = 1'b0, reset, noisy, clean;
  int checks = 0, failures = 0;

  debounce #(.DELAY(DELAY)) dut (.clk(clk), .reset(reset), .noisy(noisy), .clean(clean));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_clean(input logic v, input string what);
    checks++;
    if (clean !== v) begin failures++; $display("FAIL %s: clean=%b", what, clean); end
  endtask

  // change the input, then count clocks until the output follows
  task automatic settle_to(input logic v);
    int n;
    @(negedge clk); noisy = v;
    n = 0;
    while (clean !== v && n < 100) begin @(negedge clk); n++; end
    checks++;
    if (n != DELAY + 2) begin failures++; $display("FAIL latency %0d want %0d", n, DELAY + 2); end
  endtask

  initial begin
    noisy = 1'b1; reset = 1'b1;
    repeat (3) @(negedge clk);
    reset = 1'b0;
    expect_clean(1'b1, "after reset");
    // bounces: short low pulses
    for (int g = 1; g < DELAY; g++) begin
      @(negedge clk); noisy = 1'b0;
      repeat (g) @(negedge clk);
      noisy = 1'b1;
      repeat (DELAY + 4) begin @(negedge clk); expect_clean(1'b1, "glitch rejected"); end
    end
    settle_to(1'b0);
    repeat (5) begin @(negedge clk); expect_clean(1'b0, "held low"); end
    // bounce while released
    @(negedge clk); noisy = 1'b1; repeat (3) @(negedge clk); noisy = 1'b0;
    repeat (DELAY + 4) begin @(negedge clk); expect_clean(1'b0, "glitch rejected 2"); end
    settle_to(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
