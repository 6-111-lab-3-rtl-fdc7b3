// tb_tone750hz: checks the 750 Hz sine table.
//
// Steps the generator through two full periods and compares each sample with
// round(524287 * sin(2*pi*k/64)) computed with $sin (tolerance 1 LSB); also
// checks that the output holds between strobes and that the period is
// 64 samples (750 Hz at 48 kHz).
module tb_tone750hz;
  logic clk = 1'b0, reset, ready;
  logic signed [19:0] pcm;
  int checks = 0, failures = 0;

  tone750hz dut (.clk(clk), .reset(reset), .ready(ready), .pcm_data(pcm));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real want;
    int  w;
    logic signed [19:0] held;
    reset = 1; ready = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    for (int k = 0; k < 128; k++) begin
      @(negedge clk); ready = 1;
      @(negedge clk); ready = 0;
      want = 524287.0 * $sin(2.0 * 3.14159265358979 * (k % 64) / 64.0);
      w = $rtoi(want + (want >= 0 ? 0.5 : -0.5));
      checks++;
      if (int'(pcm) - w > 1 || w - int'(pcm) > 1) begin
        failures++;
        $display("FAIL k=%0d got %0d want %0d", k, pcm, w);
      end
      held = pcm;
      repeat (3) @(negedge clk);
      checks++;
      if (pcm !== held) begin failures++; $display("FAIL output changed without strobe"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
