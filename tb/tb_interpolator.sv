// tb_interpolator: exhaustive check of the 8-step linear interpolator.
//
// Every pair of signed 8-bit samples and every step 0..7 is applied; the
// expected value is floor(((8-i)*s1 + i*s2) / 8) computed with integer
// division and an explicit correction for negative remainders.
module tb_interpolator;
  import voice_pkg::*;

  sample_t    s1, s2, y;
  logic [2:0] step;
  int checks = 0, failures = 0;

  interpolator dut (.s1(s1), .s2(s2), .step(step), .y(y));

  function automatic int floor_div8(int v);
    int q;
    q = v / 8;
    if (v < 0 && (v % 8) != 0) q = q - 1;
    return q;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        for (int i = 0; i < 8; i++) begin
          int e;
          s1 = sample_t'(a); s2 = sample_t'(b); step = 3'(i);
          #1;
          e = floor_div8((8 - i) * a + i * b);
          checks++;
          if (int'(y) != e) begin
            failures++;
            if (failures < 10)
              $display("FAIL s1=%0d s2=%0d i=%0d got %0d want %0d", a, b, i, y, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
