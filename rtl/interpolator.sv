// interpolator: one point of an 8-step linear interpolation between two samples.
//
// Given the older sample s1, the newer sample s2 and the step i (0..7), the
// output is ((8-i)*s1 + i*s2) >>> 3, i.e. the point i/8 of the way from s1 to
// s2. Step 0 returns s1 exactly. The arithmetic is two's complement: the
// weighted sum needs 12 bits, and the arithmetic shift right by three divides
// by eight rounding towards minus infinity. The result always lies between
// s1 and s2, so it fits back into 8 bits.
//
// Purely combinational; the recorder registers the result. The formula is the
// one the recorder specification gives; the 12-bit intermediate width and the
// use of an arithmetic shift (floor) are this design's reading of ">> 3" on
// signed operands.
module interpolator
  import voice_pkg::*;
(
  input  sample_t    s1,     // older sample
  input  sample_t    s2,     // newer sample
  input  logic [2:0] step,   // i, 0..7
  output sample_t    y       // ((8-i)*s1 + i*s2) >>> 3
);

  logic signed [11:0] w1, w2, acc;

  always_comb begin
    w1  = $signed(12'(4'd8 - {1'b0, step}));       // 8-i, 1..8
    w2  = $signed({9'd0, step});                   // i,   0..7
    acc = w1 * 12'(s1) + w2 * 12'(s2);
    y   = sample_t'(acc >>> 3);
  end

endmodule
