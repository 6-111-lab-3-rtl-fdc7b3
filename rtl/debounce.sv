// debounce: synchronizes a pushbutton to the clock and filters contact bounce.
//
// The raw input passes through two flip-flops to remove metastability. The
// output only takes the synchronized value once that value has stayed the
// same for DELAY consecutive clocks; every change restarts the count. With
// the default DELAY = 270000 at 27 MHz a press must be steady for 10 ms.
// On reset the output and the synchronizer are loaded with the current input
// value, so no spurious edge follows reset.
//
// The specification says only that this module debounces and synchronizes
// the pushbuttons; the two-flop synchronizer, the counter method and the
// 10 ms interval are this design's choices.
module debounce #(
  parameter int unsigned DELAY = 270000   // clocks the input must be stable
) (
  input  logic clk,
  input  logic reset,
  input  logic noisy,     // raw, asynchronous button level
  output logic clean      // synchronized, debounced level
);

  localparam int unsigned CW = $clog2(DELAY + 1);

  logic          sync0, sync1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (reset) begin
      sync0 <= noisy;
      sync1 <= noisy;
      clean <= noisy;
      count <= '0;
    end else begin
      sync0 <= noisy;
      sync1 <= sync0;
      if (sync1 == clean) begin
        count <= '0;
      end else if (count == CW'(DELAY - 1)) begin
        clean <= sync1;
        count <= '0;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
