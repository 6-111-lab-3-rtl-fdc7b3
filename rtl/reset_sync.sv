// reset_sync: carries an active-high reset into another clock domain.
//
// The reset is applied asynchronously (so it takes effect even while the
// destination clock is stopped, as the AC97 bit clock is while the codec is
// held in reset) and released synchronously through two flip-flops, so the
// release never lands close to a destination clock edge.
module reset_sync (
  input  logic clk,        // destination clock
  input  logic rst_in,     // reset from any domain, active high
  output logic rst_out     // reset for the destination domain
);

  logic stage;

  always_ff @(posedge clk or posedge rst_in) begin
    if (rst_in) begin
      stage   <= 1'b1;
      rst_out <= 1'b1;
    end else begin
      stage   <= 1'b0;
      rst_out <= stage;
    end
  end

endmodule
