// bram_64kx8: single-port synchronous sample memory, 64K words of 8 bits.
//
// One address port serves both reads and writes. On a clock edge with we=1
// the word at addr is written with din; on every clock edge dout is loaded
// with the word at addr as it was before that edge (read-first), so read data
// appears one clock after the address, as in an FPGA block RAM. The size
// (64K x 8) is the one the recorder specification chooses to fit the FPGA's
// block RAMs; the read-first behaviour and the one-clock read latency are
// this design's choice of block-RAM mode. Contents are not initialised.
module bram_64kx8 #(
  parameter int unsigned ADDR_W = 16,   // 64K locations
  parameter int unsigned DATA_W = 8     // 8-bit samples
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end

endmodule
