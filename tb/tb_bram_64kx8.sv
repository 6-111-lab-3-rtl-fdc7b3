// tb_bram_64kx8: random write/read test of the 64K x 8 single-port memory.
//
// Writes random data to random addresses, keeping a reference copy, and
// reads back; checks the one-clock read latency and read-first behaviour
// (a write returns the old word on dout).
module tb_bram_64kx8;
  logic        clk = 1'b0;
  logic [15:0] addr;
  logic        we;
  logic [7:0]  din, dout;
  logic [7:0]  ref_mem [65536];
  logic        ref_valid [65536];
  int checks = 0, failures = 0;

  bram_64kx8 dut (.clk(clk), .addr(addr), .we(we), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] want, input string what);
    checks++;
    if (dout !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%h got %h want %h", what, addr, dout, want);
    end
  endtask

  initial begin
    for (int k = 0; k < 65536; k++) ref_valid[k] = 1'b0;
    we = 0; addr = 0; din = 0;
    // fill a spread of addresses, including both ends
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      addr = (k == 0) ? 16'h0000 : (k == 1) ? 16'hFFFF : 16'($urandom);
      din  = 8'($urandom);
      we   = 1'b1;
      ref_mem[addr] = din; ref_valid[addr] = 1'b1;
    end
    @(negedge clk); we = 1'b0;
    // read back every written address, one clock of latency
    for (int k = 0; k < 65536; k++) begin
      if (ref_valid[k]) begin
        @(negedge clk); addr = 16'(k);
        @(negedge clk);
        check(ref_mem[k], "read");
      end
    end
    // read-first: writing returns the previous word
    @(negedge clk); addr = 16'h1234; din = 8'hA5; we = 1'b1;
    @(negedge clk); we = 1'b0; din = 8'h00;
    @(negedge clk); addr = 16'h1234; din = 8'h3C; we = 1'b1;
    @(negedge clk); check(8'hA5, "read-first"); we = 1'b0;
    @(negedge clk); check(8'h3C, "after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
