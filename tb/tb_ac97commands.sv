// tb_ac97commands: checks the codec register-write sequence.
//
// Pulses 'ready' and compares each command with the expected table
// (02h=0000, 04h=0000, 0Eh=0048, 18h=0808, 1Ah=0000, 1Ch=0000), three times
// round, checking the sequence repeats and only steps on a ready rise.
module tb_ac97commands;
  import voice_pkg::*;
  logic clk = 1'b0, reset, ready;
  ac97_cmd_t cmd;
  logic valid;
  int checks = 0, failures = 0;
  logic [6:0]  exp_addr [6] = '{7'h02, 7'h04, 7'h0E, 7'h18, 7'h1A, 7'h1C};
  logic [15:0] exp_data [6] = '{16'h0000, 16'h0000, 16'h0048, 16'h0808, 16'h0000, 16'h0000};

  ac97commands dut (.clk(clk), .reset(reset), .ready(ready), .command(cmd), .command_valid(valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; ready = 0;
    repeat (3) @(negedge clk);
    reset = 0;
    @(negedge clk);
    checks++; if (!valid) begin failures++; $display("FAIL valid low"); end
    for (int k = 0; k < 18; k++) begin
      checks++;
      if (cmd.addr !== exp_addr[k % 6] || cmd.data !== exp_data[k % 6]) begin
        failures++;
        $display("FAIL step %0d got %h=%h want %h=%h", k, cmd.addr, cmd.data,
                 exp_addr[k % 6], exp_data[k % 6]);
      end
      // a long ready pulse must advance exactly once
      ready = 1; repeat (5) @(negedge clk); ready = 0; repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
