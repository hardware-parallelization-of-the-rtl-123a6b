// tb_hdl_node_if: random enable_in and done; ce must equal enable_in, and
// enable_out must be enable_in AND done delayed by one clock (so it never
// rises before done and it lags enable_in).
module tb_hdl_node_if;
  logic clk = 1'b0, rst_n = 1'b0, enable_in = 1'b0, done = 1'b0;
  logic ce, enable_out;
  logic exp_out = 1'b0;
  int checks = 0, failures = 0;

  hdl_node_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    checks++; if (enable_out) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (enable_out != exp_out) begin failures++; $display("FAIL enable_out at %0d", i); end
      enable_in = ($urandom % 3) != 0;
      done      = (i > 500) ? (($urandom % 5) != 0) : 1'b0;
      #1;
      checks++;
      if (ce != enable_in) begin failures++; $display("FAIL ce"); end
      exp_out = enable_in && done;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
