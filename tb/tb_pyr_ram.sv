// tb_pyr_ram: writes random words to random addresses of the pyramid RAM,
// reads them back one clock after the address, and checks that nothing
// changes (neither a write nor rdata) while the clock enable is low.
module tb_pyr_ram;
  localparam int DEPTH = 8160, AW = 13;
  logic clk = 1'b0, en = 1'b1, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [15:0] model [DEPTH];
  bit written [DEPTH];
  int checks = 0, failures = 0;

  pyr_ram #(.DEPTH(DEPTH), .DW(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'($urandom % DEPTH); wdata = 16'($urandom);
      model[waddr] = wdata; written[waddr] = 1'b1;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom % DEPTH);
      if (!written[a]) continue;
      raddr = a;
      @(negedge clk);
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL read %0d", a); end
      // a disabled write with a disabled read must change nothing
      en = 1'b0; we = 1'b1; waddr = a; wdata = ~model[a]; raddr = '0;
      @(negedge clk);
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL rdata moved while disabled"); end
      en = 1'b1; we = 1'b0; raddr = a;
      @(negedge clk);
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL disabled write landed %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
