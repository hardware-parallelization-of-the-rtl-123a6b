// tb_fxp_div: checks the multi-cycle divider against integer division.
// Random signed operands (and a few corner cases: zero divisor, overflow,
// negative operands) are divided; the result must equal (num*256)/den
// truncated toward zero, saturated to 16 bits, and 'done' must come exactly
// NW+FRAC+1 enabled clocks after 'start'. enable is dropped at random.
module tb_fxp_div;
  localparam int NW = 40;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, start = 1'b0;
  logic signed [NW-1:0] num, den;
  logic busy, done, sat;
  logic signed [15:0] q;
  int checks = 0, failures = 0;

  fxp_div #(.NW(NW), .QW(16), .FRAC(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic run(input longint n, input longint d);
    longint ref_q; bit ref_sat; int cyc;
    ref_sat = 1'b0;
    if (d == 0) begin ref_sat = 1'b1; ref_q = ((n < 0) != (d < 0)) ? -32768 : 32767; end
    else begin
      ref_q = (n * 256) / d;
      if (ref_q > 32767)  begin ref_sat = 1'b1; ref_q = 32767; end
      if (ref_q < -32767) begin ref_sat = 1'b1; ref_q = -32768; end
    end
    @(negedge clk); num = NW'(n); den = NW'(d); start = 1'b1; en = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin
      en = ($urandom % 4) != 0;
      @(negedge clk);
      if (en) cyc++;
    end
    en = 1'b1;
    checks++;
    if (q != 16'(ref_q) || sat != ref_sat) begin
      failures++; $display("FAIL %0d/%0d: q=%0d sat=%0d ref=%0d/%0d", n, d, q, sat, ref_q, ref_sat);
    end
    checks++;
    if (cyc - 1 != NW + 8 + 1) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    num = '0; den = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(256, 512); run(-256, 512); run(1000, -7); run(-5, -3); run(0, 99);
    run(12345, 0); run(-12345, 0); run(1 << 30, 3); run(3, 1 << 30);
    for (int i = 0; i < 300; i++) begin
      longint n, d;
      n = longint'($signed($urandom)) >>> ($urandom % 20);
      d = longint'($signed($urandom)) >>> ($urandom % 28);
      run(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
