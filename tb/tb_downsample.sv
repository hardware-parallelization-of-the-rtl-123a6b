// tb_downsample: decimates random 16x16 and 8x8 images and checks every
// destination pixel against source pixel (2x, 2y), that nothing outside the
// destination image is written, and the run time of 2 clocks per output pixel.
module tb_downsample;
  import sift_pkg::*;
  localparam int AW = 13, SRC = 50, DST = 2000;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, start = 1'b0;
  logic [7:0] size = '0;
  logic busy, done, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  pix_t rd_data, wr_data;
  pix_t mem [8192];
  int checks = 0, failures = 0;

  downsample #(.AW(AW)) dut (.clk, .rst_n, .en, .start, .src_base(AW'(SRC)),
    .dst_base(AW'(DST)), .size, .busy, .done, .rd_addr, .rd_data, .wr_en,
    .wr_addr, .wr_data);

  always #5 clk = ~clk;
  always @(posedge clk) if (en) begin
    rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  initial begin
    rd_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2; t++) begin
      int n, h, cyc;
      n = (t == 0) ? 16 : 8; h = n / 2;
      for (int i = 0; i < 8192; i++) mem[i] = 16'hDEAD;
      for (int i = 0; i < n * n; i++) mem[SRC + i] = pix_t'($urandom);
      @(negedge clk); size = 8'(n); start = 1'b1;
      @(negedge clk); start = 1'b0; cyc = 1;
      while (!done) begin
        en = ($urandom % 5) != 0;
        @(negedge clk);
        if (en) cyc++;
      end
      en = 1'b1;
      @(negedge clk);
      for (int y = 0; y < h; y++)
        for (int x = 0; x < h; x++) begin
          checks++;
          if (mem[DST + y * h + x] != mem[SRC + 2 * y * n + 2 * x]) begin
            failures++; $display("FAIL (%0d,%0d)", x, y);
          end
        end
      checks++;
      if (mem[DST + h * h] != 16'hDEAD || mem[DST - 1] != 16'hDEAD) begin
        failures++; $display("FAIL wrote outside");
      end
      checks++;
      if (cyc != 2 * h * h + 1) begin failures++; $display("FAIL cycles %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
