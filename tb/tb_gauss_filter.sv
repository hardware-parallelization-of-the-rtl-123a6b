// tb_gauss_filter: filters random 8x8 images with each of the five kernels
// and compares every output pixel with a direct 7x7 convolution computed here
// (edge pixels replicated, sum rounded to Q8.8). Also checks the run time of
// 51 enabled clocks per pixel, with the clock enable dropped at random.
module tb_gauss_filter;
  import sift_pkg::*;
  localparam int AW = 13, N = 8, SRC = 100, DST = 1000;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, start = 1'b0;
  logic [2:0] sigma = '0;
  logic busy, done, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  pix_t rd_data, wr_data;
  pix_t mem [8192];
  int checks = 0, failures = 0;

  gauss_filter #(.AW(AW)) dut (.clk, .rst_n, .en, .start, .sigma,
    .src_base(AW'(SRC)), .dst_base(AW'(DST)), .size(8'(N)), .busy, .done,
    .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;
  always @(posedge clk) if (en) begin
    rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  function automatic int clampi(input int v);
    return v < 0 ? 0 : (v > N - 1 ? N - 1 : v);
  endfunction

  initial begin
    rd_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 5; s++) begin
      int cyc;
      for (int i = 0; i < N * N; i++) mem[SRC + i] = pix_t'($urandom % 65536);
      if (s == 0) for (int i = 0; i < N * N; i++) mem[SRC + i] = 16'hFFFF;  // saturation corner
      @(negedge clk); sigma = 3'(s); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done) begin
        en = ($urandom % 8) != 0;
        @(negedge clk);
        if (en) cyc++;
      end
      en = 1'b1;
      @(negedge clk);
      for (int y = 0; y < N; y++)
        for (int x = 0; x < N; x++) begin
          longint acc, r;
          acc = 0;
          for (int dy = -3; dy <= 3; dy++)
            for (int dx = -3; dx <= 3; dx++)
              acc += longint'(mem[SRC + clampi(y + dy) * N + clampi(x + dx)]) *
                     longint'(GK[s][dy < 0 ? -dy : dy][dx < 0 ? -dx : dx]);
          r = (acc + 128) >>> 8;
          if (r > 65535) r = 65535;
          checks++;
          if (mem[DST + y * N + x] != pix_t'(r)) begin
            failures++;
            $display("FAIL sigma%0d (%0d,%0d) got %0d exp %0d", s + 1, x, y, mem[DST + y * N + x], r);
          end
        end
      checks++;
      if (cyc != 51 * N * N + 1) begin failures++; $display("FAIL cycles %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
