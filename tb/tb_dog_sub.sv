// tb_dog_sub: six random 8x8 interval images (some pixel pairs forced to the
// extremes so the difference saturates) are turned into five DoG images;
// every value must equal G_k - G_{k+1} clamped to signed 16 bits, and the run
// must take 3 clocks per pixel per DoG image.
module tb_dog_sub;
  import sift_pkg::*;
  localparam int AW = 13, N = 8, GB = 300, DB = 4000;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, start = 1'b0;
  logic busy, done, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  pix_t rd_data;
  fx_t  wr_data;
  pix_t gmem [8192];
  fx_t  dmem [8192];
  int checks = 0, failures = 0, nsat = 0;

  dog_sub #(.AW(AW), .NDOG(5)) dut (.clk, .rst_n, .en, .start, .g_base(AW'(GB)),
    .d_base(AW'(DB)), .size(8'(N)), .busy, .done, .rd_addr, .rd_data, .wr_en,
    .wr_addr, .wr_data);

  always #5 clk = ~clk;
  always @(posedge clk) if (en) begin
    rd_data <= gmem[rd_addr];
    if (wr_en) dmem[wr_addr] <= wr_data;
  end

  initial begin
    int cyc;
    rd_data = '0;
    for (int i = 0; i < 6 * N * N; i++) gmem[GB + i] = pix_t'($urandom);
    for (int i = 0; i < N * N; i += 7) begin
      gmem[GB + i] = 16'hFFFF; gmem[GB + N * N + i] = 16'h0000;
      gmem[GB + 2 * N * N + i + 1] = 16'h0000;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0; cyc = 1;
    while (!done) begin
      en = ($urandom % 6) != 0;
      @(negedge clk);
      if (en) cyc++;
    end
    en = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 5; k++)
      for (int p = 0; p < N * N; p++) begin
        int d;
        d = int'(gmem[GB + k * N * N + p]) - int'(gmem[GB + (k + 1) * N * N + p]);
        if (d > 32767) begin d = 32767; nsat++; end
        if (d < -32768) begin d = -32768; nsat++; end
        checks++;
        if (dmem[DB + k * N * N + p] != fx_t'(d)) begin
          failures++; $display("FAIL k%0d p%0d got %0d exp %0d", k, p, dmem[DB + k * N * N + p], d);
        end
      end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL no saturation exercised"); end
    checks++;
    if (cyc != 3 * N * N * 5 + 1) begin failures++; $display("FAIL cycles %0d", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
