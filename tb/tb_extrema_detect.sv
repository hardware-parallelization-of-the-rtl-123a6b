// tb_extrema_detect: a random 5-image DoG volume (values from a small range,
// so that ties occur, plus a few planted peaks and pits) is scanned. The
// list of candidates must equal, in order, the list found here by brute force
// (strictly above or below all 26 neighbours, intervals 1..3, interior
// pixels), each with the right 3x3 neighbourhood. cand_ready is held low at
// random to check that the scan waits and the offer stays stable.
module tb_extrema_detect;
  import sift_pkg::*;
  localparam int AW = 13, N = 8, DB = 500;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, start = 1'b0, cand_ready = 1'b0;
  logic busy, done, cand_valid;
  logic [AW-1:0] rd_addr;
  fx_t rd_data;
  logic [7:0] cand_x, cand_y;
  logic [2:0] cand_intv;
  fx_t cand_nb [9];
  fx_t mem [8192];
  int checks = 0, failures = 0, stalls = 0;
  int ex_x [$], ex_y [$], ex_d [$];

  extrema_detect #(.AW(AW), .NDOG(5)) dut (.clk, .rst_n, .en, .start,
    .d_base(AW'(DB)), .size(8'(N)), .busy, .done, .rd_addr, .rd_data,
    .cand_valid, .cand_ready, .cand_x, .cand_y, .cand_intv, .cand_nb);

  always #5 clk = ~clk;
  always @(posedge clk) if (en) rd_data <= mem[rd_addr];

  function automatic fx_t at(input int d, input int x, input int y);
    return mem[DB + d * N * N + y * N + x];
  endfunction

  // checker: every accepted candidate is compared with the expected list
  always @(posedge clk) if (rst_n && en && cand_valid) begin
    if (!cand_ready) stalls++;
    else begin
      checks++;
      if (ex_x.size() == 0) begin failures++; $display("FAIL unexpected candidate"); end
      else begin
        int ex, ey, ed;
        ex = ex_x.pop_front(); ey = ex_y.pop_front(); ed = ex_d.pop_front();
        if (cand_x != 8'(ex) || cand_y != 8'(ey) || cand_intv != 3'(ed)) begin
          failures++; $display("FAIL cand (%0d,%0d,%0d) exp (%0d,%0d,%0d)", cand_x, cand_y, cand_intv, ex, ey, ed);
        end
        for (int i = 0; i < 9; i++) begin
          checks++;
          if (cand_nb[i] != at(ed, ex + i % 3 - 1, ey + i / 3 - 1)) begin failures++; $display("FAIL nb"); end
        end
      end
    end
  end

  initial begin
    rd_data = '0;
    for (int i = 0; i < 5 * N * N; i++) mem[DB + i] = fx_t'($signed(3'($urandom)) * 100);
    mem[DB + 2 * N * N + 3 * N + 4] = 16'sd5000;
    mem[DB + 1 * N * N + 5 * N + 2] = -16'sd5000;
    mem[DB + 3 * N * N + 6 * N + 6] = 16'sd4000;
    for (int d = 1; d <= 3; d++)
      for (int y = 1; y < N - 1; y++)
        for (int x = 1; x < N - 1; x++) begin
          bit mx, mn;
          mx = 1; mn = 1;
          for (int dz = -1; dz <= 1; dz++) for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++)
            if (dz != 0 || dy != 0 || dx != 0) begin
              if (!(at(d, x, y) > at(d + dz, x + dx, y + dy))) mx = 0;
              if (!(at(d, x, y) < at(d + dz, x + dx, y + dy))) mn = 0;
            end
          if (mx || mn) begin ex_x.push_back(x); ex_y.push_back(y); ex_d.push_back(d); end
        end
    $display("expected candidates: %0d", ex_x.size());
    checks++;
    if (ex_x.size() < 3) begin failures++; $display("FAIL test volume has too few extrema"); end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) begin
      cand_ready = ($urandom % 3) == 0;
      en = ($urandom % 8) != 0;
      @(negedge clk);
    end
    checks++;
    if (ex_x.size() != 0) begin failures++; $display("FAIL %0d candidates missed", ex_x.size()); end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL backpressure never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
