// tb_keypoint_filter: feeds hand-made and random 3x3 DoG neighbourhoods and
// checks, for each, whether it is passed on or dropped, and for which reason:
// contrast outside [2.0, 100.0], det <= 0, or tr^2/det (computed here with
// integer arithmetic) of 7.2 or more. kp_ready is withheld at random.
module tb_keypoint_filter;
  import sift_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic cand_valid = 1'b0, cand_ready, kp_valid, kp_ready = 1'b0;
  logic [7:0] cand_x = '0, cand_y = '0, kp_x, kp_y;
  logic [2:0] cand_intv = '0, kp_intv;
  fx_t cand_nb [9];
  logic rej_contrast, rej_edge;
  int checks = 0, failures = 0;
  int n_pass = 0, n_c = 0, n_e = 0;

  keypoint_filter dut (.*);
  always #5 clk = ~clk;

  // 0: pass, 1: contrast, 2: edge
  function automatic int expect_of(input int nb [9]);
    longint dxx, dyy, dxy, tr, det, a;
    a = nb[4] < 0 ? -nb[4] : nb[4];
    if (a < 512 || a > 25600) return 1;
    dxx = nb[5] + nb[3] - 2 * nb[4];
    dyy = nb[7] + nb[1] - 2 * nb[4];
    dxy = (nb[8] - nb[6] - nb[2] + nb[0]) >>> 2;
    tr = dxx + dyy;
    det = dxx * dyy - dxy * dxy;
    if (det <= 0) return 2;
    if ((tr * tr * 256) / det >= 1843) return 2;
    return 0;
  endfunction

  task automatic one(input int nb [9]);
    int e, got;
    e = expect_of(nb);
    @(negedge clk);
    for (int i = 0; i < 9; i++) cand_nb[i] = fx_t'(nb[i]);
    cand_x = 8'($urandom); cand_y = 8'($urandom); cand_intv = 3'($urandom);
    cand_valid = 1'b1;
    while (!cand_ready) @(negedge clk);
    @(negedge clk); cand_valid = 1'b0;
    got = -1;
    for (int t = 0; t < 200 && got < 0; t++) begin
      kp_ready = ($urandom % 2) == 0;
      if (rej_contrast) got = 1;
      else if (rej_edge) got = 2;
      else if (kp_valid && kp_ready) begin
        got = 0;
        checks++;
        if (kp_x != cand_x || kp_y != cand_y || kp_intv != cand_intv) begin failures++; $display("FAIL fields"); end
      end
      @(negedge clk);
    end
    kp_ready = 1'b0;
    checks++;
    if (got != e) begin failures++; $display("FAIL got %0d exp %0d (centre %0d)", got, e, nb[4]); end
    case (e) 0: n_pass++; 1: n_c++; default: n_e++; endcase
  endtask

  initial begin
    int nb [9];
    for (int i = 0; i < 9; i++) cand_nb[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // round peak: passes
    nb = '{1000, 1500, 1000, 1500, 3000, 1500, 1000, 1500, 1000}; one(nb);
    // weak peak: contrast
    nb = '{100, 200, 100, 200, 300, 200, 100, 200, 100}; one(nb);
    // too strong: contrast (upper bound)
    nb = '{20000, 25000, 20000, 25000, 26000, 25000, 20000, 25000, 20000}; one(nb);
    // ridge along x: edge
    nb = '{1000, 1000, 1000, 2950, 3000, 2950, 1000, 1000, 1000}; one(nb);
    // saddle: det < 0 -> edge
    nb = '{2000, 1000, 2000, 4000, 3000, 4000, 2000, 1000, 2000}; one(nb);
    // negative pit: passes
    nb = '{-1000, -1500, -1000, -1500, -3000, -1500, -1000, -1500, -1000}; one(nb);
    for (int k = 0; k < 400; k++) begin
      int c;
      c = int'($urandom % 8000) - 4000;
      for (int i = 0; i < 9; i++) nb[i] = c - (c > 0 ? 1 : -1) * int'($urandom % 3000);
      nb[4] = c;
      one(nb);
    end
    checks++;
    if (n_pass == 0 || n_c == 0 || n_e == 0) begin failures++; $display("FAIL coverage %0d %0d %0d", n_pass, n_c, n_e); end
    $display("pass=%0d contrast=%0d edge=%0d", n_pass, n_c, n_e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
