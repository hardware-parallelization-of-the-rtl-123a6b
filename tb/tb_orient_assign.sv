// tb_orient_assign: Gauss images that are linear ramps, L = 128 + g*(cos t,
// sin t).(x, y), have the same gradient direction t everywhere, so the
// dominant orientation must be the 10-degree bin that holds t. Directions in
// the middle of bins all around the circle are tried, keypoints are placed in
// the interior and next to the border (where window points are skipped), and
// the emitted feature record must carry the keypoint's fields.
// Random images (full-scale pixel values, so gradients reach their limits)
// are then checked against a reference model of the histogram written here
// from the formulas: approximate magnitude, Gaussian window weight, polynomial
// arctangent, bin index and first-largest peak. The same model without the
// weight is also run, and at least one image must come out differently
// without it, so the weighting is known to have been exercised.
module tb_orient_assign;
  import sift_pkg::*;
  localparam int AW = 13, N = 16, GB = 700;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, kp_valid = 1'b0;
  logic kp_ready, busy, feat_valid;
  logic [7:0] kp_x = '0, kp_y = '0;
  logic [2:0] kp_intv = '0, oct = '0;
  logic [AW-1:0] rd_addr;
  pix_t rd_data;
  feat_t feat;
  pix_t mem [8192];
  int checks = 0, failures = 0;

  orient_assign #(.AW(AW), .NB(36), .WR(2)) dut (.clk, .rst_n, .en, .kp_valid,
    .kp_ready, .kp_x, .kp_y, .kp_intv, .g_base(AW'(GB)), .size(8'(N)), .oct,
    .busy, .rd_addr, .rd_data, .feat_valid, .feat);

  always #5 clk = ~clk;
  always @(posedge clk) if (en) rd_data <= mem[rd_addr];

  // Reference orientation of the keypoint at (x, y) in the image at GB.
  function automatic int ref_ori(input int x, input int y, input bit weighted);
    longint hist [36];
    longint dx, dy, ax, ay, mx, mn, mag, t, w, z, c, t1, t2, th, bn, best;
    int u, v, bi;
    bit steep;
    for (int i = 0; i < 36; i++) hist[i] = 0;
    for (int wy = -2; wy <= 2; wy++)
      for (int wx = -2; wx <= 2; wx++) begin
        u = x + wx; v = y + wy;
        if (u < 1 || v < 1 || u > N - 2 || v > N - 2) continue;
        dx = longint'(mem[GB + v * N + u + 1]) - longint'(mem[GB + v * N + u - 1]);
        dy = longint'(mem[GB + (v + 1) * N + u]) - longint'(mem[GB + (v - 1) * N + u]);
        ax = dx < 0 ? -dx : dx;
        ay = dy < 0 ? -dy : dy;
        steep = ay > ax;
        mx = steep ? ay : ax;
        mn = steep ? ax : ay;
        if (mx == 0) continue;
        mag = (246 * mx + 102 * mn) / 256;
        t = longint'(wx * wx + wy * wy) * 32;
        w = 256 - t + (t * t) / 512 - (t * t * t) / 393216;
        if (weighted) mag = (mag * w) / 256;
        z = (mn * 256) / mx;
        c = 3589 + (973 * z) / 256;
        t1 = (z * (256 - z)) / 256;
        t2 = (t1 * c) / 256;
        th = 45 * z + t2;
        if (steep) th = 90 * 256 - th;
        if (dx < 0) th = 180 * 256 - th;
        if (dy < 0 && th != 0) th = 360 * 256 - th;
        bn = (th * 6554) / (longint'(1) << 24);
        if (bn >= 36) bn = 0;
        hist[bn] += mag;
      end
    best = 0; bi = 0;
    for (int i = 0; i < 36; i++) if (hist[i] > best) begin best = hist[i]; bi = i; end
    return bi;
  endfunction

  int n_wdiff = 0;

  task automatic rnd(input int x, input int y);
    int got, exp_o;
    for (int i = 0; i < N * N; i++)
      mem[GB + i] = ($urandom % 4 == 0) ? pix_t'($urandom) : pix_t'(16'h8000 + ($urandom % 16'h1000));
    exp_o = ref_ori(x, y, 1'b1);
    if (exp_o != ref_ori(x, y, 1'b0)) n_wdiff++;
    @(negedge clk);
    kp_x = 8'(x); kp_y = 8'(y); kp_intv = 3'd1; oct = 3'd0;
    kp_valid = 1'b1;
    while (!kp_ready) @(negedge clk);
    @(negedge clk); kp_valid = 1'b0;
    got = 0;
    for (int c = 0; c < 5000 && !got; c++) begin
      @(negedge clk);
      if (feat_valid) got = 1;
    end
    checks++;
    if (!got) begin failures++; $display("FAIL no feature (random)"); return; end
    checks++;
    if (int'(feat.ori) != exp_o) begin failures++; $display("FAIL random image: bin %0d exp %0d", feat.ori, exp_o); end
  endtask

  task automatic one(input int deg, input int x, input int y);
    real t;
    int got;
    t = real'(deg) * 3.14159265358979 / 180.0;
    for (int v = 0; v < N; v++)
      for (int u = 0; u < N; u++)
        mem[GB + v * N + u] = pix_t'($rtoi((128.0 + 5.0 * ($cos(t) * u + $sin(t) * v)) * 256.0));
    @(negedge clk);
    kp_x = 8'(x); kp_y = 8'(y); kp_intv = 3'($urandom % 3 + 1); oct = 3'($urandom % 4);
    kp_valid = 1'b1;
    while (!kp_ready) @(negedge clk);
    @(negedge clk); kp_valid = 1'b0;
    got = 0;
    for (int c = 0; c < 5000 && !got; c++) begin
      en = ($urandom % 6) != 0;
      @(negedge clk);
      if (feat_valid && en) got = 1;
      else if (feat_valid) got = 1;
    end
    en = 1'b1;
    checks++;
    if (!got) begin failures++; $display("FAIL no feature"); return; end
    checks++;
    if (int'(feat.ori) != deg / 10) begin failures++; $display("FAIL %0d deg: bin %0d exp %0d", deg, feat.ori, deg / 10); end
    checks++;
    if (feat.x != kp_x || feat.y != kp_y || feat.intv != kp_intv || feat.oct != oct) begin
      failures++; $display("FAIL record fields");
    end
  endtask

  initial begin
    rd_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 5; d < 360; d += 10) one(d, 7, 8);
    for (int d = 5; d < 360; d += 40) one(d, 1, 14);
    for (int k = 0; k < 20; k++) one(10 * int'($urandom % 36) + 3 + int'($urandom % 5), 2 + int'($urandom % 12), 2 + int'($urandom % 12));
    for (int k = 0; k < 60; k++) rnd(1 + int'($urandom % 14), 1 + int'($urandom % 14));
    checks++;
    if (n_wdiff == 0) begin failures++; $display("FAIL window weighting never changed an orientation"); end
    $display("weighting changed the orientation in %0d of 60 random images", n_wdiff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
