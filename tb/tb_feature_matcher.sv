// tb_feature_matcher: learns a random training set (more features than the
// table holds, so the overflow is exercised), then streams random test
// features and compares the match count and x sum with a reference that
// applies the rule directly: same octave and interval, orientation bins at
// most one apart on the 36-bin circle. The image sequence is train, train,
// test, test, train, test, test: the first two training images must add up
// in one table (the second overflows it), and the third, starting a new
// series, must replace it.
module tb_feature_matcher;
  import sift_pkg::*;
  localparam int MT = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, img_start = 1'b0, train = 1'b0, feat_valid = 1'b0;
  feat_t feat;
  logic [3:0] n_train;
  logic train_drop, match;
  logic [15:0] feat_cnt, match_cnt;
  logic [23:0] xsum;
  int checks = 0, failures = 0, drops = 0, exp_drops = 0;
  bit prev_tr = 1'b0;
  feat_t tset [$];

  feature_matcher #(.MAX_TRAIN(MT), .NB(36)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && train_drop) drops++;

  function automatic feat_t rnd();
    feat_t f;
    f.x = 8'($urandom % 32); f.y = 8'($urandom % 32);
    f.oct = 3'($urandom % 2); f.intv = 3'($urandom % 2 + 1); f.ori = 6'($urandom % 36);
    return f;
  endfunction

  initial begin
    feat = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int img = 0; img < 7; img++) begin
      int n, ecnt, exsum, nm;
      bit tr;
      tr = (img == 0 || img == 1 || img == 4);
      @(negedge clk); train = tr; img_start = 1'b1;
      @(negedge clk); img_start = 1'b0;
      if (tr && !prev_tr) tset.delete();
      prev_tr = tr;
      n = !tr ? 60 : (img == 0) ? MT / 2 : MT + 3;
      ecnt = 0; exsum = 0; nm = 0;
      for (int i = 0; i < n; i++) begin
        feat_t f;
        f = rnd();
        if (!tr && tset.size() > 0 && ($urandom % 3 == 0)) begin
          f = tset[$urandom % tset.size()];
          f.ori = 6'((int'(f.ori) + 36 + int'($urandom % 3) - 1) % 36);
          f.x = 8'($urandom % 32);
        end
        if (tr && i < 2) f.ori = (i == 0) ? 6'd0 : 6'd35;   // neighbours across the wrap
        if (tr) begin if (tset.size() < MT) tset.push_back(f); else exp_drops++; end
        else begin
          bit hit;
          hit = 0;
          foreach (tset[k]) begin
            int d;
            d = int'(tset[k].ori) - int'(f.ori); if (d < 0) d = -d;
            if (tset[k].oct == f.oct && tset[k].intv == f.intv && (d <= 1 || d >= 35)) hit = 1;
          end
          if (hit) begin ecnt++; exsum += int'(f.x) << f.oct; end
        end
        feat = f; feat_valid = 1'b1;
        @(negedge clk);
        feat_valid = 1'b0;
        if (($urandom % 2) == 0) @(negedge clk);
      end
      @(negedge clk);
      checks++;
      if (feat_cnt != 16'(n)) begin failures++; $display("FAIL feat_cnt"); end
      if (tr) begin
        checks++;
        if (n_train != 4'(tset.size())) begin failures++; $display("FAIL n_train %0d", n_train); end
      end else begin
        checks++;
        if (match_cnt != 16'(ecnt) || xsum != 24'(exsum)) begin
          failures++; $display("FAIL img %0d match %0d/%0d exp %0d/%0d", img, match_cnt, xsum, ecnt, exsum);
        end
        checks++;
        if (ecnt == 0) begin failures++; $display("FAIL no matches exercised"); end
      end
    end
    checks++;
    if (drops != exp_drops || exp_drops == 0) begin failures++; $display("FAIL drops %0d", drops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
