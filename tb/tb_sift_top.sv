// tb_sift_top: end-to-end test of the SIFT engine at its default size.
//
// Runs the whole ROM (two training images, four test images) through the
// engine with every parameter at its default. enable_in is dropped for short
// random stretches throughout, so the engine is stalled many times. Checks:
//   * one steering decision per test image, in order: left, centre, right,
//     nothing (the ROM's test images put the object left, middle and right and
//     leave it out of the last one), and the wheel/LED outputs that go with it;
//   * the training images yield features, the empty image yields none;
//   * every feature lies inside the interior of its octave image and has an
//     interval in 1..3 and an orientation bin below 36;
//   * enable_out stays low until the end and then follows enable_in;
//   * the engine does not advance while enable_in is low;
//   * each mechanism happened: stalls, downsampling, contrast rejection, edge
//     rejection, accepted keypoints, learnt features (all those of the two
//     training images), matches, and each of the
//     four responses.
module tb_sift_top;
  import sift_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, enable_in = 1'b0;
  logic enable_out, wheel_left, wheel_right, led, steer_valid, feat_valid;
  steer_t steer;
  feat_t  feat;
  logic [7:0] img_idx;

  sift_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_down = 0, n_rejc = 0, n_reje = 0, n_kp = 0, n_match = 0;
  int n_feat [6];
  steer_t got [$];
  logic [31:0] cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (!enable_in) n_stall++;
      if (enable_in) begin
        if (dut.ds_done)            n_down++;
        if (dut.rej_contrast)       n_rejc++;
        if (dut.rej_edge)           n_reje++;
        if (dut.kp_valid && dut.kp_ready) n_kp++;
        if (dut.m_match)            n_match++;
        if (feat_valid) begin
          int s;
          s = 32 >> feat.oct;
          n_feat[img_idx]++;
          check(feat.x >= 1 && feat.x <= s - 2 && feat.y >= 1 && feat.y <= s - 2,
                "feature inside octave interior");
          check(feat.intv >= 1 && feat.intv <= 3 && feat.ori < 36, "feature fields");
        end
        if (steer_valid) begin
          got.push_back(steer);
          check(wheel_right == (steer == STEER_LEFT) && wheel_left == (steer == STEER_RIGHT)
                && led == (steer == STEER_CENTER), "robot outputs match decision");
        end
      end
    end
  end

  initial begin
    for (int i = 0; i < 6; i++) n_feat[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!(enable_out)) begin
      @(negedge clk);
      // mostly enabled, with short random pauses
      enable_in = ($urandom % 64) != 0;
      if (!enable_in) begin
        logic [3:0] s0;
        s0 = dut.state;
        @(negedge clk);
        check(dut.state == s0 && !enable_out, "engine frozen while enable_in low");
        enable_in = 1'b1;
      end
    end
    // enable_out follows enable_in once finished
    @(negedge clk) enable_in = 1'b0;
    @(negedge clk);
    check(!enable_out, "enable_out drops with enable_in");
    enable_in = 1'b1;
    @(negedge clk);
    @(negedge clk);
    check(enable_out, "enable_out returns with enable_in");

    $display("features per image: %0d %0d %0d %0d %0d %0d", n_feat[0], n_feat[1], n_feat[2], n_feat[3], n_feat[4], n_feat[5]);
    $display("stalls=%0d downsamples=%0d rej_contrast=%0d rej_edge=%0d keypoints=%0d matches=%0d cycles=%0d",
             n_stall, n_down, n_rejc, n_reje, n_kp, n_match, cyc);
    check(got.size() == 4, "four decisions");
    if (got.size() == 4) begin
      check(got[0] == STEER_LEFT,   "image 2: left");
      check(got[1] == STEER_CENTER, "image 3: centre");
      check(got[2] == STEER_RIGHT,  "image 4: right");
      check(got[3] == STEER_NONE,   "image 5: nothing");
      $display("decisions: %0d %0d %0d %0d", got[0], got[1], got[2], got[3]);
    end
    check(n_feat[0] > 0 && n_feat[1] > 0, "training images have features");
    check(n_feat[5] == 0, "empty image has no features");
    check(n_stall > 0, "mechanism: stall");
    check(n_down == 18, "mechanism: downsampling, 3 per image");
    check(n_rejc > 0, "mechanism: contrast rejection");
    check(n_reje > 0, "mechanism: edge rejection");
    check(n_kp > 0, "mechanism: keypoint accepted");
    check(n_match > 0, "mechanism: feature matched");
    check(int'(dut.n_train) == n_feat[0] + n_feat[1], "features of both training images learnt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
