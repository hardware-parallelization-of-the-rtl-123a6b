// tb_steer_ctrl: random match counts and x sums; the decision must be nothing
// for no match, else left / centre / right by which third of the 32-pixel
// width the mean x falls in (computed here with real division), with the
// right wheel for a left turn, the left wheel for a right turn and the LED for
// the centre. The decision must hold while 'decide' is low.
module tb_steer_ctrl;
  import sift_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, decide = 1'b0;
  logic [15:0] match_cnt = '0;
  logic [23:0] xsum = '0;
  steer_t steer;
  logic steer_valid, wheel_left, wheel_right, led;
  int checks = 0, failures = 0;
  int seen [4];

  steer_ctrl #(.IMG_W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    steer_t exp;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      real mean;
      match_cnt = 16'($urandom % 6);
      xsum = 24'(0);
      for (int k = 0; k < match_cnt; k++) xsum += 24'($urandom % 32);
      decide = 1'b1;
      @(negedge clk);
      decide = 1'b0;
      if (match_cnt == 0) exp = STEER_NONE;
      else begin
        mean = real'(xsum) / real'(match_cnt);
        if (mean < 32.0 / 3.0)            exp = STEER_LEFT;
        else if (mean > 64.0 / 3.0)       exp = STEER_RIGHT;
        else                              exp = STEER_CENTER;
      end
      seen[exp]++;
      checks++;
      if (steer != exp || !steer_valid) begin failures++; $display("FAIL decision %0d for %0d/%0d", steer, xsum, match_cnt); end
      checks++;
      if (wheel_right != (exp == STEER_LEFT) || wheel_left != (exp == STEER_RIGHT) || led != (exp == STEER_CENTER)) begin
        failures++; $display("FAIL outputs");
      end
      match_cnt = 16'd0;
      @(negedge clk);
      checks++;
      if (steer != exp || steer_valid) begin failures++; $display("FAIL hold"); end
    end
    for (int k = 0; k < 4; k++) begin checks++; if (seen[k] == 0) begin failures++; $display("FAIL never %0d", k); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
