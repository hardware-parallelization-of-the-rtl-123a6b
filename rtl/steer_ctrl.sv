// steer_ctrl: robot response to one analysed test image.
//
// The robot may not drive forward. When the target was found on the left of
// the image it turns left, on the right it turns right, near the centre it
// lights an LED (meaning "would drive forward"), and when no feature matched
// it does nothing. The target's position is the mean x of the matching
// features, compared with the thirds of the image width without a division:
// left when 3*xsum < cnt*IMG_W, right when 3*xsum > 2*cnt*IMG_W.
// The four responses follow the original design; the thirds and the wheel
// pattern are this design's choices: the wheel motors run in one direction
// only, so a left turn runs only the right wheel and a right turn only the
// left wheel. The decision is registered on 'decide' and held until the next.
module steer_ctrl
  import sift_pkg::*;
#(
  parameter int unsigned IMG_W = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        decide,
  input  logic [15:0] match_cnt,
  input  logic [23:0] xsum,
  output steer_t      steer,
  output logic        steer_valid,  // pulse with each new decision
  output logic        wheel_left,
  output logic        wheel_right,
  output logic        led
);
  logic [41:0] lhs, lim_l, lim_r;
  assign lhs   = 42'(xsum) * 42'd3;
  assign lim_l = 42'(match_cnt) * 42'(IMG_W);
  assign lim_r = 42'(match_cnt) * 42'(2 * IMG_W);

  steer_t nxt;
  always_comb begin
    if (match_cnt == 16'd0) nxt = STEER_NONE;
    else if (lhs < lim_l)   nxt = STEER_LEFT;
    else if (lhs > lim_r)   nxt = STEER_RIGHT;
    else                    nxt = STEER_CENTER;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      steer <= STEER_NONE; steer_valid <= 1'b0;
    end else if (en) begin
      steer_valid <= decide;
      if (decide) steer <= nxt;
    end
  end

  assign wheel_left  = (steer == STEER_RIGHT);
  assign wheel_right = (steer == STEER_LEFT);
  assign led         = (steer == STEER_CENTER);
endmodule
