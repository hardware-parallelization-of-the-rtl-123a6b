// orient_assign: dominant orientation of a keypoint.
//
// Over the (2*WR+1)^2 window around the keypoint, in the Gauss image of the
// keypoint's interval, the unit forms at every point the central-difference
// gradient dx = L(u+1,v) - L(u-1,v), dy = L(u,v+1) - L(u,v-1) (four RAM
// reads), its magnitude and its direction, and adds the magnitude to one of NB
// direction bins of a histogram. The bin with the largest sum is the keypoint's
// orientation. The result is emitted as a complete feature record.
//
// Square root and arctangent have no direct hardware form, so both are
// replaced by low-order polynomials, evaluated with multipliers and adders:
//   * |g| ~= 0.961*max(|dx|,|dy|) + 0.398*min(|dx|,|dy|)   (first order)
//   * atan(z) ~= 45*z + z*(1-z)*(14.02 + 3.80*z) degrees, z = min/max in
//     [0,1], computed with the multi-cycle divider; the octant is then
//     restored from which component is larger and from the signs.
// The histogram analysis and the polynomial approximations follow the original
// design; the window radius, the bin count (36 bins of 10 degrees as in
// Lowe's method), and the polynomial coefficients are
// this design's choices. Each magnitude is weighted by a Gaussian of the
// distance from the keypoint, exp(-r^2 / (2 WR^2)), again from a cubic
// polynomial (1 - t + t^2/2 - t^3/6); the weighting is Lowe's, the sigma of
// WR pixels is this design's choice. Window points whose gradient would need
// a pixel outside the image are skipped.
//
// Interface: accepts a keypoint on kp_valid/kp_ready together with g_base
// (first word of the keypoint's Gauss image), size and oct; owns the RAM read
// port while busy; pulses feat_valid with the feature. Timing: about 35
// enabled clocks per window point (4 reads, the 26-clock divider, a few
// arithmetic steps) plus NB clocks for the peak search.
module orient_assign
  import sift_pkg::*;
#(
  parameter int unsigned AW = 13,
  parameter int unsigned NB = 36,
  parameter int unsigned WR = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          kp_valid,
  output logic          kp_ready,
  input  logic [7:0]    kp_x,
  input  logic [7:0]    kp_y,
  input  logic [2:0]    kp_intv,
  input  logic [AW-1:0] g_base,
  input  logic [7:0]    size,
  input  logic [2:0]    oct,
  output logic          busy,
  output logic [AW-1:0] rd_addr,
  input  pix_t          rd_data,
  output logic          feat_valid,
  output feat_t         feat
);
  localparam int unsigned RECIP = (NB * 65536 + 359) / 360;   // NB/360 in Q.16
  localparam int          W     = int'(WR);

  typedef enum logic [3:0] {IDLE, POINT, RD, DRAIN, GRAD, DIVW, ANGLE, BIN, PEAK, EMIT} state_t;
  state_t state;

  logic [AW-1:0]     gb_r;
  logic [7:0]        sz_r, kx, ky;
  logic [2:0]        ki, ko;
  logic signed [4:0] wx, wy;             // window offset
  logic [1:0]        k, k_d;             // read index
  logic              vld_d;
  pix_t              g [4];              // right, left, below, above
  logic [23:0]       hist [NB];

  // Current window point.
  logic signed [9:0] u, v;
  assign u = $signed({2'b00, kx}) + 10'(wx);
  assign v = $signed({2'b00, ky}) + 10'(wy);
  logic in_img;
  assign in_img = (u >= 10'sd1) && (v >= 10'sd1) &&
                  (u <= $signed({2'b00, sz_r}) - 10'sd2) &&
                  (v <= $signed({2'b00, sz_r}) - 10'sd2);

  logic [7:0] ru, rv;
  always_comb begin
    ru = u[7:0]; rv = v[7:0];
    case (k)
      2'd0: ru = u[7:0] + 8'd1;
      2'd1: ru = u[7:0] - 8'd1;
      2'd2: rv = v[7:0] + 8'd1;
      default: rv = v[7:0] - 8'd1;
    endcase
  end
  assign rd_addr = gb_r + AW'(rv) * AW'(sz_r) + AW'(ru);

  // Gradient.
  logic signed [16:0] dx, dy;
  logic [15:0]        ax, ay, mx, mn;
  assign dx = $signed({1'b0, g[0]}) - $signed({1'b0, g[1]});
  assign dy = $signed({1'b0, g[2]}) - $signed({1'b0, g[3]});
  assign ax = 16'(dx[16] ? -dx : dx);
  assign ay = 16'(dy[16] ? -dy : dy);
  assign mx = (ay > ax) ? ay : ax;
  assign mn = (ay > ax) ? ax : ay;

  // Registered gradient facts for the angle step.
  logic        steep, xneg, yneg;
  logic [23:0] mag_r;

  // Divider for z = min/max.
  logic               div_start, div_busy, div_done, div_sat;
  logic signed [15:0] div_q;
  fxp_div #(.NW(17), .QW(16), .FRAC(8)) u_div (
    .clk, .rst_n, .en,
    .start(div_start), .num({1'b0, mn}), .den({1'b0, mx}),
    .busy(div_busy), .done(div_done), .q(div_q), .sat(div_sat)
  );
  assign div_start = (state == GRAD) && (mx != 16'd0);

  // Gaussian window weight exp(-r^2 / (2 WR^2)) in Q0.8, r^2 = wx^2 + wy^2,
  // from the cubic polynomial 1 - t + t^2/2 - t^3/6 with t = r^2/(2 WR^2) <= 1.
  localparam int unsigned TSC = 128 / (WR * WR);          // 256 / (2 WR^2)
  logic [31:0] wt_t, wt;
  always_comb begin
    wt_t = 32'(int'(wx) * int'(wx) + int'(wy) * int'(wy)) * 32'(TSC);
    wt   = 32'd256 - wt_t + ((wt_t * wt_t) >> 9) - ((wt_t * wt_t * wt_t) / 32'd393216);
  end

  // Polynomial arctangent in Q8.8 degrees.
  logic [15:0] z_r;
  logic [31:0] c, t1, t2, th0, th1, th2, th;
  always_comb begin
    c   = 32'd3589 + ((32'd973 * 32'(z_r)) >> 8);           // 14.02 + 3.80 z
    t1  = (32'(z_r) * (32'd256 - 32'(z_r))) >> 8;           // z (1 - z)
    t2  = (t1 * c) >> 8;
    th0 = 32'd45 * 32'(z_r) + t2;                           // first octant
    th1 = steep ? (32'd90 * 32'd256 - th0) : th0;
    th2 = xneg  ? (32'd180 * 32'd256 - th1) : th1;
    th  = (yneg && th2 != 0) ? (32'd360 * 32'd256 - th2) : th2;
  end
  logic [47:0] bin_w;
  logic [5:0]  bin;
  assign bin_w = (48'(th) * 48'(RECIP)) >> 24;
  assign bin   = (bin_w >= 48'(NB)) ? 6'd0 : 6'(bin_w);

  // Peak search.
  logic [5:0]  pi_, best_i;
  logic [23:0] best;

  assign kp_ready = (state == IDLE);
  assign busy     = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; gb_r <= '0; sz_r <= '0; kx <= '0; ky <= '0; ki <= '0; ko <= '0;
      wx <= '0; wy <= '0; k <= '0; k_d <= '0; vld_d <= 1'b0;
      for (int i = 0; i < 4; i++) g[i] <= '0;
      for (int i = 0; i < int'(NB); i++) hist[i] <= '0;
      steep <= 1'b0; xneg <= 1'b0; yneg <= 1'b0; mag_r <= '0; z_r <= '0;
      pi_ <= '0; best_i <= '0; best <= '0;
      feat_valid <= 1'b0; feat <= '0;
    end else if (en) begin
      feat_valid <= 1'b0;
      vld_d      <= 1'b0;
      if (vld_d) g[k_d] <= rd_data;
      case (state)
        IDLE: if (kp_valid) begin
          gb_r <= g_base; sz_r <= size; kx <= kp_x; ky <= kp_y; ki <= kp_intv; ko <= oct;
          wx <= 5'(-W); wy <= 5'(-W);
          for (int i = 0; i < int'(NB); i++) hist[i] <= '0;
          state <= POINT;
        end
        POINT: begin
          k <= '0;
          if (in_img) state <= RD;
          else state <= BIN;                 // skip: no contribution
        end
        RD: begin
          vld_d <= 1'b1; k_d <= k; k <= k + 2'd1;
          if (k == 2'd3) state <= DRAIN;
        end
        DRAIN: state <= GRAD;
        GRAD: begin
          steep <= ay > ax; xneg <= dx[16]; yneg <= dy[16];
          mag_r <= 24'((((32'd246 * 32'(mx) + 32'd102 * 32'(mn)) >> 8) * wt) >> 8);
          if (mx != 16'd0) state <= DIVW;
          else state <= BIN;                 // zero gradient adds nothing
        end
        DIVW: if (div_done) begin
          z_r   <= div_q[15:0];
          state <= ANGLE;
        end
        ANGLE: begin
          hist[bin] <= hist[bin] + mag_r;
          state <= BIN;
        end
        BIN: begin                           // advance to the next window point
          if (wx == 5'(W)) begin
            wx <= 5'(-W);
            if (wy == 5'(W)) begin
              pi_ <= '0; best <= '0; best_i <= '0;
              state <= PEAK;
            end else begin
              wy <= wy + 5'sd1; state <= POINT;
            end
          end else begin
            wx <= wx + 5'sd1; state <= POINT;
          end
        end
        PEAK: begin
          if (hist[pi_] > best) begin best <= hist[pi_]; best_i <= pi_; end
          if (pi_ == 6'(NB - 1)) state <= EMIT;
          else pi_ <= pi_ + 6'd1;
        end
        EMIT: begin
          feat_valid <= 1'b1;
          feat <= '{x: kx, y: ky, oct: ko, intv: ki, ori: best_i};
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
