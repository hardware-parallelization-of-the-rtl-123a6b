// keypoint_filter: keypoint localization, i.e. the rejection of weak and
// edge-like feature candidates.
//
// A candidate arrives with the 3x3 neighbourhood of DoG values around it
// (index 4 is the candidate itself). Two tests are applied:
//   * contrast: |D| must lie within [C_LO, C_HI]. |D| is formed by a
//     multiplexer on the sign bit that selects D or -D.
//   * edge: from second differences Dxx, Dyy and the cross difference Dxy the
//     ratio tr^2/det of the 2x2 Hessian is formed with the multi-cycle divider
//     (tr = Dxx + Dyy, det = Dxx*Dyy - Dxy^2). Candidates with det <= 0 or a
//     ratio of EDGE_TH or more lie on an edge and are dropped.
// Survivors are passed on as keypoints on a valid/ready handshake.
//
// The existence of lower and upper contrast bounds, the edge rejection and the
// use of a divider here follow the original design. The bound values, the
// Hessian form of the edge test (Lowe's, here with a curvature ratio limit
// r = 5, so EDGE_TH = (r+1)^2/r = 7.2) and
// the handshakes are this design's choices. rej_contrast and rej_edge pulse
// for one enabled clock per dropped candidate.
// Timing: 1 clock to accept, 1 to test contrast, 49 in the divider, 1 to
// decide, then the time the keypoint waits for kp_ready.
module keypoint_filter
  import sift_pkg::*;
#(
  parameter logic [15:0] C_LO    = 16'd512,    // 2.0 in Q8.8
  parameter logic [15:0] C_HI    = 16'd25600,  // 100.0 in Q8.8
  parameter logic [15:0] EDGE_TH = 16'd1843    // 7.2 in Q8.8, r = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       cand_valid,
  output logic       cand_ready,
  input  logic [7:0] cand_x,
  input  logic [7:0] cand_y,
  input  logic [2:0] cand_intv,
  input  fx_t        cand_nb [9],
  output logic       kp_valid,
  input  logic       kp_ready,
  output logic [7:0] kp_x,
  output logic [7:0] kp_y,
  output logic [2:0] kp_intv,
  output logic       rej_contrast,
  output logic       rej_edge
);
  typedef enum logic [1:0] {IDLE, CHECK, DIVW, OUT} state_t;
  state_t state;

  fx_t nb [9];

  // Hessian terms (Q8.8 for the differences, Q16.16 for the products).
  logic signed [17:0] dxx, dyy, dxy;
  logic signed [18:0] tr;
  logic signed [39:0] tr2, det;
  fx_t                mag;
  always_comb begin
    dxx = 18'(nb[5]) + 18'(nb[3]) - 18'(nb[4]) * 18'sd2;
    dyy = 18'(nb[7]) + 18'(nb[1]) - 18'(nb[4]) * 18'sd2;
    dxy = (18'(nb[8]) - 18'(nb[6]) - 18'(nb[2]) + 18'(nb[0])) >>> 2;
    tr  = 19'(dxx) + 19'(dyy);
    tr2 = 40'(tr) * 40'(tr);
    det = 40'(dxx) * 40'(dyy) - 40'(dxy) * 40'(dxy);
    mag = fx_abs(nb[4]);
  end

  logic               div_start, div_busy, div_done, div_sat;
  logic signed [15:0] div_q;

  fxp_div #(.NW(40), .QW(16), .FRAC(8)) u_div (
    .clk, .rst_n, .en,
    .start(div_start), .num(tr2), .den(det),
    .busy(div_busy), .done(div_done), .q(div_q), .sat(div_sat)
  );

  assign cand_ready = (state == IDLE);
  assign kp_valid   = (state == OUT);
  assign div_start  = (state == CHECK) && !(mag < C_LO || mag > C_HI) && (det > 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; kp_x <= '0; kp_y <= '0; kp_intv <= '0;
      rej_contrast <= 1'b0; rej_edge <= 1'b0;
      for (int i = 0; i < 9; i++) nb[i] <= '0;
    end else if (en) begin
      rej_contrast <= 1'b0;
      rej_edge     <= 1'b0;
      case (state)
        IDLE: if (cand_valid) begin
          for (int i = 0; i < 9; i++) nb[i] <= cand_nb[i];
          kp_x <= cand_x; kp_y <= cand_y; kp_intv <= cand_intv;
          state <= CHECK;
        end
        CHECK: begin
          if (mag < C_LO || mag > C_HI) begin
            rej_contrast <= 1'b1; state <= IDLE;
          end else if (det <= 0) begin
            rej_edge <= 1'b1; state <= IDLE;
          end else state <= DIVW;
        end
        DIVW: if (div_done) begin
          if (div_sat || div_q >= $signed(EDGE_TH)) begin
            rej_edge <= 1'b1; state <= IDLE;
          end else state <= OUT;
        end
        OUT: if (kp_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  a_kp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    en && kp_valid && !kp_ready |=> kp_valid && $stable(kp_x) && $stable(kp_y));
endmodule
