// extrema_detect: scale-space extrema of one Difference-of-Gauss octave.
//
// The DoG images of an octave form a 3D volume in x, y and interval. For every
// interior DoG interval (1 .. NDOG-2) and every pixel not on the image border
// the unit reads the 3x3x3 cube around it (27 words, one per enabled clock)
// and flags the pixel as a feature candidate when it is strictly greater than,
// or strictly less than, all 26 other values of the cube. The 27 comparisons
// are made in parallel in one clock. A candidate is offered on a valid/ready
// handshake together with its 3x3 neighbourhood in its own DoG image, which
// the keypoint filter needs for its contrast and edge tests; the scan waits
// while the candidate is not accepted.
//
// The 3x3x3 neighbourhood follows the original design; the strict comparison,
// the border exclusion and the scan order (interval, row, column) are this
// design's choices. Timing: 29 enabled clocks per examined pixel plus the time
// a candidate waits for cand_ready.
module extrema_detect
  import sift_pkg::*;
#(
  parameter int unsigned AW   = 13,
  parameter int unsigned NDOG = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             start,
  input  logic [AW-1:0]    d_base,
  input  logic [7:0]       size,
  output logic             busy,
  output logic             done,
  output logic [AW-1:0]    rd_addr,
  input  fx_t              rd_data,
  output logic             cand_valid,
  input  logic             cand_ready,
  output logic [7:0]       cand_x,
  output logic [7:0]       cand_y,
  output logic [2:0]       cand_intv,
  output fx_t              cand_nb [9]   // 3x3 in its DoG image, row-major
);
  typedef enum logic [2:0] {IDLE, TAPS, DRAIN, CMP, OFFER} state_t;
  state_t state;

  logic [AW-1:0]     db_r, npix;
  logic [7:0]        sz_r, px, py;
  logic [2:0]        pd;
  logic signed [2:0] tx, ty, tz;
  logic [4:0]        t, t_d;
  logic              vld_d;
  fx_t               cube [27];

  assign rd_addr = db_r + AW'(4'(signed'({1'b0, pd}) + tz)) * npix
                 + AW'(8'(signed'({1'b0, py}) + ty)) * AW'(sz_r)
                 + AW'(8'(signed'({1'b0, px}) + tx));

  // All 26 comparisons against the centre at once.
  logic is_max, is_min;
  always_comb begin
    is_max = 1'b1;
    is_min = 1'b1;
    for (int i = 0; i < 27; i++) begin
      if (i != 13) begin
        if (!(cube[13] > cube[i])) is_max = 1'b0;
        if (!(cube[13] < cube[i])) is_min = 1'b0;
      end
    end
  end

  always_comb
    for (int i = 0; i < 9; i++) cand_nb[i] = cube[9 + i];

  assign cand_valid = (state == OFFER);
  assign cand_x     = px;
  assign cand_y     = py;
  assign cand_intv  = pd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; busy <= 1'b0; done <= 1'b0;
      db_r <= '0; npix <= '0; sz_r <= '0; px <= '0; py <= '0; pd <= '0;
      tx <= '0; ty <= '0; tz <= '0; t <= '0; t_d <= '0; vld_d <= 1'b0;
      for (int i = 0; i < 27; i++) cube[i] <= '0;
    end else if (en) begin
      done  <= 1'b0;
      vld_d <= 1'b0;
      if (vld_d) cube[t_d] <= rd_data;
      case (state)
        IDLE: if (start) begin
          db_r <= d_base; sz_r <= size; npix <= AW'(size) * AW'(size);
          pd <= 3'd1; py <= 8'd1; px <= 8'd1;
          tx <= -3'sd1; ty <= -3'sd1; tz <= -3'sd1; t <= '0;
          busy <= 1'b1;
          state <= (size >= 8'd3) ? TAPS : IDLE;
          if (size < 8'd3) begin busy <= 1'b0; done <= 1'b1; end
        end
        TAPS: begin
          vld_d <= 1'b1;
          t_d   <= t;
          t     <= t + 5'd1;
          if (tx == 3'sd1) begin
            tx <= -3'sd1;
            if (ty == 3'sd1) begin
              ty <= -3'sd1;
              if (tz == 3'sd1) begin
                tz <= -3'sd1;
                state <= DRAIN;
              end else tz <= tz + 3'sd1;
            end else ty <= ty + 3'sd1;
          end else tx <= tx + 3'sd1;
        end
        DRAIN: state <= CMP;
        CMP, OFFER: begin
          if (state == CMP && (is_max || is_min)) begin
            state <= OFFER;
          end else if (state == CMP || cand_ready) begin
            // advance to the next pixel
            t <= '0;
            state <= TAPS;
            if (px == sz_r - 8'd2) begin
              px <= 8'd1;
              if (py == sz_r - 8'd2) begin
                py <= 8'd1;
                if (pd == 3'(NDOG - 2)) begin
                  busy <= 1'b0; done <= 1'b1; state <= IDLE;
                end else pd <= pd + 3'd1;
              end else py <= py + 8'd1;
            end else px <= px + 8'd1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // A candidate stays offered, unchanged, until it is taken.
  a_cand_stable: assert property (@(posedge clk) disable iff (!rst_n)
    en && cand_valid && !cand_ready |=> cand_valid && $stable(cand_x) && $stable(cand_y));
endmodule
