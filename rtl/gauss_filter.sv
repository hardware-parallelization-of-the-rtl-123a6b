// gauss_filter: applies one 2D symmetric Gaussian filter to a whole interval
// image of the Gauss pyramid, producing the next interval.
//
// For every output pixel the unit reads the 7x7 neighbourhood of the source
// image from the pyramid RAM, one word per enabled clock, multiplies each word
// by the kernel weight of sift_pkg::GK[sigma] and accumulates; the rounded sum
// (Q8.8) is written to the destination image. Neighbours outside the image are
// replaced by the nearest edge pixel (clamping). The filters sigma_1..sigma_5
// applied in turn come from the original design; the kernel size, the sigmas
// and the edge handling are this design's choices.
//
// Interface: pulse 'start' with sigma (0..4 for sigma_1..sigma_5), src_base,
// dst_base and the image width 'size'. The unit owns the RAM ports while
// 'busy' and pulses 'done' at the end. The RAM has one clock of read latency.
// Timing: 51 enabled clocks per pixel (49 reads, one to drain the pipeline,
// one to write), so size*size*51 + 1 clocks per image.
module gauss_filter
  import sift_pkg::*;
#(
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          start,
  input  logic [2:0]    sigma,
  input  logic [AW-1:0] src_base,
  input  logic [AW-1:0] dst_base,
  input  logic [7:0]    size,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] rd_addr,
  input  pix_t          rd_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output pix_t          wr_data
);
  typedef enum logic [1:0] {IDLE, TAPS, DRAIN, WRITE} state_t;
  state_t state;

  logic [2:0]        sig_r;
  logic [AW-1:0]     src_r, dst_r;
  logic [7:0]        sz_r;
  logic [7:0]        px, py;            // output pixel
  logic signed [3:0] tx, ty;            // tap offset -3..3
  logic [7:0]        coef_d;            // weight of the word arriving now
  logic              vld_d;             // a tap word arrives this clock
  logic [27:0]       acc;               // Q16.16 accumulator

  // Clamped neighbour coordinates.
  function automatic logic [7:0] clampc(input logic [7:0] c, input logic signed [3:0] d,
                                        input logic [7:0] sz);
    logic signed [9:0] v;
    v = $signed({2'b00, c}) + 10'(d);
    if (v < 0) return 8'd0;
    if (v > $signed({2'b00, sz}) - 10'sd1) return sz - 8'd1;
    return v[7:0];
  endfunction

  logic [7:0] cx, cy;
  logic [1:0] ax, ay;
  assign cx = clampc(px, tx, sz_r);
  assign cy = clampc(py, ty, sz_r);
  assign ax = 2'(tx[3] ? -tx : tx);
  assign ay = 2'(ty[3] ? -ty : ty);
  assign rd_addr = src_r + AW'(cy) * AW'(sz_r) + AW'(cx);

  // Rounded Q8.8 result, saturated to the unsigned pixel range.
  logic [19:0] res;
  assign res = 20'((acc + 28'd128) >> 8);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; busy <= 1'b0; done <= 1'b0;
      sig_r <= '0; src_r <= '0; dst_r <= '0; sz_r <= '0;
      px <= '0; py <= '0; tx <= '0; ty <= '0;
      coef_d <= '0; vld_d <= 1'b0; acc <= '0;
      wr_en <= 1'b0; wr_addr <= '0; wr_data <= '0;
    end else if (en) begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      vld_d <= 1'b0;
      if (vld_d) acc <= acc + 28'(rd_data) * 28'(coef_d);
      case (state)
        IDLE: if (start) begin
          sig_r <= sigma; src_r <= src_base; dst_r <= dst_base; sz_r <= size;
          px <= '0; py <= '0; tx <= -4'sd3; ty <= -4'sd3; acc <= '0;
          busy <= 1'b1; state <= TAPS;
        end
        TAPS: begin
          vld_d  <= 1'b1;
          coef_d <= GK[sig_r][ay][ax];
          if (tx == 4'sd3) begin
            tx <= -4'sd3;
            if (ty == 4'sd3) begin
              ty <= -4'sd3;
              state <= DRAIN;
            end else ty <= ty + 4'sd1;
          end else tx <= tx + 4'sd1;
        end
        DRAIN: state <= WRITE;
        WRITE: begin
          wr_en   <= 1'b1;
          wr_addr <= dst_r + AW'(py) * AW'(sz_r) + AW'(px);
          wr_data <= (res > 20'hFFFF) ? 16'hFFFF : res[15:0];
          acc     <= '0;
          if (px == sz_r - 8'd1) begin
            px <= '0;
            if (py == sz_r - 8'd1) begin
              busy <= 1'b0; done <= 1'b1; state <= IDLE;
            end else begin
              py <= py + 8'd1; state <= TAPS;
            end
          end else begin
            px <= px + 8'd1; state <= TAPS;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
