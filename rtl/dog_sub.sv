// dog_sub: Difference-of-Gauss images of one octave.
//
// For k = 0 .. NDOG-1 and every pixel p, D_k[p] = G_k[p] - G_{k+1}[p]: each
// interval is subtracted from the one before it, giving five DoG images from
// the six intervals of an octave. The difference is saturated to signed Q8.8.
// The unit reads G_k[p] and G_{k+1}[p] through the single Gauss-RAM read port
// on consecutive clocks and writes the difference to the DoG RAM on the third.
// The subtraction order follows the original design; the saturation is this
// design's choice.
//
// Interface: pulse 'start' with g_base (interval 0 of the octave), d_base
// (DoG 0 of the octave) and the image width 'size'. Timing: 3 enabled clocks
// per pixel per DoG image, plus one.
module dog_sub
  import sift_pkg::*;
#(
  parameter int unsigned AW   = 13,
  parameter int unsigned NDOG = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          start,
  input  logic [AW-1:0] g_base,
  input  logic [AW-1:0] d_base,
  input  logic [7:0]    size,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] rd_addr,
  input  pix_t          rd_data,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output fx_t           wr_data
);
  typedef enum logic [1:0] {IDLE, RD_A, RD_B, WR} state_t;
  state_t state;

  logic [AW-1:0] gb_r, db_r;
  logic [AW-1:0] npix, p;
  logic [2:0]    k;
  pix_t          a_r;

  logic [AW-1:0] img_off;
  assign img_off = AW'(k) * npix;
  assign rd_addr = gb_r + img_off + p + ((state == RD_B) ? npix : '0);

  logic signed [17:0] diff;
  assign diff = $signed({2'b00, a_r}) - $signed({2'b00, rd_data});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; busy <= 1'b0; done <= 1'b0;
      gb_r <= '0; db_r <= '0; npix <= '0; p <= '0; k <= '0; a_r <= '0;
      wr_en <= 1'b0; wr_addr <= '0; wr_data <= '0;
    end else if (en) begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      case (state)
        IDLE: if (start) begin
          gb_r <= g_base; db_r <= d_base; npix <= AW'(size) * AW'(size);
          p <= '0; k <= '0; busy <= 1'b1; state <= RD_A;
        end
        RD_A: state <= RD_B;              // G_k read issued; G_{k+1} is issued in RD_B
        RD_B: begin a_r <= rd_data; state <= WR; end
        WR: begin
          wr_en   <= 1'b1;
          wr_addr <= db_r + img_off + p;
          wr_data <= (diff > 18'sd32767) ? 16'sh7FFF :
                     (diff < -18'sd32768) ? 16'sh8000 : diff[15:0];
          state   <= RD_A;
          if (p == npix - 1'b1) begin
            p <= '0;
            if (k == 3'(NDOG - 1)) begin
              busy <= 1'b0; done <= 1'b1; state <= IDLE;
            end else k <= k + 3'd1;
          end else p <= p + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
