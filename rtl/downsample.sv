// downsample: builds the first image of the next octave by taking every second
// pixel, in both directions, of the fourth interval of the previous octave.
//
// For each destination pixel (x, y) the unit reads source pixel (2x, 2y) and
// writes it to the destination image, two enabled clocks per pixel (read,
// then write once the RAM has returned the word). Plain decimation (no
// averaging) is this design's choice; the factor of 2 and the choice of the
// fourth interval follow the original design.
//
// Interface: pulse 'start' with src_base, dst_base and the source width
// 'size'; 'busy' while running, 'done' pulses at the end.
module downsample
  import sift_pkg::*;
#(
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          start,
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
  logic          phase;        // 0: issue read, 1: write
  logic [AW-1:0] src_r, dst_r;
  logic [7:0]    sz_r, half;
  logic [7:0]    px, py;

  assign half    = sz_r >> 1;
  assign rd_addr = src_r + AW'({py, 1'b0}) * AW'(sz_r) + AW'({px, 1'b0});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 1'b0; busy <= 1'b0; done <= 1'b0;
      src_r <= '0; dst_r <= '0; sz_r <= '0; px <= '0; py <= '0;
      wr_en <= 1'b0; wr_addr <= '0; wr_data <= '0;
    end else if (en) begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      if (!busy) begin
        if (start) begin
          src_r <= src_base; dst_r <= dst_base; sz_r <= size;
          px <= '0; py <= '0; phase <= 1'b0; busy <= 1'b1;
        end
      end else if (!phase) begin
        phase <= 1'b1;
      end else begin
        phase   <= 1'b0;
        wr_en   <= 1'b1;
        wr_addr <= dst_r + AW'(py) * AW'(half) + AW'(px);
        wr_data <= rd_data;
        if (px == half - 8'd1) begin
          px <= '0;
          if (py == half - 8'd1) begin
            busy <= 1'b0; done <= 1'b1;
          end else py <= py + 8'd1;
        end else px <= px + 8'd1;
      end
    end
  end
endmodule
