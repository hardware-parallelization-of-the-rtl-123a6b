// pyr_ram: on-chip RAM for one image pyramid (Gauss or Difference-of-Gauss).
//
// A plain simple-dual-port block RAM: one synchronous write port and one
// synchronous read port. Data read at address raddr appear on rdata one
// enabled clock later. 'en' is the global clock enable (the LabVIEW enable_in):
// while it is low neither port acts and rdata holds. The contents are not
// reset; the engine only reads words it has written.
//
// The whole Gauss pyramid of a 32x32 image (4 octaves x 6 intervals, 8160
// words of 16 bits) and the DoG pyramid (4 x 5 images, 6800 words) are two
// instances of this module. Keeping the full pyramids on chip is the original
// design's approach; the two-port organisation is this design's choice.
module pyr_ram #(
  parameter int unsigned DEPTH = 8160,
  parameter int unsigned DW    = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[waddr] <= wdata;
      rdata <= mem[raddr];
    end
  end
endmodule
