// image_rom: read-only store of the images the engine analyses.
//
// The target platform has no camera input, so the images are programmed into a
// ROM together with the design. Images 0 .. N_TRAIN-1 are training images,
// in which the target object sits in the middle; the rest are test images.
// The contents
// here are a synthetic scene computed at elaboration (this design's choice):
// a grey background (40) and an object 9 pixels wide made of three bright
// squares (3x3 of 230, 5x5 of 180, 3x3 of 150) and one black pixel, placed
// asymmetrically so that the blobs give distinct scale-space extrema. Every
// image, the empty one included, also holds a faint 5x5 patch (44, centred at
// x = W/2, y = W/8), a structure too weak to survive the contrast test. The
// first training image alone also has two bars (200) below the object, one 5 rows
// high from x = W/16 to 5W/16 and one 3 rows high from 7W/16 to 7W/8; between
// them and the object lies an edge-like DoG minimum that the edge test drops.
// Features of these bars are learnt but never met in a test image. Further
// training images show the object in the middle again, 2 rows higher each
// time, without the bars. The first test image has the object on the left
// (centre x = W/5), the second in the middle (x = W/2), the third on the
// right (x = 4W/5) and the fourth has no object; further test images repeat
// this pattern. The object's centre row is y = W/2 in the test images.
// Pixels are 8-bit grey levels, row-major.
//
// Read timing: synchronous, data one enabled clock after the address.
module image_rom #(
  parameter int unsigned IMG_W = 32,
  parameter int unsigned N_TRAIN = 2,
  parameter int unsigned N_IMG = N_TRAIN + 4,
  parameter int unsigned AW    = $clog2(N_IMG * IMG_W * IMG_W)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [7:0]    rdata
);
  localparam int unsigned NPIX = IMG_W * IMG_W;

  logic [7:0] rom [N_IMG * NPIX];

  // Grey level of pixel (x, y) of image 'img'.
  function automatic logic [7:0] scene(input int img, input int x, input int y);
    int cx, cy, dx, dy, t;
    t  = img - int'(N_TRAIN);
    cy = int'(IMG_W / 2);
    if (t < 0) begin
      cx = IMG_W / 2;
      cy = cy - 2 * img;
    end else
      case (t % 4)
        0:       cx = IMG_W / 5;
        1:       cx = IMG_W / 2;
        2:       cx = (4 * IMG_W) / 5;
        default: cx = -100;
      endcase
    dx = x - cx;
    dy = y - cy;
    if (dx == 0 && dy == -4)                                return 8'd0;
    if (dx >= -4 && dx <= -2 && dy >= -3 && dy <= -1)       return 8'd230;
    if (dx >= 0 && dx <= 4 && dy >= -1 && dy <= 3)          return 8'd180;
    if (dx >= -4 && dx <= -2 && dy >= 2 && dy <= 4)         return 8'd150;
    // faint patch, present in every image
    if (x >= int'(IMG_W / 2) - 2 && x <= int'(IMG_W / 2) + 2 &&
        y >= int'(IMG_W / 8) - 2 && y <= int'(IMG_W / 8) + 2)        return 8'd44;
    // two bars below the object, training image only
    if (img == 0 && y >= int'(IMG_W) - 8 && y <= int'(IMG_W) - 4 &&
        x >= int'(IMG_W / 16) && x <= int'(5 * IMG_W / 16))          return 8'd200;
    if (img == 0 && y >= int'(IMG_W) - 7 && y <= int'(IMG_W) - 5 &&
        x >= int'(7 * IMG_W / 16) && x <= int'(7 * IMG_W / 8))        return 8'd200;
    return 8'd40;
  endfunction

  initial begin
    for (int i = 0; i < int'(N_IMG * NPIX); i++)
      rom[i] = scene(i / int'(NPIX), i % int'(IMG_W), (i % int'(NPIX)) / int'(IMG_W));
  end

  always_ff @(posedge clk)
    if (en) rdata <= rom[addr];
endmodule
