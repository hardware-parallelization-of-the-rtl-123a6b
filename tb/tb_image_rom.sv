// tb_image_rom: reads every word of the default ROM (2 training and 4 test
// images of 32x32) with the enable toggled, and checks landmarks of the
// scene: the object's three squares and black pixel at the expected centre in
// images 0..4, the plain background where the object is absent, the faint
// patch in every image and the two bars in the first training image only.
module tb_image_rom;
  localparam int W = 32, NI = 6, AW = 13;
  logic clk = 1'b0, en = 1'b1;
  logic [AW-1:0] addr = '0;
  logic [7:0] rdata;
  logic [7:0] img [NI][W][W];
  int checks = 0, failures = 0;

  image_rom dut (.*);
  always #5 clk = ~clk;

  task automatic expect_px(input int i, input int x, input int y, input int v);
    checks++;
    if (int'(img[i][y][x]) != v) begin failures++; $display("FAIL img%0d (%0d,%0d)=%0d exp %0d", i, x, y, img[i][y][x], v); end
  endtask

  initial begin
    int cxs [5], cys [5];
    cxs = '{16, 16, 6, 16, 25};
    cys = '{16, 14, 16, 16, 16};
    for (int a = 0; a < NI * W * W; a++) begin
      @(negedge clk); addr = AW'(a); en = 1'b1;
      @(negedge clk); en = 1'b0; addr = '0;
      @(negedge clk);
      img[a / (W * W)][(a % (W * W)) / W][a % W] = rdata;   // held while disabled
    end
    for (int i = 0; i < 5; i++) begin
      expect_px(i, cxs[i], cys[i] - 4, 0);
      expect_px(i, cxs[i] - 3, cys[i] - 2, 230);
      expect_px(i, cxs[i] + 2, cys[i] + 1, 180);
      expect_px(i, cxs[i] - 3, cys[i] + 3, 150);
      expect_px(i, cxs[i] - 1, cys[i], 40);
    end
    for (int i = 0; i < NI; i++) begin
      expect_px(i, 16, 4, 44);
      expect_px(i, 0, 0, 40);
      expect_px(i, 5, 26, i == 0 ? 200 : 40);
      expect_px(i, 20, 26, i == 0 ? 200 : 40);
    end
    expect_px(5, 16, 16, 40);
    expect_px(5, 6, 16, 40);
    expect_px(1, 16, 18, 40);          // second training view sits higher
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
