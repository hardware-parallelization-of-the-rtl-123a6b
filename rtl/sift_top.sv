// sift_top: a SIFT feature engine for a small robot FPGA, written as one
// large state machine that drives a set of datapath units.
//
// The robot has no camera input, so its images come from a ROM. For each image
// the engine
//   1. copies the 8-bit image into interval 0 of octave 0 of the Gauss pyramid
//      RAM (as Q8.8),
//   2. per octave: builds interval 0 by downsampling interval 3 of the
//      previous octave (octaves 1..), applies Gaussian filters sigma_1 ..
//      sigma_5 to get intervals 1..5, forms the five Difference-of-Gauss
//      images, and scans them for 3x3x3 extrema; each extremum is checked for
//      contrast and edge response and, if kept, given an orientation,
//   3. hands every finished feature to the matcher.
// Images 0 .. N_TRAIN-1 are training images: their features are learnt.
// Every later image is a test image: its features are matched against the
// learnt ones and the robot turns left, turns right, lights the LED or does
// nothing.
//
// The whole engine advances only while LabVIEW's enable_in is high (it is the
// clock enable of every register and RAM); enable_out rises once all images
// have been analysed. The pyramid sizes (32x32 first octave, 4 octaves,
// 6 intervals), the stage order, Q8.8 arithmetic, the ROM-fed images, the
// response rules and the enable protocol follow the original design; the
// unit-level details are described in each unit.
//
// Ports: besides the LabVIEW enables and the robot outputs, the feature
// stream (feat_valid, feat, img_idx) and each steering decision (steer_valid,
// steer) are brought out for observation.
// Timing: dominated by the Gaussian filters, about 51 clocks per pixel per
// filter; one 32x32 image takes roughly 0.44 million enabled clocks.
module sift_top
  import sift_pkg::*;
#(
  parameter int unsigned IMG_W     = 32,
  parameter int unsigned N_OCT     = 4,
  parameter int unsigned N_INT     = 6,
  parameter int unsigned N_TRAIN   = 2,
  parameter int unsigned N_IMG     = N_TRAIN + 4,
  parameter int unsigned MAX_TRAIN = 32,
  parameter int unsigned NB        = 36
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable_in,
  output logic       enable_out,
  output logic       wheel_left,
  output logic       wheel_right,
  output logic       led,
  output logic       steer_valid,
  output steer_t     steer,
  output logic       feat_valid,
  output feat_t      feat,
  output logic [7:0] img_idx
);
  localparam int unsigned NDOG    = N_INT - 1;
  localparam int unsigned NPIX    = IMG_W * IMG_W;
  localparam int unsigned G_WORDS = pyr_words(N_OCT, N_INT, IMG_W);
  localparam int unsigned D_WORDS = pyr_words(N_OCT, NDOG, IMG_W);
  localparam int unsigned AW      = $clog2(G_WORDS);
  localparam int unsigned RAW     = $clog2(N_IMG * NPIX);
  localparam int unsigned PW      = $clog2(NPIX + 1);

  // ---------------------------------------------------------------- enables
  logic ce, fin;
  hdl_node_if u_if (.clk, .rst_n, .enable_in, .done(fin), .ce, .enable_out);

  // ---------------------------------------------------------------- control
  typedef enum logic [3:0] {
    S_START, S_LOAD, S_OCT, S_DOWN_W, S_GAUSS, S_GAUSS_W, S_DOG, S_DOG_W,
    S_EXT, S_EXT_W, S_IMG_END, S_DECIDE, S_FIN
  } state_t;
  state_t state;

  logic [7:0]    img;
  logic [2:0]    oct, gi;
  logic [PW-1:0] lp;
  logic          img_start, ext_seen;

  logic [7:0]    osz;                    // width of the current octave
  logic [AW-1:0] onpix, g_ob, d_ob, g_prev;
  assign osz    = 8'(IMG_W >> oct);
  assign onpix  = AW'(osz) * AW'(osz);
  assign g_ob   = AW'(oct_base(32'(oct), N_INT, IMG_W));
  assign d_ob   = AW'(oct_base(32'(oct), NDOG, IMG_W));
  assign g_prev = AW'(oct_base(32'(oct) - 1, N_INT, IMG_W))
                + AW'(3) * AW'(osz * 8'd2) * AW'(osz * 8'd2);

  // ---------------------------------------------------------------- memories
  logic          g_we;
  logic [AW-1:0] g_waddr, g_raddr;
  pix_t          g_wdata, g_rdata;
  pyr_ram #(.DEPTH(G_WORDS), .DW(16), .AW(AW)) u_gram (
    .clk, .en(ce), .we(g_we), .waddr(g_waddr), .wdata(g_wdata),
    .raddr(g_raddr), .rdata(g_rdata));

  logic          d_we;
  logic [AW-1:0] d_waddr, d_raddr;
  fx_t           d_wdata;
  logic [15:0]   d_rdata;
  pyr_ram #(.DEPTH(D_WORDS), .DW(16), .AW(AW)) u_dram (
    .clk, .en(ce), .we(d_we), .waddr(d_waddr), .wdata(d_wdata),
    .raddr(d_raddr), .rdata(d_rdata));

  logic [RAW-1:0] rom_addr;
  logic [7:0]     rom_data;
  image_rom #(.IMG_W(IMG_W), .N_TRAIN(N_TRAIN), .N_IMG(N_IMG), .AW(RAW)) u_rom (
    .clk, .en(ce), .addr(rom_addr), .rdata(rom_data));
  assign rom_addr = RAW'(img) * RAW'(NPIX) + RAW'(lp);

  // ---------------------------------------------------------------- units
  logic          gf_start, gf_busy, gf_done, gf_we;
  logic [AW-1:0] gf_raddr, gf_waddr;
  pix_t          gf_wdata;
  gauss_filter #(.AW(AW)) u_gauss (
    .clk, .rst_n, .en(ce), .start(gf_start), .sigma(gi - 3'd1),
    .src_base(g_ob + AW'(gi - 3'd1) * onpix), .dst_base(g_ob + AW'(gi) * onpix),
    .size(osz), .busy(gf_busy), .done(gf_done),
    .rd_addr(gf_raddr), .rd_data(g_rdata),
    .wr_en(gf_we), .wr_addr(gf_waddr), .wr_data(gf_wdata));

  logic          ds_start, ds_busy, ds_done, ds_we;
  logic [AW-1:0] ds_raddr, ds_waddr;
  pix_t          ds_wdata;
  downsample #(.AW(AW)) u_down (
    .clk, .rst_n, .en(ce), .start(ds_start),
    .src_base(g_prev), .dst_base(g_ob), .size(osz * 8'd2),
    .busy(ds_busy), .done(ds_done),
    .rd_addr(ds_raddr), .rd_data(g_rdata),
    .wr_en(ds_we), .wr_addr(ds_waddr), .wr_data(ds_wdata));

  logic          dg_start, dg_busy, dg_done;
  logic [AW-1:0] dg_raddr;
  dog_sub #(.AW(AW), .NDOG(NDOG)) u_dog (
    .clk, .rst_n, .en(ce), .start(dg_start),
    .g_base(g_ob), .d_base(d_ob), .size(osz),
    .busy(dg_busy), .done(dg_done),
    .rd_addr(dg_raddr), .rd_data(g_rdata),
    .wr_en(d_we), .wr_addr(d_waddr), .wr_data(d_wdata));

  logic          ex_start, ex_busy, ex_done;
  logic          cand_valid, cand_ready;
  logic [7:0]    cand_x, cand_y;
  logic [2:0]    cand_intv;
  fx_t           cand_nb [9];
  extrema_detect #(.AW(AW), .NDOG(NDOG)) u_ext (
    .clk, .rst_n, .en(ce), .start(ex_start), .d_base(d_ob), .size(osz),
    .busy(ex_busy), .done(ex_done),
    .rd_addr(d_raddr), .rd_data(d_rdata),
    .cand_valid, .cand_ready, .cand_x, .cand_y, .cand_intv, .cand_nb);

  logic          kp_valid, kp_ready, rej_contrast, rej_edge;
  logic [7:0]    kp_x, kp_y;
  logic [2:0]    kp_intv;
  keypoint_filter u_kp (
    .clk, .rst_n, .en(ce),
    .cand_valid, .cand_ready, .cand_x, .cand_y, .cand_intv, .cand_nb,
    .kp_valid, .kp_ready, .kp_x, .kp_y, .kp_intv, .rej_contrast, .rej_edge);

  logic          or_busy;
  logic [AW-1:0] or_raddr;
  orient_assign #(.AW(AW), .NB(NB)) u_ori (
    .clk, .rst_n, .en(ce),
    .kp_valid, .kp_ready, .kp_x, .kp_y, .kp_intv,
    .g_base(g_ob + AW'(kp_intv) * onpix), .size(osz), .oct(oct),
    .busy(or_busy), .rd_addr(or_raddr), .rd_data(g_rdata),
    .feat_valid, .feat);

  logic [15:0] match_cnt, feat_cnt;
  logic [23:0] xsum;
  logic        decide, m_match, m_drop;
  logic [$clog2(MAX_TRAIN + 1)-1:0] n_train;
  feature_matcher #(.MAX_TRAIN(MAX_TRAIN), .NB(NB)) u_match (
    .clk, .rst_n, .en(ce), .img_start, .train(img < 8'(N_TRAIN)),
    .feat_valid, .feat, .n_train, .train_drop(m_drop), .match(m_match),
    .feat_cnt, .match_cnt, .xsum);

  steer_ctrl #(.IMG_W(IMG_W)) u_steer (
    .clk, .rst_n, .en(ce), .decide, .match_cnt, .xsum,
    .steer, .steer_valid, .wheel_left, .wheel_right, .led);

  assign img_idx = img;

  // ---------------------------------------------------------------- RAM muxes
  logic          ld_we;
  logic [AW-1:0] ld_waddr;
  pix_t          ld_wdata;
  always_comb begin
    g_we = ld_we | gf_we | ds_we;
    if (gf_we)      begin g_waddr = gf_waddr; g_wdata = gf_wdata; end
    else if (ds_we) begin g_waddr = ds_waddr; g_wdata = ds_wdata; end
    else            begin g_waddr = ld_waddr; g_wdata = ld_wdata; end
    case (state)
      S_DOWN_W:  g_raddr = ds_raddr;
      S_DOG_W:   g_raddr = dg_raddr;
      S_EXT_W:   g_raddr = or_raddr;
      default:   g_raddr = gf_raddr;
    endcase
  end

  // ---------------------------------------------------------------- sequencer
  assign gf_start = (state == S_GAUSS);
  assign ds_start = (state == S_OCT) && (oct != 3'd0);
  assign dg_start = (state == S_DOG);
  assign ex_start = (state == S_EXT);
  assign decide   = (state == S_DECIDE) && (img >= 8'(N_TRAIN));
  assign fin      = (state == S_FIN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_START; img <= '0; oct <= '0; gi <= 3'd1; lp <= '0;
      img_start <= 1'b0; ext_seen <= 1'b0;
      ld_we <= 1'b0; ld_waddr <= '0; ld_wdata <= '0;
    end else if (ce) begin
      img_start <= 1'b0;
      ld_we     <= 1'b0;
      case (state)
        S_START: begin
          img_start <= 1'b1; lp <= '0; oct <= '0; state <= S_LOAD;
        end
        S_LOAD: begin
          // ROM address lp is issued now; the word for lp-1 arrives now.
          if (lp != '0) begin
            ld_we <= 1'b1; ld_waddr <= AW'(lp - 1'b1); ld_wdata <= {rom_data, 8'h00};
          end
          if (lp == PW'(NPIX)) state <= S_OCT;
          else lp <= lp + 1'b1;
        end
        S_OCT: begin
          gi <= 3'd1;
          state <= (oct != 3'd0) ? S_DOWN_W : S_GAUSS;
        end
        S_DOWN_W:  if (ds_done) state <= S_GAUSS;
        S_GAUSS:   state <= S_GAUSS_W;
        S_GAUSS_W: if (gf_done) begin
          if (gi == 3'(N_INT - 1)) state <= S_DOG;
          else begin gi <= gi + 3'd1; state <= S_GAUSS; end
        end
        S_DOG:     state <= S_DOG_W;
        S_DOG_W:   if (dg_done) state <= S_EXT;
        S_EXT:     begin ext_seen <= 1'b0; state <= S_EXT_W; end
        S_EXT_W: begin
          if (ex_done) ext_seen <= 1'b1;
          // the scan is over and no candidate is still being worked on
          if (ext_seen && cand_ready && !kp_valid && !or_busy && !feat_valid) begin
            if (oct == 3'(N_OCT - 1)) state <= S_IMG_END;
            else begin oct <= oct + 3'd1; state <= S_OCT; end
          end
        end
        S_IMG_END: state <= S_DECIDE;
        S_DECIDE: begin
          if (img == 8'(N_IMG - 1)) state <= S_FIN;
          else begin img <= img + 8'd1; state <= S_START; end
        end
        S_FIN: state <= S_FIN;
        default: state <= S_START;
      endcase
    end
  end

  // Only one unit may write the Gauss RAM in a clock.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    ce |-> $onehot0({ld_we, gf_we, ds_we}));
endmodule
