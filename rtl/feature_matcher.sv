// feature_matcher: learns the features of the training images and looks for
// them in each test image.
//
// While 'train' is high every incoming feature is appended to a table of up to
// MAX_TRAIN training features (further ones are dropped and counted on
// 'train_drop'). While 'train' is low each incoming feature is compared, in
// parallel, with every stored training feature; it matches when octave and
// interval (the feature's scale) are equal and the orientation bins differ by
// at most one, circularly. For the matching test features the unit keeps their
// number and the sum of their x coordinates scaled to the first octave, from
// which the steering logic finds where the target lies. 'img_start' clears the
// per-image counts; at the first training image of a series (train high after
// an image with train low, or after reset) it also empties the table, so that
// consecutive training images add to one table.
//
// Recognising the target from training-image features and steering toward it
// is the original design's aim; it does not say how features are compared, so
// this matching rule is this design's own (simplest) choice.
// Timing: one feature per enabled clock; counts are updated the clock after
// feat_valid.
module feature_matcher
  import sift_pkg::*;
#(
  parameter int unsigned MAX_TRAIN = 32,
  parameter int unsigned NB        = 36,
  parameter int unsigned CW        = $clog2(MAX_TRAIN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          img_start,
  input  logic          train,
  input  logic          feat_valid,
  input  feat_t         feat,
  output logic [CW-1:0] n_train,
  output logic          train_drop,
  output logic          match,        // pulse: last test feature matched
  output logic [15:0]   feat_cnt,     // features of the current image
  output logic [15:0]   match_cnt,    // matching features of the current image
  output logic [23:0]   xsum          // sum of their x, first-octave pixels
);
  localparam int unsigned IW = (MAX_TRAIN > 1) ? $clog2(MAX_TRAIN) : 1;

  feat_t tab [MAX_TRAIN];

  // Parallel comparison with all table entries.
  logic hit;
  always_comb begin
    hit = 1'b0;
    for (int i = 0; i < int'(MAX_TRAIN); i++) begin
      logic [5:0] d;
      d = (tab[i].ori > feat.ori) ? tab[i].ori - feat.ori : feat.ori - tab[i].ori;
      if (CW'(i) < n_train && tab[i].oct == feat.oct && tab[i].intv == feat.intv &&
          (d <= 6'd1 || d >= 6'(NB - 1)))
        hit = 1'b1;
    end
  end

  logic was_train;                       // previous image was a training image

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_train <= '0; train_drop <= 1'b0; match <= 1'b0; was_train <= 1'b0;
      feat_cnt <= '0; match_cnt <= '0; xsum <= '0;
      for (int i = 0; i < int'(MAX_TRAIN); i++) tab[i] <= '0;
    end else if (en) begin
      train_drop <= 1'b0;
      match      <= 1'b0;
      if (img_start) begin
        feat_cnt <= '0; match_cnt <= '0; xsum <= '0;
        was_train <= train;
        if (train && !was_train) n_train <= '0;
      end else if (feat_valid) begin
        feat_cnt <= feat_cnt + 16'd1;
        if (train) begin
          if (n_train < CW'(MAX_TRAIN)) begin
            tab[IW'(n_train)] <= feat;
            n_train      <= n_train + 1'b1;
          end else train_drop <= 1'b1;
        end else if (hit) begin
          match     <= 1'b1;
          match_cnt <= match_cnt + 16'd1;
          xsum      <= xsum + (24'(feat.x) << feat.oct);
        end
      end
    end
  end
endmodule
