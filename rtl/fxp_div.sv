// fxp_div: multi-cycle signed fixed-point divider.
//
// Computes q = (num * 2^FRAC) / den, truncated toward zero and saturated to a
// QW-bit signed result, so with FRAC = 8 the quotient of two numbers with the
// same scaling comes out in Q8.8. A single-cycle divider did not meet area and
// timing on the original FPGA, and a divider spread over several clocks was
// the proposed remedy; this block is that remedy, as a restoring divider that
// produces one quotient bit per enabled clock.
//
// Interface and timing: pulse 'start' with the operands while 'busy' is low.
// 'busy' is high for NW+FRAC enabled clocks, then 'done' pulses for one
// enabled clock with 'q' valid (q holds until the next start). 'sat' is set
// when the quotient did not fit or den was zero (q is then the largest value
// of the quotient's sign).
module fxp_div #(
  parameter int unsigned NW   = 40,   // operand width
  parameter int unsigned QW   = 16,   // quotient width
  parameter int unsigned FRAC = 8     // fraction bits added to the quotient
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic signed [NW-1:0] den,
  output logic                 busy,
  output logic                 done,
  output logic signed [QW-1:0] q,
  output logic                 sat
);
  localparam int unsigned DW = NW + FRAC;          // dividend width
  localparam int unsigned CW = $clog2(DW + 1);

  logic [DW-1:0] dvd;      // dividend, shifted out MSB first
  logic [NW:0]   rem;      // partial remainder
  logic [NW-1:0] dvs;      // |den|
  logic [DW-1:0] quo;      // quotient magnitude
  logic          neg, dz;
  logic [CW-1:0] cnt;

  logic [NW:0]   rem_sh;
  logic [NW:0]   rem_sub;
  assign rem_sh  = {rem[NW-1:0], dvd[DW-1]};
  assign rem_sub = rem_sh - {1'b0, dvs};

  // Final result from the magnitude and sign.
  logic          too_big;
  logic [QW-1:0] qmag;
  assign too_big = (quo > DW'((1 << (QW - 1)) - 1));
  assign qmag    = quo[QW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvd <= '0; rem <= '0; dvs <= '0; quo <= '0;
      neg <= 1'b0; dz <= 1'b0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0; q <= '0; sat <= 1'b0;
    end else if (en) begin
      done <= 1'b0;
      if (start && !busy) begin
        dvd  <= {(num[NW-1] ? NW'(-num) : NW'(num)), FRAC'(0)};
        dvs  <= den[NW-1] ? NW'(-den) : NW'(den);
        neg  <= num[NW-1] ^ den[NW-1];
        dz   <= (den == '0);
        rem  <= '0;
        quo  <= '0;
        cnt  <= CW'(DW);
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt != '0) begin
          dvd <= {dvd[DW-2:0], 1'b0};
          if (!rem_sub[NW]) begin
            rem <= rem_sub;
            quo <= {quo[DW-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[DW-2:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (dz || too_big) begin
            sat <= 1'b1;
            q   <= neg ? {1'b1, {(QW-1){1'b0}}} : {1'b0, {(QW-1){1'b1}}};
          end else begin
            sat <= 1'b0;
            q   <= neg ? QW'(-qmag) : qmag;
          end
        end
      end
    end
  end

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n)
    en && busy |-> !start);
endmodule
