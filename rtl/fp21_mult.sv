// fp21_mult: combinational multiplier for the 21-bit floating point format
// of fp21_pkg (1 sign, 6 exponent bits with bias 31, 14+1 mantissa bits).
//
// The two 15-bit mantissas (implied 1 restored) are multiplied into a 30-bit
// product, which is normalised by at most one position and rounded to
// nearest, ties to even. The exponent is ea + eb - 31 (+1 when the product
// needed normalising). A zero operand gives +0; a result below the smallest
// exponent flushes to zero and one above the largest saturates.
// The calibration engine needs a multiplier of this format but not its
// construction; this datapath and its rounding rule are this design's own.
// Timing: purely combinational, the caller registers the result.
module fp21_mult
  import fp21_pkg::*;
(
  input  fp21_t a,
  input  fp21_t b,
  output fp21_t y
);

  logic [29:0] prod;
  logic [14:0] norm;
  logic        rnd, sticky;
  logic [15:0] rounded;
  int          e;

  always_comb begin
    prod    = {1'b1, a.man} * {1'b1, b.man};
    e       = int'(a.exp) + int'(b.exp) - BIAS;
    if (prod[29]) begin
      norm   = prod[29:15];
      rnd    = prod[14];
      sticky = |prod[13:0];
      e      = e + 1;
    end else begin
      norm   = prod[28:14];
      rnd    = prod[13];
      sticky = |prod[12:0];
    end
    rounded = {1'b0, norm} + 16'(rnd && (sticky || norm[0]));
    if (rounded[15]) begin
      rounded = rounded >> 1;
      e       = e + 1;
    end
    y.sign = a.sign ^ b.sign;
    y.exp  = 6'(e);
    y.man  = rounded[13:0];
    if (fp_is_zero(a) || fp_is_zero(b) || e < 1) begin
      y = FP_ZERO;
    end else if (e > EXP_MAX) begin
      y      = FP_MAX;
      y.sign = a.sign ^ b.sign;
    end
  end

endmodule
