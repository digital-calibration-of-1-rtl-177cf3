// fp21_add: combinational adder / subtractor for the 21-bit floating point
// format of fp21_pkg. y = a + b, or a - b when sub is high.
//
// The operand of larger magnitude is kept as is; the other is shifted right
// by the exponent difference into a field with a guard, a round and a sticky
// bit. The aligned mantissas are added or subtracted, the sum is normalised
// (one step right after a carry, a leading-zero shift left after
// cancellation) and rounded to nearest, ties to even. Exact cancellation
// gives +0; underflow flushes to zero, overflow saturates.
// The calibration engine needs an adder of this format; its construction and
// rounding rule are this design's own.
// Timing: purely combinational.
module fp21_add
  import fp21_pkg::*;
(
  input  fp21_t a,
  input  fp21_t b,
  input  logic  sub,
  output fp21_t y
);

  fp21_t       bb, hi_op, lo_op;
  logic [5:0]  d;
  logic [80:0] shifted;
  logic [17:0] ma, mb;       // 1.mantissa, guard, round, sticky
  logic [18:0] sum;
  logic [17:0] m;
  logic [15:0] rounded;
  int          e, lz;

  always_comb begin
    bb      = b;
    bb.sign = b.sign ^ sub;
    if ({a.exp, a.man} >= {bb.exp, bb.man}) begin
      hi_op   = a;
      lo_op = bb;
    end else begin
      hi_op   = bb;
      lo_op = a;
    end
    d       = hi_op.exp - lo_op.exp;
    ma      = {1'b1, hi_op.man, 3'b000};
    shifted = {1'b1, lo_op.man, 66'd0} >> d;
    mb      = {shifted[80:64], |shifted[63:0]};
    if (hi_op.sign == lo_op.sign) sum = {1'b0, ma} + {1'b0, mb};
    else                        sum = {1'b0, ma} - {1'b0, mb};
    e  = int'(hi_op.exp);
    lz = 0;
    if (sum[18]) begin
      m = {sum[18:2], sum[1] | sum[0]};
      e = e + 1;
    end else begin
      for (int p = 17; p >= 0; p--) begin
        if (sum[p]) break;
        lz++;
      end
      m = sum[17:0] << lz;
      e = e - lz;
    end
    rounded = {1'b0, m[17:3]} + 16'(m[2] && (m[1] || m[0] || m[3]));
    if (rounded[15]) begin
      rounded = rounded >> 1;
      e       = e + 1;
    end
    y.sign = hi_op.sign;
    y.exp  = 6'(e);
    y.man  = rounded[13:0];
    if (fp_is_zero(lo_op)) begin
      y = hi_op;
    end else if (fp_is_zero(hi_op)) begin
      y = lo_op;
    end else if (sum == '0 || e < 1) begin
      y = FP_ZERO;
    end else if (e > EXP_MAX) begin
      y      = FP_MAX;
      y.sign = hi_op.sign;
    end
  end

endmodule
