// fp21_pkg: the 21-bit floating point format used by the calibration logic.
//
// Layout, MSB first: 1 sign bit, 6-bit biased exponent (bias 31), 14 stored
// mantissa bits with an implied leading 1, so a value is
//   (-1)^sign * 1.mantissa * 2^(exp - 31).
// Exponent field 0 encodes zero (the mantissa is then ignored); fields 1..62
// hold exponents -30..31. Field 63 is never produced: results that would need
// it saturate to the largest finite value. These encoding rules for zero and
// overflow are this design's choice; the field widths and the bias follow the
// format definition of the calibration engine.
package fp21_pkg;

  localparam int FP_W    = 21;
  localparam int EXP_W   = 6;
  localparam int MAN_W   = 14;
  localparam int BIAS    = 31;
  localparam int EXP_MAX = 62;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } fp21_t;

  localparam fp21_t FP_ZERO = '{sign: 1'b0, exp: 6'd0,  man: 14'd0};
  localparam fp21_t FP_ONE  = '{sign: 1'b0, exp: 6'd31, man: 14'd0};
  localparam fp21_t FP_HALF = '{sign: 1'b0, exp: 6'd30, man: 14'd0};
  localparam fp21_t FP_MAX  = '{sign: 1'b0, exp: 6'd62, man: 14'h3fff};

  function automatic logic fp_is_zero(fp21_t a);
    return a.exp == '0;
  endfunction

  function automatic fp21_t fp_neg(fp21_t a);
    fp21_t r;
    r      = a;
    r.sign = ~a.sign;
    return r;
  endfunction

endpackage
