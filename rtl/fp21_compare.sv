// fp21_compare: combinational comparator for the 21-bit floating point
// format of fp21_pkg.
//
// lt is a < b with signs taken into account; mag_lt is |a| < |b|. Because the
// exponent sits above the mantissa and is biased, magnitudes order like the
// unsigned 20-bit field {exp, man}; any value with exponent field 0 is zero,
// and +0 and -0 compare equal.
// The calibration engine compares its error against 1/4 LSB with such a
// comparator; the construction is this design's own.
module fp21_compare
  import fp21_pkg::*;
(
  input  fp21_t a,
  input  fp21_t b,
  output logic  lt,
  output logic  mag_lt
);

  logic [19:0] ma, mb;
  logic        az, bz;

  always_comb begin
    az     = fp_is_zero(a);
    bz     = fp_is_zero(b);
    ma     = az ? 20'd0 : {a.exp, a.man};
    mb     = bz ? 20'd0 : {b.exp, b.man};
    mag_lt = ma < mb;
    if (az && bz)                lt = 1'b0;
    else if (az)                 lt = ~b.sign;
    else if (bz)                 lt = a.sign;
    else if (a.sign != b.sign)   lt = a.sign;
    else if (!a.sign)            lt = ma < mb;
    else                         lt = mb < ma;
  end

endmodule
