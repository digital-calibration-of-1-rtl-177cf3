// fp21_ref_pkg: reference conversions between real numbers and the 21-bit
// floating point format (1 sign, 6 exponent bits with bias 31, 14 mantissa
// bits with an implied 1), used by the testbenches to work out expected
// values with real arithmetic. from_real rounds to nearest, ties to even,
// flushes to zero below 2^-30 and saturates above the largest value.
package fp21_ref_pkg;

  function automatic real to_real(logic [20:0] f);
    real m;
    int  e;
    if (f[19:14] == 6'd0) return 0.0;
    m = 1.0 + real'(f[13:0]) / 16384.0;
    e = int'(f[19:14]) - 31;
    m = m * (2.0 ** e);
    return f[20] ? -m : m;
  endfunction

  function automatic logic [20:0] from_real(real x);
    logic s;
    real  ax, sc, fl, fr;
    int   e;
    longint unsigned q;
    if (x == 0.0) return 21'd0;
    s  = (x < 0.0);
    ax = s ? -x : x;
    e  = 0;
    while (ax >= 2.0) begin ax = ax / 2.0; e++; end
    while (ax < 1.0)  begin ax = ax * 2.0; e--; end
    sc = ax * 16384.0;
    fl = $floor(sc);
    fr = sc - fl;
    q  = longint'(fl);
    if (fr > 0.5 || (fr == 0.5 && q[0])) q++;
    if (q == 64'd32768) begin q = 64'd16384; e++; end
    if (e + 31 < 1) return 21'd0;
    if (e + 31 > 62) return {s, 6'd62, 14'h3fff};
    return {s, 6'(e + 31), q[13:0]};
  endfunction

endpackage
