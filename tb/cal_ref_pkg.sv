// cal_ref_pkg: reference model for the calibration testbenches.
//
// adc_word() converts VrefH applied to stage i with a real-valued model of
// the 15-bit calibration ADC (stages 1..11 with gain 2*(1-(2+cp)/A), ideal
// stages 12, 13 and an ideal 2-bit flash) followed by redundancy removal.
// calibrate() runs the LMS calibration on such words with every operation
// rounded to the 21-bit format, and returns the weights, the number of LMS
// updates per stage and the expected clock count of the calibration engine:
//   1 + sum over i of ( 6*(15-i) + 9 + 10*updates_i ).
package cal_ref_pkg;
  import fp21_ref_pkg::*;

  typedef logic [20:0] f21;

  function automatic f21 fmul(f21 a, f21 b);
    return from_real(to_real(a) * to_real(b));
  endfunction
  function automatic f21 fadd(f21 a, f21 b);
    return from_real(to_real(a) + to_real(b));
  endfunction

  // 15-bit word, bit 15-k is D_k
  function automatic logic [14:0] adc_word(int i, real a_ol, real cp);
    real v, kg;
    int  c, d;
    int unsigned w;
    v = 1.0;
    w = 0;
    for (int s = i; s <= 13; s++) begin
      if (v < -0.25)     begin c = 0; d = -1; end
      else if (v < 0.25) begin c = 1; d = 0;  end
      else               begin c = 2; d = 1;  end
      kg = (s <= 11) ? 1.0 - (2.0 + cp) / a_ol : 1.0;
      v  = kg * (2.0 * v - real'(d));
      w += c << (14 - s);
    end
    if (v < -0.5)     c = 0;
    else if (v < 0.0) c = 1;
    else if (v < 0.5) c = 2;
    else              c = 3;
    w += c;
    return 15'(w);
  endfunction

  typedef struct {
    f21 w [1:14];
    int updates [1:11];
    int total_updates;
    int cycles;
  } cal_result_t;

  function automatic cal_result_t calibrate(logic [14:0] words [1:11]);
    cal_result_t r;
    f21 vrefh, half_p, half_n, vbe, vtot, verr, wi, wk;
    logic bk;
    vrefh  = from_real(1.0);
    half_p = fmul(vrefh, from_real(0.5));
    half_n = fmul(vrefh, from_real(-0.5));
    for (int j = 1; j <= 14; j++) r.w[j] = from_real(0.5);
    r.total_updates = 0;
    r.cycles = 1;
    for (int i = 11; i >= 1; i--) begin
      vbe = 21'd0;
      for (int k = 15; k > i; k--) begin
        bk  = words[i][15 - k];
        wk  = (k == 15) ? from_real(0.5) : r.w[k];
        vbe = fadd(bk ? half_p : half_n, fmul(vbe, wk));
      end
      bk = words[i][15 - i];
      wi = r.w[i];
      r.updates[i] = 0;
      forever begin
        vtot = fadd(bk ? half_p : half_n, fmul(vbe, wi));
        verr = from_real(to_real(vrefh) - to_real(vtot));
        if ((to_real(verr) < 0.0 ? -to_real(verr) : to_real(verr)) < 2.0 ** -13) break;
        wi = fadd(wi, fmul(vbe, verr));
        r.updates[i]++;
        if (r.updates[i] > 1000) break;
      end
      r.w[i] = wi;
      r.total_updates += r.updates[i];
      r.cycles += 6 * (15 - i) + 9 + 10 * r.updates[i];
    end
    return r;
  endfunction

endpackage
