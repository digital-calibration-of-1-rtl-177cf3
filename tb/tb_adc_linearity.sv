// tb_adc_linearity: static linearity of the 12-bit converter before and after
// calibration, at the default parameters (op-amp gain 40, stage gain 1.895).
//
// The test first runs one complete calibration through adc_cal_top and
// reads the 21-bit weight w_1. It then converts a slow ramp from -VREF to
// +VREF in normal mode (stages 1..11 and the flash), RAMP_PER_CODE samples
// per 12-bit code, and takes the aligned stage codes from the top's normal
// path. From them the testbench rebuilds the input voltage in two ways:
//   v = sum_{s=1..11} d_s * VREF/2 * w^(s-1) + w^11 * (c - 1.5) * VREF/2,
// where d_s = -1/0/+1 is the decision of stage s and c the flash code. With
// w = 0.5 this is the plain binary (uncalibrated) output; with w = w_1 it is
// the output corrected with the measured weight. Each estimate is quantized
// to 12 bits and DNL and INL are taken from the code histogram (code-density
// test, end codes excluded). Expected: before calibration large INL and
// missing codes; after it INL within about one LSB and no missing codes.
// Every ramp sample rebuilt with the exact weight must also lie within one
// LSB of the input applied N_NORM clocks earlier, which checks the latency
// of the normal path.
// A second run converts a coherently sampled sine (N_FFT samples, FFT_CYCLES
// periods, amplitude 0.99*VREF; at 100 MS/s this is a 1 MHz tone) and takes
// a full DFT of the 12-bit output: SNDR (signal against everything but DC),
// SFDR (signal against the largest other bin) and ENOB = (SNDR-1.76)/6.02,
// before and after calibration.
// Rebuilding the output with the weight is done here, in the testbench; the
// hardware produces the weight only. The code-density method and the bounds
// are this test's own choices. The reconstruction with the exact weight
// 1/1.895 is printed for comparison. Clock 50 MHz; samples are taken on the
// falling edge.
`timescale 1ns/1ps
module tb_adc_linearity;
  import fp21_pkg::*;
  import cal_pkg::*;
  import fp21_ref_pkg::*;

  localparam int  RAMP_PER_CODE = 32;
  localparam int  N_CODES       = 4096;
  localparam int  N_RAMP        = RAMP_PER_CODE * N_CODES;
  localparam int  N_NORM        = N_CAL_STG + 1;
  localparam real VREF          = 1.0;
  localparam int  N_FFT         = 4096;
  localparam int  FFT_CYCLES    = 41;
  localparam real PI            = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst, start;
  real  vin;
  logic [N_CALI-3:0] adc_code;
  logic [N_CALI-1:0] cal_word;
  logic capture_done, calibration_complete;
  fp21_t weight;
  cal_state_t cal_state;
  logic [STG_W-1:0] cal_stage;
  logic [3:0] cal_sel;

  int checks = 0, failures = 0;

  adc_cal_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (N_RAMP + N_FFT + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input voltage estimate from one set of aligned stage codes.
  function automatic real rebuild(logic [N_NORM:1][1:0] c, real w);
    real v = 0.0, scale = 1.0;
    for (int s = 1; s <= N_CAL_STG; s++) begin
      v     += (real'(int'(c[s])) - 1.0) * VREF / 2.0 * scale;
      scale *= w;
    end
    v += scale * (real'(int'(c[N_NORM])) - 1.5) * VREF / 2.0;
    return v;
  endfunction

  function automatic int quantize(real v);
    int q = int'($floor((v + VREF) / (2.0 * VREF / N_CODES)));
    if (q < 0) q = 0;
    if (q > N_CODES - 1) q = N_CODES - 1;
    return q;
  endfunction

  typedef struct {
    real dnl_min, dnl_max, inl_min, inl_max;
    int  missing;
  } lin_t;

  // Code-density DNL/INL of histogram h, codes 1 .. N_CODES-2.
  function automatic lin_t linearity(ref int h [N_CODES]);
    lin_t r = '{dnl_min: 1e9, dnl_max: -1e9, inl_min: 1e9, inl_max: -1e9, missing: 0};
    real avg = 0.0, inl = 0.0, dnl;
    for (int k = 1; k < N_CODES - 1; k++) avg += real'(h[k]);
    avg /= real'(N_CODES - 2);
    for (int k = 1; k < N_CODES - 1; k++) begin
      dnl  = real'(h[k]) / avg - 1.0;
      inl += dnl;
      if (h[k] == 0) r.missing++;
      if (dnl < r.dnl_min) r.dnl_min = dnl;
      if (dnl > r.dnl_max) r.dnl_max = dnl;
      if (inl < r.inl_min) r.inl_min = inl;
      if (inl > r.inl_max) r.inl_max = inl;
    end
    return r;
  endfunction

  typedef struct {
    real sndr, sfdr, enob;
  } dyn_t;

  real cos_t [N_FFT], sin_t [N_FFT];

  // SNDR/SFDR of a record of 12-bit codes from a full DFT (bins 1..N/2-1).
  function automatic dyn_t spectrum(ref int x [N_FFT]);
    dyn_t r;
    real  mean = 0.0, re, im, p, p_sig = 0.0, p_rest = 0.0, p_spur = 0.0;
    for (int n = 0; n < N_FFT; n++) mean += real'(x[n]);
    mean /= real'(N_FFT);
    for (int k = 1; k < N_FFT / 2; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < N_FFT; n++) begin
        re += (real'(x[n]) - mean) * cos_t[(k * n) % N_FFT];
        im -= (real'(x[n]) - mean) * sin_t[(k * n) % N_FFT];
      end
      p = re * re + im * im;
      if (k == FFT_CYCLES) p_sig = p;
      else begin
        p_rest += p;
        if (p > p_spur) p_spur = p;
      end
    end
    r.sndr = 10.0 * $log10(p_sig / p_rest);
    r.sfdr = 10.0 * $log10(p_sig / p_spur);
    r.enob = (r.sndr - 1.76) / 6.02;
    return r;
  endfunction

  int h_raw [N_CODES], h_cal [N_CODES], h_ideal [N_CODES];
  int x_raw [N_FFT], x_cal [N_FFT];
  real v_hist [N_RAMP + N_NORM];

  initial begin
    real  w_cal, w_ideal;
    lin_t l_raw, l_cal, l_ideal;
    dyn_t d_raw, d_cal;
    real  err, err_max;
    logic [N_NORM:1][1:0] c;
    err_max = 0.0;
    rst = 1'b1; start = 1'b0; vin = 0.0;
    repeat (4) @(posedge clk);
    @(negedge clk); rst = 1'b0;

    // calibration
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (calibration_complete);
    @(negedge clk);
    w_cal   = to_real(weight);
    w_ideal = 1.0 / (2.0 * (1.0 - (2.0 + 0.1) / 40.0));
    $display("calibrated weight %f (stage gain %f)", w_cal, 1.0 / w_cal);
    check(calibration_complete && cal_sel == 4'd0, "calibration did not finish in normal mode");

    // ramp in normal mode; the normal path's aligned codes belong to the
    // sample applied N_NORM clocks earlier
    for (int k = 0; k < N_CODES; k++) begin
      h_raw[k] = 0; h_cal[k] = 0; h_ideal[k] = 0;
    end
    for (int n = 0; n < N_RAMP + N_NORM; n++) begin
      vin = (n < N_RAMP) ? -VREF + 2.0 * VREF * (real'(n) + 0.5) / real'(N_RAMP) : VREF;
      v_hist[n] = vin;
      @(negedge clk);
      if (n >= N_NORM) begin
        c = dut.codes_norm_al;
        err = rebuild(c, w_ideal) - v_hist[n - N_NORM];
        if (err < 0.0) err = -err;
        if (err > err_max) err_max = err;
        h_raw[quantize(rebuild(c, 0.5))]++;
        h_cal[quantize(rebuild(c, w_cal))]++;
        h_ideal[quantize(rebuild(c, w_ideal))]++;
      end
    end

    l_raw   = linearity(h_raw);
    l_cal   = linearity(h_cal);
    l_ideal = linearity(h_ideal);
    $display("before calibration: DNL %.2f/%.2f LSB, INL %.2f/%.2f LSB, %0d missing codes",
             l_raw.dnl_max, l_raw.dnl_min, l_raw.inl_max, l_raw.inl_min, l_raw.missing);
    $display("after calibration:  DNL %.2f/%.2f LSB, INL %.2f/%.2f LSB, %0d missing codes",
             l_cal.dnl_max, l_cal.dnl_min, l_cal.inl_max, l_cal.inl_min, l_cal.missing);
    $display("exact weight:       DNL %.2f/%.2f LSB, INL %.2f/%.2f LSB, %0d missing codes",
             l_ideal.dnl_max, l_ideal.dnl_min, l_ideal.inl_max, l_ideal.inl_min, l_ideal.missing);

    $display("largest ramp reconstruction error with the exact weight: %.3f LSB",
             err_max / (2.0 * VREF / N_CODES));
    check(err_max < 2.0 * VREF / N_CODES, "normal-path codes do not match the input N_NORM clocks earlier");
    check(l_raw.missing > 0, "uncalibrated output has no missing codes");
    check(l_raw.inl_max - l_raw.inl_min > 60.0, "uncalibrated INL unexpectedly small");
    check(l_cal.missing == 0, "calibrated output still misses codes");
    check(l_cal.dnl_max < 1.0 && l_cal.dnl_min > -1.0, "calibrated DNL outside +/-1 LSB");
    check(l_cal.inl_max < 1.5 && l_cal.inl_min > -1.5, "calibrated INL outside +/-1.5 LSB");

    // coherently sampled sine, converted in normal mode
    for (int n = 0; n < N_FFT; n++) begin
      cos_t[n] = $cos(2.0 * PI * real'(n) / real'(N_FFT));
      sin_t[n] = $sin(2.0 * PI * real'(n) / real'(N_FFT));
    end
    for (int n = 0; n < N_FFT + N_NORM; n++) begin
      vin = 0.99 * VREF * $sin(2.0 * PI * real'(FFT_CYCLES) * real'(n) / real'(N_FFT) + 0.3);
      @(negedge clk);
      if (n >= N_NORM) begin
        c = dut.codes_norm_al;
        x_raw[n - N_NORM] = quantize(rebuild(c, 0.5));
        x_cal[n - N_NORM] = quantize(rebuild(c, w_cal));
      end
    end
    d_raw = spectrum(x_raw);
    d_cal = spectrum(x_cal);
    $display("sine before calibration: SNDR %.2f dB, SFDR %.2f dB, ENOB %.2f", d_raw.sndr, d_raw.sfdr, d_raw.enob);
    $display("sine after calibration:  SNDR %.2f dB, SFDR %.2f dB, ENOB %.2f", d_cal.sndr, d_cal.sfdr, d_cal.enob);
    check(d_raw.sndr < 50.0, "uncalibrated SNDR unexpectedly high");
    check(d_cal.sndr > 70.0, "calibrated SNDR below 70 dB");
    check(d_cal.sfdr > 75.0, "calibrated SFDR below 75 dB");
    check(d_cal.sndr - d_raw.sndr > 20.0, "calibration gains less than 20 dB SNDR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
