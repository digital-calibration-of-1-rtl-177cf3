// tb_adc_cal_top: end-to-end test of the calibrated pipelined ADC at its
// default parameters (op-amp gain 40, stage gain 1.895).
//
// It first converts a slow ramp in normal mode (stages 1..11 and the flash,
// 13-bit output) and checks that the output is monotonic, spans the range
// and, because of the uncalibrated gain error, skips codes; then runs one complete
// calibration: capture of the 110 calibration bits, LMS calibration of
// stages 11..1, and checks the final weight against 1/1.895 computed here
// from the stage model's gain equation. It counts every mechanism of the
// calibration (reference switched into each stage, back-end steps, LMS
// updates, weight write-backs, completion) and fails one that never
// happened. The cycle count of the capture phase is checked exactly.
`timescale 1ns/1ps
module tb_adc_cal_top;
  import fp21_pkg::*;
  import cal_pkg::*;
  import fp21_ref_pkg::*;

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
  int n_vbe = 0, n_vtot = 0, n_upd = 0, n_wr = 0, n_sel_seen = 0;
  logic [11:0] sel_seen = '0;
  longint cycles = 0;

  adc_cal_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) begin
    cycles++;
    if (cal_sel >= 1 && cal_sel <= 11) sel_seen[cal_sel] <= 1'b1;
  end

  cal_state_t prev_state = C_RESET;
  always @(negedge clk) begin
    if (cal_state != prev_state) begin
      case (cal_state)
        C_CALC_VBE:  n_vbe++;
        C_CALC_VTOT: n_vtot++;
        C_UPDATE_W:  n_upd++;
        C_MEM_WRITE: n_wr++;
        default: ;
      endcase
    end
    prev_state <= cal_state;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g, w_exp, w_got;
    int  prev, mono_bad, lo, hi, n_missing;
    bit  hit [8192];
    longint t0, t_cap;
    rst = 1'b1; start = 1'b0; vin = 0.0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;

    // normal conversion of a ramp from -VREF to +VREF
    prev = -1; mono_bad = 0; lo = 1 << 30; hi = -1;
    for (int n = 0; n <= 20000; n++) begin
      vin <= -1.0 + 2.0 * real'(n) / 20000.0;
      @(posedge clk);
      if (n > 2 * N_STAGES) begin
        if (int'(adc_code) < prev) mono_bad++;
        prev = int'(adc_code);
        if (prev < lo) lo = prev;
        if (prev > hi) hi = prev;
        hit[adc_code] = 1'b1;
      end
    end
    n_missing = 0;
    for (int c = lo; c <= hi; c++) if (!hit[c]) n_missing++;
    $display("normal conversion: codes %0d..%0d, %0d missing codes in that span", lo, hi, n_missing);
    check(mono_bad == 0, "ramp conversion not monotonic");
    check(lo < 512 && hi > 8191 - 512, $sformatf("ramp range %0d..%0d too narrow", lo, hi));
    check(n_missing > 0, "uncalibrated gain error shows no missing codes");

    // one complete calibration
    @(negedge clk); start = 1'b1;
    t0 = cycles;
    @(negedge clk); start = 1'b0;
    wait (capture_done);
    t_cap = cycles - t0;
    check(t_cap == 11 * (2 * N_STAGES + 2) + 110 + 1,
          $sformatf("capture took %0d cycles", t_cap));
    wait (calibration_complete);
    @(posedge clk);
    $display("calibration finished after %0d cycles, weight = %b", cycles - t0, weight);

    g     = 2.0 * (1.0 - (2.0 + 0.1) / 40.0);
    w_exp = 1.0 / g;
    w_got = to_real(weight);
    $display("weight %f expected %f (stage gain %f)", w_got, w_exp, 1.0 / w_got);
    check(w_got > w_exp - 0.002 && w_got < w_exp + 0.002, "final weight off");
    check(weight[20] == 1'b0 && weight[19:14] == 6'd30, "weight exponent/sign");

    check(sel_seen[11:1] == '1, "reference not applied to every stage");
    check(n_vbe == (4 + 14) * 11 / 2, $sformatf("CALC_VBE visits %0d", n_vbe));
    check(n_upd > 0, "no LMS update happened");
    check(n_vtot == n_upd + 11, "CALC_VTOT visits do not match updates");
    check(n_wr == 11, $sformatf("MEM_WRITE visits %0d", n_wr));
    check(calibration_complete, "completion flag");
    $display("mechanisms: vbe=%0d vtot=%0d lms_updates=%0d writes=%0d", n_vbe, n_vtot, n_upd, n_wr);

    // weight output is held while complete, and reset clears the flag
    repeat (5) @(posedge clk);
    check(calibration_complete && to_real(weight) == w_got, "result not held");
    @(negedge clk); rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    check(!calibration_complete && weight == FP_ZERO, "reset did not clear completion");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
