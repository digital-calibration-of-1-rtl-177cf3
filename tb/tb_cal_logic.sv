// tb_cal_logic: runs the calibration engine (controller + memory) on the
// calibration bits of ADCs with several op-amp gains and checks it against
// the reference model: the final weight and completion flag, every stored
// weight w_1..w_11, and the exact clock count from the release of reset to
// Calibration_Complete. Bits are loaded while reset is high. The op-amp gain
// of 40 V/V is the reference case; its weight must also be within 0.1 % of
// 1/1.895. Each mechanism (back-end steps, V_tot steps, LMS updates, weight
// write-backs) must occur.
module tb_cal_logic;
  import fp21_pkg::*;
  import cal_pkg::*;
  import fp21_ref_pkg::*;
  import cal_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic bit_we = 1'b0, bit_wdata = 1'b0;
  logic [BIT_AW-1:0] bit_waddr = '0;
  logic calibration_complete;
  fp21_t weight;
  cal_state_t state_o;
  logic [STG_W-1:0] stage_o;
  int checks = 0, failures = 0;
  int n_vbe = 0, n_upd = 0, n_wr = 0;
  cal_state_t prev = C_RESET;

  cal_logic dut (.*);

  always #10 clk = ~clk;

  always @(negedge clk) begin
    if (state_o != prev) begin
      if (state_o == C_CALC_VBE)  n_vbe++;
      if (state_o == C_UPDATE_W)  n_upd++;
      if (state_o == C_MEM_WRITE) n_wr++;
    end
    prev <= state_o;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(real a_ol, real cp);
    logic [14:0] words [1:11];
    cal_result_t r;
    int cyc;
    for (int i = 1; i <= 11; i++) words[i] = adc_word(i, a_ol, cp);
    r = calibrate(words);
    @(negedge clk);
    rst = 1'b1;
    for (int i = 11; i >= 1; i--)
      for (int k = 15; k >= i; k--) begin
        bit_we = 1'b1; bit_waddr = bit_addr(i, k); bit_wdata = words[i][15 - k];
        @(negedge clk);
      end
    bit_we = 1'b0;
    rst = 1'b0;
    cyc = 0;
    while (!calibration_complete && cyc < 50000) begin
      @(negedge clk);
      cyc++;
    end
    $display("A=%0.1f: weight %h (%f, gain %f), %0d cycles, %0d updates",
             a_ol, weight, to_real(weight), 1.0 / to_real(weight), cyc, r.total_updates);
    check(calibration_complete, "no completion");
    check(weight == r.w[1], $sformatf("weight %h expected %h", weight, r.w[1]));
    check(cyc == r.cycles, $sformatf("cycles %0d expected %0d", cyc, r.cycles));
    for (int j = 1; j <= 11; j++)
      check(dut.u_mem.weights[j] == r.w[j], $sformatf("stored w%0d %h expected %h", j, dut.u_mem.weights[j], r.w[j]));
    if (a_ol == 40.0 && cp == 0.1) begin
      check(to_real(weight) > 0.999 / 1.895 && to_real(weight) < 1.001 / 1.895, "A=40 weight not 1/1.895");
    end
  endtask

  initial begin
    run(40.0, 0.1);
    run(20.0, 0.1);
    run(100.0, 0.1);
    run(1000.0, 0.0);
    run(40.0, 0.3);
    check(n_vbe == 5 * 99, $sformatf("CALC_VBE visits %0d", n_vbe));
    check(n_upd > 0, "no LMS update");
    check(n_wr == 5 * 11, $sformatf("MEM_WRITE visits %0d", n_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
