// tb_cal_capture: checks the capture sequencer against an ADC stand-in whose
// output word depends on cal_sel and appears only SETTLE-1 clocks after
// cal_sel changes (as a filling pipeline would). It checks that the reference
// is applied to stages 11..1 in turn, that the 110 bit writes go to the
// controller's addresses in order with bit D_k of the word for stage i, that
// the whole run takes 11*SETTLE + 110 + 1 clocks, and that done is held with
// cal_sel back at 0.
module tb_cal_capture;
  import cal_pkg::*;

  localparam int SETTLE = 2 * N_STAGES + 2;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [N_CALI-1:0] adc_word;
  logic [3:0] cal_sel;
  logic bit_we, bit_wdata, done;
  logic [BIT_AW-1:0] bit_waddr;
  logic [3:0] sel_dly [SETTLE-1];
  int checks = 0, failures = 0, n_wr = 0, exp_i = 11, exp_k = 15;
  logic [109:0] written = '0;

  cal_capture dut (.*);

  always #5 clk = ~clk;

  function automatic logic [14:0] word_of(logic [3:0] sel);
    return 15'((int'(sel) * 40503 + 12345) ^ (int'(sel) << 9));
  endfunction

  always @(posedge clk) begin
    sel_dly[0] <= cal_sel;
    for (int j = 1; j < SETTLE - 1; j++) sel_dly[j] <= sel_dly[j-1];
  end
  assign adc_word = word_of(sel_dly[SETTLE-2]);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) begin
    if (bit_we) begin
      n_wr++;
      check(cal_sel == 4'(exp_i), $sformatf("cal_sel %0d while writing stage %0d", cal_sel, exp_i));
      check(bit_waddr == bit_addr(exp_i, exp_k), $sformatf("address %0d for stage %0d bit %0d", bit_waddr, exp_i, exp_k));
      check(bit_wdata == word_of(4'(exp_i))[15 - exp_k], $sformatf("data of stage %0d bit %0d", exp_i, exp_k));
      if (int'(bit_waddr) < 110) written[bit_waddr] <= 1'b1;
      if (exp_k == exp_i) begin
        exp_i--;
        exp_k = 15;
      end else begin
        exp_k--;
      end
    end
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int j = 0; j < SETTLE - 1; j++) sel_dly[j] = 4'd0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    check(cal_sel == 4'd0 && !done && !bit_we, "idle before start");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 5000) begin
      @(negedge clk);
      cyc++;
    end
    check(cyc == 11 * SETTLE + 110 + 1, $sformatf("run took %0d clocks", cyc));
    check(n_wr == 110, $sformatf("%0d writes", n_wr));
    check(written == '1, "not every address written");
    repeat (5) @(negedge clk);
    check(done && cal_sel == 4'd0 && !bit_we, "done not held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
