// tb_cal_controller: checks the main calibration FSM on its own, with a
// memory model in the testbench. It checks that every state change is one of
// the transitions of the calibration flow (RESET->READ, READ->CALC_VBE or
// CALC_VTOT, CALC_VBE->READ, CALC_VTOT->CALC_VERR->COMPARE_VERR,
// COMPARE_VERR->UPDATE_W or MEM_WRITE, UPDATE_W->CALC_VTOT, MEM_WRITE->READ
// or CALI_DONE), that weights are written for stages 11..1 in that order with
// the values of the reference model, that bits are read at the addresses of
// stage i (D_15 first), and that reset in mid-run restarts at stage 11.
module tb_cal_controller;
  import fp21_pkg::*;
  import cal_pkg::*;
  import fp21_ref_pkg::*;
  import cal_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [BIT_AW-1:0] bit_raddr;
  logic bit_rdata;
  logic [STG_W-1:0] w_raddr, w_waddr, stage_o;
  fp21_t w_rdata, w_wdata, weight;
  logic w_we, calibration_complete;
  fp21_t vrefh;
  cal_state_t state_o;

  logic mem_bits [N_BITS_MEM];
  logic [20:0] mem_w [1:14];
  int checks = 0, failures = 0, n_wr = 0, exp_stage = 11;
  cal_result_t r;
  cal_state_t prev = C_RESET;

  cal_controller dut (.*);

  assign vrefh     = from_real(1.0);
  assign bit_rdata = mem_bits[bit_raddr];
  assign w_rdata   = (w_raddr >= 1 && w_raddr <= 14) ? mem_w[w_raddr] : from_real(0.5);

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit legal(cal_state_t a, cal_state_t b);
    case (a)
      C_RESET:        return b == C_READ;
      C_READ:         return b == C_CALC_VBE || b == C_CALC_VTOT;
      C_CALC_VBE:     return b == C_READ;
      C_CALC_VTOT:    return b == C_CALC_VERR;
      C_CALC_VERR:    return b == C_COMPARE_VERR;
      C_COMPARE_VERR: return b == C_UPDATE_W || b == C_MEM_WRITE;
      C_UPDATE_W:     return b == C_CALC_VTOT;
      C_MEM_WRITE:    return b == C_READ || b == C_CALI_DONE;
      default:        return 1'b0;
    endcase
  endfunction

  always @(negedge clk) begin
    if (!rst) begin
      if (state_o != prev)
        check(legal(prev, state_o), $sformatf("transition %s -> %s", prev.name(), state_o.name()));
      if (state_o == C_READ)
        check(bit_raddr == bit_addr(int'(stage_o), int'(w_raddr)) && w_raddr >= stage_o,
              $sformatf("read address %0d for stage %0d bit %0d", bit_raddr, stage_o, w_raddr));
      if (w_we) begin
        n_wr++;
        check(int'(w_waddr) == exp_stage, $sformatf("write to w%0d, expected w%0d", w_waddr, exp_stage));
        check(w_wdata == r.w[w_waddr], $sformatf("w%0d = %h expected %h", w_waddr, w_wdata, r.w[w_waddr]));
        mem_w[w_waddr] <= w_wdata;
        exp_stage--;
      end
    end
    prev <= rst ? C_RESET : state_o;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(real a_ol);
    logic [14:0] words [1:11];
    for (int i = 1; i <= 11; i++) words[i] = adc_word(i, a_ol, 0.1);
    r = calibrate(words);
    for (int i = 1; i <= 11; i++)
      for (int k = i; k <= 15; k++) mem_bits[bit_addr(i, k)] = words[i][15 - k];
    for (int j = 1; j <= 14; j++) mem_w[j] = from_real(0.5);
  endtask

  initial begin
    load(40.0);
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // abort in the middle of stage 10 and restart
    wait (stage_o == 4'd10 && state_o == C_UPDATE_W);
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    check(state_o == C_RESET && stage_o == 4'd11 && !calibration_complete, "reset mid-run");
    load(60.0);
    exp_stage = 11;
    n_wr = 0;
    rst = 1'b0;
    wait (calibration_complete);
    @(negedge clk);
    check(n_wr == 11, $sformatf("%0d weight writes", n_wr));
    check(weight == r.w[1], "final weight");
    repeat (3) @(negedge clk);
    check(state_o == C_CALI_DONE && weight == r.w[1], "CALI_DONE held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
