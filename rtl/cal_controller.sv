// cal_controller: main FSM of the foreground LMS gain calibration.
//
// The stages are calibrated from i = 11 down to 1. For stage i the stored
// bits D_15 .. D_i are read one per READ visit. For every bit D_k with k > i,
// CALC_VBE folds it into the back-end voltage with the already calibrated
// weight of that bit, V_be = V_be*w_k + (D_k ? +VrefH/2 : -VrefH/2), starting
// from V_be = 0. When k reaches i the loop CALC_VTOT -> CALC_VERR ->
// COMPARE_VERR -> UPDATE_W -> CALC_VTOT runs: V_tot = V_be*w_i +/- VrefH/2,
// V_err = VrefH - V_tot, and while |V_err| is not below 1/4 LSB the weight is
// updated by LMS, w_i += V_err*V_be. MEM_WRITE stores w_i and moves to the
// next stage; after stage 1 the FSM stops in CALI_DONE, where
// calibration_complete is 1 and weight carries w_1 (otherwise weight is 0).
//
// The state list, the order of operations and the stop rule follow the
// calibration engine as specified. Choices of this design: the error test
// uses the magnitude |V_err| (a negative error ends the loop only when it is
// small too), the two sub-FSMs are started and stopped through their
// synchronous resets, and the weight output reads 0 before completion.
// There is no limit on LMS iterations, as in the original algorithm.
// Timing: rst is synchronous and active high; calibration starts on the
// first clock with rst low. A CALC_VBE step takes 5 clocks plus one READ.
module cal_controller
  import fp21_pkg::*;
  import cal_pkg::*;
#(
  parameter fp21_t QUARTER_LSB = QUARTER_LSB_FP
) (
  input  logic              clk,
  input  logic              rst,
  // memory
  output logic [BIT_AW-1:0] bit_raddr,
  input  logic              bit_rdata,
  output logic [STG_W-1:0]  w_raddr,
  input  fp21_t             w_rdata,
  output logic              w_we,
  output logic [STG_W-1:0]  w_waddr,
  output fp21_t             w_wdata,
  input  fp21_t             vrefh,
  // results
  output logic              calibration_complete,
  output fp21_t             weight,
  // observation
  output cal_state_t        state_o,
  output logic [STG_W-1:0]  stage_o
);

  cal_state_t       state;
  logic [STG_W-1:0] i, k;
  logic             d_q;
  fp21_t            wk_q, w_cur, vbe, vtot, verr;

  // sub-FSMs
  logic  vbe_rst, vbe_done, lms_rst, lms_done;
  fp21_t vbe_res, lms_w_new, err_y;
  logic  cmp_lt, cmp_mag_lt;

  assign vbe_rst = !(state == C_CALC_VBE || state == C_CALC_VTOT);
  assign lms_rst = (state != C_UPDATE_W);

  vbe_calc_fsm u_vbe (
    .clk, .rst(vbe_rst), .d(d_q), .vbe(vbe),
    .w((state == C_CALC_VTOT) ? w_cur : wk_q), .vrefh(vrefh),
    .done(vbe_done), .res(vbe_res)
  );

  lms_update_fsm u_lms (
    .clk, .rst(lms_rst), .vbe(vbe), .verr(verr), .w_old(w_cur),
    .done(lms_done), .w_new(lms_w_new)
  );

  fp21_add     u_err (.a(vrefh), .b(vtot), .sub(1'b1), .y(err_y));
  fp21_compare u_cmp (.a(verr), .b(QUARTER_LSB), .lt(cmp_lt), .mag_lt(cmp_mag_lt));

  assign bit_raddr = bit_addr(int'(i), int'(k));
  assign w_raddr   = k;
  assign w_we      = (state == C_MEM_WRITE);
  assign w_waddr   = i;
  assign w_wdata   = w_cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= C_RESET;
      i     <= STG_W'(N_CAL_STG);
      k     <= STG_W'(N_CALI);
      d_q   <= 1'b0;
      wk_q  <= FP_HALF;
      w_cur <= FP_HALF;
      vbe   <= FP_ZERO;
      vtot  <= FP_ZERO;
      verr  <= FP_ZERO;
    end else begin
      unique case (state)
        C_RESET: state <= C_READ;
        C_READ: begin
          d_q  <= bit_rdata;
          wk_q <= w_rdata;
          if (k == i) begin
            w_cur <= w_rdata;
            state <= C_CALC_VTOT;
          end else begin
            state <= C_CALC_VBE;
          end
        end
        C_CALC_VBE: if (vbe_done) begin
          vbe   <= vbe_res;
          k     <= k - 1'b1;
          state <= C_READ;
        end
        C_CALC_VTOT: if (vbe_done) begin
          vtot  <= vbe_res;
          state <= C_CALC_VERR;
        end
        C_CALC_VERR: begin
          verr  <= err_y;
          state <= C_COMPARE_VERR;
        end
        C_COMPARE_VERR: state <= cmp_mag_lt ? C_MEM_WRITE : C_UPDATE_W;
        C_UPDATE_W: if (lms_done) begin
          w_cur <= lms_w_new;
          state <= C_CALC_VTOT;
        end
        C_MEM_WRITE: begin
          if (i > 1) begin
            i     <= i - 1'b1;
            k     <= STG_W'(N_CALI);
            vbe   <= FP_ZERO;
            state <= C_READ;
          end else begin
            state <= C_CALI_DONE;
          end
        end
        C_CALI_DONE: state <= C_CALI_DONE;
        default:     state <= C_RESET;
      endcase
    end
  end

  assign calibration_complete = (state == C_CALI_DONE);
  assign weight               = calibration_complete ? w_cur : FP_ZERO;
  assign state_o              = state;
  assign stage_o              = i;

  // Only calibrated stages are written back, and completion holds until rst.
  a_wb_stage:   assert property (@(posedge clk) disable iff (rst)
                                 w_we |-> (w_waddr >= 1 && int'(w_waddr) <= N_CAL_STG));
  a_done_holds: assert property (@(posedge clk) disable iff (rst)
                                 calibration_complete |=> calibration_complete && $stable(weight));

endmodule
