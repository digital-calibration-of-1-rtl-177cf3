// adc_cal_top: a 12-bit, 1.5 bit per stage pipelined ADC with foreground
// digital calibration of its inter-stage gain error.
//
// The converter (a behavioural model of the analog part, 11 stages with
// finite op-amp gain, 2 extra ideal stages and a 2-bit flash) has two
// digital back ends. In normal operation the extra stages are bypassed and
// stages 1..11 plus the flash give the 13-bit output adc_code (12-bit
// resolution plus one bit of headroom for the reduced stage gain). During
// calibration the extra stages are switched in and stages 1..14 give the
// 15-bit word cal_word; while stage i receives the reference, only stages
// i..14 enter its redundancy removal. A pulse on start (with rst low) runs the
// calibration: the capture sequencer applies VrefH to stages 11..1 in turn
// and stores each stage's D_i..D_15 bits; when it is done it releases the
// calibration engine's reset, and the engine computes by LMS the weights
// w_11..w_1. It ends with calibration_complete = 1 and weight = w_1, the
// reciprocal of the stage gain, in the 21-bit floating point format.
// Outside calibration the converter runs on vin. The structure follows the
// calibration method; releasing the engine's reset from the capture
// sequencer is this design's way of triggering it.
// Timing: all registers on the rising edge of clk; rst synchronous, active high.
module adc_cal_top
  import fp21_pkg::*;
  import cal_pkg::*;
#(
  parameter real A_OL     = 40.0,
  parameter real CP_RATIO = 0.1,
  parameter real VREF     = 1.0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  real               vin,
  output logic [N_CALI-3:0] adc_code,
  output logic [N_CALI-1:0] cal_word,
  output logic              capture_done,
  output logic              calibration_complete,
  output fp21_t             weight,
  output cal_state_t        cal_state,
  output logic [STG_W-1:0]  cal_stage,
  output logic [3:0]        cal_sel
);

  localparam int N_NORM = N_CAL_STG + 1;   // 11 stages + flash in normal use

  logic [N_STAGES:1][1:0] codes_raw, codes_al;
  logic [N_NORM:1][1:0]   codes_norm, codes_norm_al;
  logic                   bit_we, bit_wdata, cal_rst, cal_mode;
  logic [BIT_AW-1:0]      bit_waddr;

  pipelined_adc #(
    .N_STAGES(N_STAGES), .N_ERR_STAGES(N_CAL_STG),
    .VREF(VREF), .A_OL(A_OL), .CP_RATIO(CP_RATIO)
  ) u_adc (.clk, .vin, .cal_mode, .cal_sel, .codes(codes_raw));

  assign cal_mode = (cal_sel != 4'd0);

  // normal conversion: stages 1..11 and the flash
  assign codes_norm = {codes_raw[N_STAGES], codes_raw[N_CAL_STG:1]};

  stage_align #(.N_STAGES(N_NORM)) u_align_norm (
    .clk, .codes_in(codes_norm), .codes_out(codes_norm_al)
  );

  redundancy_removal #(.N_STAGES(N_NORM)) u_rr_norm (
    .codes(codes_norm_al), .first_stage(4'd0), .word(adc_code)
  );

  // calibration conversion: stages 1..14

  stage_align #(.N_STAGES(N_STAGES)) u_align (
    .clk, .codes_in(codes_raw), .codes_out(codes_al)
  );

  redundancy_removal #(.N_STAGES(N_STAGES)) u_rr (
    .codes(codes_al), .first_stage(cal_sel), .word(cal_word)
  );

  cal_capture u_cap (
    .clk, .rst, .start, .adc_word(cal_word), .cal_sel, .bit_we, .bit_waddr, .bit_wdata,
    .done(capture_done)
  );

  assign cal_rst = rst || !capture_done;

  cal_logic u_cal (
    .clk, .rst(cal_rst), .bit_we, .bit_waddr, .bit_wdata,
    .calibration_complete, .weight, .state_o(cal_state), .stage_o(cal_stage)
  );

endmodule
