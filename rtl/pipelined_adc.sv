// pipelined_adc: BEHAVIOURAL MODEL (not synthesizable) of the pipelined ADC
// in its calibration configuration: N_STAGES-1 stages of 1.5 bit followed by
// a 2-bit flash, N_STAGES+1 bits in all (15 by default).
//
// Stages 1..N_ERR_STAGES have finite op-amp gain A_OL; the following stages
// (the two extra stages used only for calibration) and the flash are ideal.
// cal_sel = 0 feeds vin to stage 1 and chains residues normally; cal_sel = i
// opens the switch in front of stage i and applies VrefH (= VREF) to it, the
// stages before it then take no part. Each stage registers on the rising
// clock, so stage s gives its code for a sample s clocks after the sample
// entered stage 1 (the codes are not yet aligned; see stage_align).
// codes[s] is the 2-bit code of stage s. The two extra stages take part only
// in calibration: with cal_mode = 0 the flash converts the residue of stage
// N_ERR_STAGES directly (the normal 12-bit converter, whose flash code then
// appears N_ERR_STAGES+1 clocks after the sample), with cal_mode = 1 it
// converts the residue of stage N_STAGES-1.
module pipelined_adc #(
  parameter int  N_STAGES     = 14,
  parameter int  N_ERR_STAGES = 11,
  parameter real VREF         = 1.0,
  parameter real A_OL         = 40.0,
  parameter real CP_RATIO     = 0.1
) (
  input  logic                     clk,
  input  real                      vin,
  input  logic                     cal_mode,
  input  logic [3:0]               cal_sel,
  output logic [N_STAGES:1][1:0]   codes
);

  real sin [1:N_STAGES];
  real sres [1:N_STAGES];

  for (genvar s = 1; s <= N_STAGES; s++) begin : g_stage
    if (s == 1) begin : g_in
      assign sin[s] = (int'(cal_sel) == s) ? VREF : vin;
    end else begin : g_in
      assign sin[s] = (int'(cal_sel) == s) ? VREF :
                      (s == N_STAGES && !cal_mode) ? sres[N_ERR_STAGES] : sres[s-1];
    end
    if (s < N_STAGES) begin : g_pipe
      logic [1:0] c;
      pipeline_stage #(
        .VREF(VREF), .A_OL(A_OL), .CP_RATIO(CP_RATIO),
        .IDEAL(s > N_ERR_STAGES)
      ) u_stage (.clk, .vin(sin[s]), .code(c), .vres(sres[s]));
      assign codes[s] = c;
    end else begin : g_flash
      logic [1:0] c;
      flash_adc2 #(.VREF(VREF)) u_flash (.clk, .vin(sin[s]), .code(c));
      assign codes[s] = c;
      assign sres[s]  = 0.0;
    end
  end

endmodule
