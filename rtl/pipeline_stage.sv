// pipeline_stage: BEHAVIOURAL MODEL (not synthesizable) of one 1.5 bit
// pipelined ADC stage, with analog voltages carried as real numbers.
//
// On each rising clock the stage samples vin (sample and hold), its 2-bit
// sub-ADC compares it with -VREF/4 and +VREF/4 and gives code 00 / 01 / 10
// (decision d = -1 / 0 / +1), the sub-DAC turns d into -VREF / 0 / +VREF, and
// the amplifier forms the residue
//   vres = (1 - 1/(A*beta)) * (2*vin - d*VREF),   beta = Cf/(Cs + Cf + Cp).
// Capacitors Cs and Cf are matched and the amplifier bandwidth is unlimited,
// so finite open-loop gain A is the only error. IDEAL = 1 removes it (gain
// exactly 2), as for the extra calibration stages. With the defaults A = 40
// and Cp = 0.1*Cf the stage gain is 2*(1 - 2.1/40) = 1.895.
// Code, decisions and gain equation follow the stage description; the
// parasitic ratio CP_RATIO is this model's choice. Code and vres are valid
// one clock after the sample.
module pipeline_stage #(
  parameter real VREF     = 1.0,
  parameter real A_OL     = 40.0,
  parameter real CP_RATIO = 0.1,
  parameter bit  IDEAL    = 1'b0
) (
  input  logic       clk,
  input  real        vin,
  output logic [1:0] code,
  output real        vres
);

  localparam real BETA = 1.0 / (2.0 + CP_RATIO);
  localparam real K    = IDEAL ? 1.0 : (1.0 - 1.0 / (A_OL * BETA));

  real vdac;
  logic [1:0] c;

  always_comb begin
    if (vin < -VREF / 4.0) begin
      c    = 2'b00;
      vdac = -VREF;
    end else if (vin < VREF / 4.0) begin
      c    = 2'b01;
      vdac = 0.0;
    end else begin
      c    = 2'b10;
      vdac = VREF;
    end
  end

  always_ff @(posedge clk) begin
    code <= c;
    vres <= K * (2.0 * vin - vdac);
  end

endmodule
