// flash_adc2: BEHAVIOURAL MODEL (not synthesizable) of the ideal 2-bit flash
// ADC that ends the pipeline.
//
// On each rising clock vin (a real voltage in -VREF..+VREF) is compared with
// -VREF/2, 0 and +VREF/2, and the thermometer result is encoded as the 2-bit
// code 00..11. Both code bits go to redundancy removal; the low bit becomes
// the LSB of the ADC word. The flash is ideal, as the calibration method
// assumes; the threshold placement is this model's choice. The code is valid
// one clock after the sample.
module flash_adc2 #(
  parameter real VREF = 1.0
) (
  input  logic       clk,
  input  real        vin,
  output logic [1:0] code
);

  always_ff @(posedge clk) begin
    if (vin < -VREF / 2.0)   code <= 2'b00;
    else if (vin < 0.0)      code <= 2'b01;
    else if (vin < VREF / 2.0) code <= 2'b10;
    else                     code <= 2'b11;
  end

endmodule
