// redundancy_removal: digital error correction of a 1.5 bit per stage
// pipelined ADC.
//
// Each stage gives a 2-bit code; the codes of consecutive stages overlap by
// one bit, so the code of stage s is added at weight 2^(N_STAGES - s) and the
// overlapping bits are summed with carry. The last stage (the 2-bit flash)
// lands at weight 1, its low bit becoming the LSB. With codes at most 10 for
// the stages and 11 for the flash the sum never exceeds N_STAGES+1 bits.
// Output bit D_k (k = 1 is the MSB) is word[N_STAGES+1-k]. Example for four
// bits: codes 10, 01, 10 give 1100. Combinational; the codes must already be
// aligned to one sample. During calibration of stage i only stages i and
// later take part: codes of stages below first_stage are ignored
// (first_stage = 0 or 1 uses every stage).
module redundancy_removal #(
  parameter int N_STAGES = 14
) (
  input  logic [N_STAGES:1][1:0] codes,
  input  logic [3:0]             first_stage,
  output logic [N_STAGES:0]      word
);

  always_comb begin
    word = '0;
    for (int s = 1; s <= N_STAGES; s++)
      if (s >= int'(first_stage))
        word = word + ((N_STAGES + 1)'(codes[s]) << (N_STAGES - s));
  end

endmodule
