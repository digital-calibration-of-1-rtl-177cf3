// stage_align: time alignment of the stage codes of a pipelined ADC.
//
// Stage s of an N_STAGES pipeline resolves a given sample s clocks after it
// was taken, so its code is delayed by N_STAGES - s further clocks (the last
// stage not at all). After that every code at the output belongs to the same
// sample, N_STAGES clocks after it entered the pipeline, and redundancy
// removal can add them. The need for alignment follows the data latency of
// the pipeline; a shift register per stage is this design's implementation.
module stage_align #(
  parameter int N_STAGES = 14
) (
  input  logic                   clk,
  input  logic [N_STAGES:1][1:0] codes_in,
  output logic [N_STAGES:1][1:0] codes_out
);

  for (genvar s = 1; s <= N_STAGES; s++) begin : g_dly
    localparam int DEPTH = N_STAGES - s;
    if (DEPTH == 0) begin : g_none
      assign codes_out[s] = codes_in[s];
    end else begin : g_sr
      logic [DEPTH-1:0][1:0] sr;
      always_ff @(posedge clk) begin
        sr[0] <= codes_in[s];
        for (int j = 1; j < DEPTH; j++) sr[j] <= sr[j-1];
      end
      assign codes_out[s] = sr[DEPTH-1];
    end
  end

endmodule
