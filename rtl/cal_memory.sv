// cal_memory: storage of the calibration engine: 110 calibration bits of the
// ADC, the weights w1..w14 (21-bit floating point each) and the constant VrefH.
//
// The bit store is written one bit per clock through the load port (from the
// capture sequencer) and read combinationally by the controller. The weight
// store has one combinational read port and one write port. rst (synchronous)
// sets every weight to the ideal 0.5 and reloads VrefH; it leaves the bit
// store alone, so calibration can be reset and rerun on the same bits.
// Weight index 15 is not stored: it reads as 0.5, the ideal weight, and it is
// only ever applied to a zero back-end voltage.
// Contents and sizes follow the calibration engine's memory map (110 bits,
// 14 weights, VrefH); the port arrangement and reset values are this
// design's own.
module cal_memory
  import fp21_pkg::*;
  import cal_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // calibration bit store
  input  logic              bit_we,
  input  logic [BIT_AW-1:0] bit_waddr,
  input  logic              bit_wdata,
  input  logic [BIT_AW-1:0] bit_raddr,
  output logic              bit_rdata,
  // weights, index 1..14
  input  logic [STG_W-1:0]  w_raddr,
  output fp21_t             w_rdata,
  input  logic              w_we,
  input  logic [STG_W-1:0]  w_waddr,
  input  fp21_t             w_wdata,
  // stored reference
  output fp21_t             vrefh
);

  logic  bits [N_BITS_MEM];
  fp21_t weights [1:N_WEIGHTS];
  fp21_t vrefh_q;

  always_ff @(posedge clk) begin
    if (bit_we && int'(bit_waddr) < N_BITS_MEM) bits[bit_waddr] <= bit_wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 1; j <= N_WEIGHTS; j++) weights[j] <= FP_HALF;
      vrefh_q <= VREFH_FP;
    end else if (w_we && w_waddr >= 1 && int'(w_waddr) <= N_WEIGHTS) begin
      weights[w_waddr] <= w_wdata;
    end
  end

  assign bit_rdata = (int'(bit_raddr) < N_BITS_MEM) ? bits[bit_raddr] : 1'b0;
  assign w_rdata   = (w_raddr >= 1 && int'(w_raddr) <= N_WEIGHTS) ? weights[w_raddr] : FP_HALF;
  assign vrefh     = vrefh_q;

endmodule
