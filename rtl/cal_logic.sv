// cal_logic: the calibration engine as a unit: main controller plus memory.
//
// Inputs are the clock (50 MHz in the reference implementation) and an
// active-high synchronous reset; outputs are the 21-bit floating point weight
// (the reciprocal of the stage gain, w_1) and the Calibration_Complete flag.
// While reset is high the weights return to 0.5 and the controller idles;
// the first clock with reset low starts calibration. The 110 calibration bits
// are written beforehand through the bit load port, which works whether or
// not reset is high. This block arrangement (controller and memory, the
// memory's contents) follows the calibration engine's description; the load
// port is this design's own way of filling the bit store.
module cal_logic
  import fp21_pkg::*;
  import cal_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              bit_we,
  input  logic [BIT_AW-1:0] bit_waddr,
  input  logic              bit_wdata,
  output logic              calibration_complete,
  output fp21_t             weight,
  output cal_state_t        state_o,
  output logic [STG_W-1:0]  stage_o
);

  logic [BIT_AW-1:0] bit_raddr;
  logic              bit_rdata;
  logic [STG_W-1:0]  w_raddr, w_waddr;
  fp21_t             w_rdata, w_wdata, vrefh;
  logic              w_we;

  cal_memory u_mem (
    .clk, .rst, .bit_we, .bit_waddr, .bit_wdata, .bit_raddr, .bit_rdata,
    .w_raddr, .w_rdata, .w_we, .w_waddr, .w_wdata, .vrefh
  );

  cal_controller u_ctrl (
    .clk, .rst, .bit_raddr, .bit_rdata, .w_raddr, .w_rdata, .w_we, .w_waddr,
    .w_wdata, .vrefh, .calibration_complete, .weight, .state_o, .stage_o
  );

endmodule
