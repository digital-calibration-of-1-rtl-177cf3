// vbe_calc_fsm: one Horner step of the back-end voltage estimate,
//   res = vbe * w + (d ? +VrefH/2 : -VrefH/2).
// The main controller uses it with the weight w_k of a back-end bit to grow
// V_be, and with the weight w_i of the stage under calibration to form V_tot.
//
// States (as the calibration engine specifies them): RESET (idle while rst is
// high), READ_INPUTS (the bit d chooses the factor +1/2 or -1/2), MULT1
// (res1 = VrefH * factor), MULT2 (res2 = vbe * w), ADD (res = res1 + res2,
// done = 1). The FSM stays in ADD with done high until rst is raised again,
// which is how the controller starts and stops it. One multiplier is shared by
// MULT1 and MULT2. Inputs must be stable from the release of rst until done.
// Timing: done rises 4 clocks after rst falls; rst is synchronous.
module vbe_calc_fsm
  import fp21_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  d,
  input  fp21_t vbe,
  input  fp21_t w,
  input  fp21_t vrefh,
  output logic  done,
  output fp21_t res
);

  typedef enum logic [2:0] {V_RESET, V_READ_INPUTS, V_MULT1, V_MULT2, V_ADD} vbe_state_t;
  vbe_state_t state;

  fp21_t factor, res1, res2;
  fp21_t mul_a, mul_b, mul_y;

  assign mul_a = (state == V_MULT1) ? vrefh  : vbe;
  assign mul_b = (state == V_MULT1) ? factor : w;

  fp21_mult u_mult (.a(mul_a), .b(mul_b), .y(mul_y));
  fp21_add  u_add  (.a(res1), .b(res2), .sub(1'b0), .y(res));

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= V_RESET;
      factor <= FP_ZERO;
      res1   <= FP_ZERO;
      res2   <= FP_ZERO;
    end else begin
      unique case (state)
        V_RESET:       state <= V_READ_INPUTS;
        V_READ_INPUTS: begin
          factor <= d ? FP_HALF : fp_neg(FP_HALF);
          state  <= V_MULT1;
        end
        V_MULT1: begin
          res1  <= mul_y;
          state <= V_MULT2;
        end
        V_MULT2: begin
          res2  <= mul_y;
          state <= V_ADD;
        end
        V_ADD:   state <= V_ADD;
        default: state <= V_RESET;
      endcase
    end
  end

  assign done = (state == V_ADD);

  // Handshake: done, once given, and its result hold until rst is raised.
  a_done_holds: assert property (@(posedge clk) disable iff (rst) done |=> done && $stable(res));

endmodule
