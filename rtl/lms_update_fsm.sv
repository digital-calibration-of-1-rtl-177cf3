// lms_update_fsm: LMS weight update with unit step size,
//   w_new = w_old + verr * vbe.
//
// States (as the calibration engine specifies them): RESET (idle while rst is
// high), MULT1 (the update factor verr * vbe is formed and registered), ADD
// (w_new = w_old + factor, done = 1). The FSM then waits in ADD until rst is
// raised again. Because the step size is one, no multiplication by mu is
// needed. Inputs must be stable from the release of rst until done.
// Timing: done rises 2 clocks after rst falls; rst is synchronous.
module lms_update_fsm
  import fp21_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  fp21_t vbe,
  input  fp21_t verr,
  input  fp21_t w_old,
  output logic  done,
  output fp21_t w_new
);

  typedef enum logic [1:0] {L_RESET, L_MULT1, L_ADD} lms_state_t;
  lms_state_t state;

  fp21_t prod, factor;

  fp21_mult u_mult (.a(vbe), .b(verr), .y(prod));
  fp21_add  u_add  (.a(w_old), .b(factor), .sub(1'b0), .y(w_new));

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= L_RESET;
      factor <= FP_ZERO;
    end else begin
      unique case (state)
        L_RESET: state <= L_MULT1;
        L_MULT1: begin
          factor <= prod;
          state  <= L_ADD;
        end
        L_ADD:   state <= L_ADD;
        default: state <= L_RESET;
      endcase
    end
  end

  assign done = (state == L_ADD);

  // Handshake: done, once given, and its result hold until rst is raised.
  a_done_holds: assert property (@(posedge clk) disable iff (rst) done |=> done && $stable(w_new));

endmodule
