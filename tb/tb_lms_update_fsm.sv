// tb_lms_update_fsm: checks the LMS weight update w_new = w_old + verr*vbe.
// For random operands it releases the FSM from reset, checks that done rises
// exactly 2 clocks later, that w_new equals the value worked out with rounded
// real arithmetic, and that the result is held until reset.
module tb_lms_update_fsm;
  import fp21_pkg::*;
  import fp21_ref_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  fp21_t vbe, verr, w_old, w_new;
  logic  done;
  int checks = 0, failures = 0;

  lms_update_fsm dut (.clk, .rst, .vbe, .verr, .w_old, .done, .w_new);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] f, expv;
    int lat;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      rst   = 1'b1;
      vbe   = {1'($urandom), 6'(28 + $urandom % 4), 14'($urandom)};
      verr  = (n % 9 == 0) ? FP_ZERO : {1'($urandom), 6'(10 + $urandom % 20), 14'($urandom)};
      w_old = {1'b0, 6'(29 + $urandom % 2), 14'($urandom)};
      @(negedge clk);
      check(!done, "done while in reset");
      rst = 1'b0;
      lat = 0;
      while (!done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 2, $sformatf("latency %0d", lat));
      f    = from_real(to_real(vbe) * to_real(verr));
      expv = from_real(to_real(w_old) + to_real(f));
      check(w_new == expv, $sformatf("w_new %h expected %h", w_new, expv));
      repeat (2) @(negedge clk);
      check(done && w_new == expv, "result not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
