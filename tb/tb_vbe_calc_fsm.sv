// tb_vbe_calc_fsm: checks one Horner step res = vbe*w +/- vrefh/2 of the
// V_be / V_tot FSM. For random operands and both bit values it releases the
// FSM from reset, checks that done rises exactly 4 clocks later, that res
// equals the value worked out with rounded real arithmetic, and that done
// and res are held until reset is raised again.
module tb_vbe_calc_fsm;
  import fp21_pkg::*;
  import fp21_ref_pkg::*;

  logic  clk = 1'b0, rst = 1'b1, d;
  fp21_t vbe, w, vrefh, res;
  logic  done;
  int checks = 0, failures = 0;

  vbe_calc_fsm dut (.clk, .rst, .d, .vbe, .w, .vrefh, .done, .res);

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
    logic [20:0] r1, r2, expv;
    int lat;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      rst   = 1'b1;
      d     = 1'($urandom);
      vbe   = (n % 10 == 0) ? FP_ZERO : {1'($urandom), 6'(26 + $urandom % 8), 14'($urandom)};
      w     = {1'b0, 6'(28 + $urandom % 4), 14'($urandom)};
      vrefh = (n % 2 == 0) ? from_real(1.0) : {1'b0, 6'(30 + $urandom % 3), 14'($urandom)};
      @(negedge clk);
      check(!done, "done while in reset");
      rst = 1'b0;
      lat = 0;
      while (!done && lat < 20) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 4, $sformatf("latency %0d", lat));
      r1   = from_real(to_real(vrefh) * (d ? 0.5 : -0.5));
      r2   = from_real(to_real(vbe) * to_real(w));
      expv = from_real(to_real(r1) + to_real(r2));
      check(res == expv, $sformatf("res %h expected %h", res, expv));
      repeat (3) @(negedge clk);
      check(done && res == expv, "result not held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
