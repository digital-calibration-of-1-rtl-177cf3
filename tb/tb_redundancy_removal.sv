// tb_redundancy_removal: checks redundancy removal of a 3-stage (4-bit) and
// a 14-stage (15-bit) pipeline: the 4-bit example 10, 01, 10 -> 1100, all
// code combinations of the 4-bit case, random codes of the 15-bit case
// against the weighted sum sum(code_s * 2^(N_STAGES-s)), and the masking of
// stages below first_stage.
module tb_redundancy_removal;
  logic [3:1][1:0]  c4;
  logic [3:0]       w4;
  logic [14:1][1:0] c15;
  logic [14:0]      w15;
  logic [3:0]       first4, first15;
  int checks = 0, failures = 0;

  redundancy_removal #(.N_STAGES(3))  dut4  (.codes(c4), .first_stage(first4), .word(w4));
  redundancy_removal dut15 (.codes(c15), .first_stage(first15), .word(w15));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned e;
    first4 = 4'd0; first15 = 4'd0;
    c4 = {2'b10, 2'b01, 2'b10};
    #1;
    check(w4 == 4'b1100, $sformatf("example gives %b", w4));
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        for (int f = 0; f < 4; f++) begin
          c4 = {2'(f), 2'(b), 2'(a)};   // c4[1] is stage 1
          #1;
          check(int'(w4) == a * 4 + b * 2 + f, $sformatf("4-bit %0d %0d %0d -> %0d", a, b, f, w4));
        end
    for (int n = 0; n < 3000; n++) begin
      first15 = (n % 3 == 0) ? 4'(1 + $urandom % 11) : 4'd0;
      e = 0;
      for (int s = 1; s <= 14; s++) begin
        c15[s] = (s == 14) ? 2'($urandom) : 2'($urandom % 3);
        if (s >= int'(first15)) e += int'(c15[s]) << (14 - s);
      end
      #1;
      check(int'(w15) == int'(e), $sformatf("15-bit word %0d expected %0d", w15, e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
