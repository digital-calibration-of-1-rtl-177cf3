// tb_fp21_add: checks the 21-bit floating point adder/subtractor against
// sums worked out in real arithmetic and rounded to nearest-even by the
// reference package: random operands of either sign with exponent gaps up to
// 30, exact cancellation, zero operands, tiny addends and overflow.
module tb_fp21_add;
  import fp21_pkg::*;
  import fp21_ref_pkg::*;

  fp21_t a, b, y;
  logic  sub;
  int checks = 0, failures = 0;

  fp21_add dut (.a, .b, .sub, .y);

  task automatic try(logic [20:0] ta, logic [20:0] tb_, logic s, logic [20:0] exp_y);
    a = ta; b = tb_; sub = s;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL: %h %s %h = %h, expected %h", ta, s ? "-" : "+", tb_, y, exp_y);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] x, z;
    logic s;
    int ex;
    for (int n = 0; n < 4000; n++) begin
      ex = 10 + int'($urandom % 40);
      x  = {1'($urandom), 6'(ex), 14'($urandom)};
      z  = {1'($urandom), 6'(ex - 8 + int'($urandom % 17)), 14'($urandom)};
      if (n % 4 == 0) z[19:14] = x[19:14];           // equal exponents: cancellation
      if (n % 8 == 1) z[19:14] = 6'(ex - 20 + int'($urandom % 11));
      s = 1'($urandom);
      try(x, z, s, from_real(s ? to_real(x) - to_real(z) : to_real(x) + to_real(z)));
    end
    x = from_real(0.8125);
    try(x, x, 1'b1, 21'd0);
    try(x, 21'd0, 1'b0, x);
    try(21'd0, x, 1'b1, from_real(-0.8125));
    try(from_real(1.0), {1'b0, 6'd1, 14'd5}, 1'b1, from_real(1.0));
    try(from_real(1.0), from_real(0.97357177734375), 1'b1, from_real(1.0 - 0.97357177734375));
    try({1'b0, 6'd62, 14'h3fff}, {1'b0, 6'd62, 14'h3fff}, 1'b0, {1'b0, 6'd62, 14'h3fff});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
