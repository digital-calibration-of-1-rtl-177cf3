// tb_fp21_mult: checks the 21-bit floating point multiplier against products
// worked out in real arithmetic and rounded to nearest-even by the reference
// package: random operands in the normal range, zeros, signs, and the
// overflow (saturate) and underflow (flush to zero) cases.
module tb_fp21_mult;
  import fp21_pkg::*;
  import fp21_ref_pkg::*;

  fp21_t a, b, y;
  int checks = 0, failures = 0;

  fp21_mult dut (.a, .b, .y);

  task automatic try(logic [20:0] ta, logic [20:0] tb_, logic [20:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL: %h * %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  function automatic logic [20:0] rnd_fp(int emin, int emax);
    return {1'($urandom), 6'(emin + int'($urandom % (emax - emin + 1))), 14'($urandom)};
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [20:0] x, z;
    for (int n = 0; n < 3000; n++) begin
      x = rnd_fp(16, 46);
      z = rnd_fp(16, 46);
      try(x, z, from_real(to_real(x) * to_real(z)));
    end
    try(21'd0, from_real(0.75), 21'd0);
    try(from_real(-3.5), 21'd0, 21'd0);
    try(from_real(1.0), from_real(-0.5), from_real(-0.5));
    try(from_real(0.52770996), from_real(1.89498), from_real(0.52770996 * 1.89498));
    // all-ones mantissas: rounding carries into the exponent
    try({1'b0, 6'd31, 14'h3fff}, {1'b0, 6'd31, 14'h3fff},
        from_real(to_real({1'b0, 6'd31, 14'h3fff}) ** 2));
    try({1'b0, 6'd60, 14'd0}, {1'b0, 6'd60, 14'd0}, {1'b0, 6'd62, 14'h3fff});
    try({1'b1, 6'd60, 14'd0}, {1'b0, 6'd60, 14'd0}, {1'b1, 6'd62, 14'h3fff});
    try({1'b0, 6'd2, 14'd0}, {1'b0, 6'd2, 14'd0}, 21'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
