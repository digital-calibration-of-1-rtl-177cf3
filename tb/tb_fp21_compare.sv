// tb_fp21_compare: checks the 21-bit floating point comparator (a < b and
// |a| < |b|) against comparisons of the same values as real numbers, on
// random operands, equal values, signed zeros and the 1/4 LSB threshold.
module tb_fp21_compare;
  import fp21_pkg::*;
  import fp21_ref_pkg::*;

  fp21_t a, b;
  logic  lt, mag_lt;
  int checks = 0, failures = 0;

  fp21_compare dut (.a, .b, .lt, .mag_lt);

  task automatic try(logic [20:0] ta, logic [20:0] tb_);
    real ra, rb;
    a = ta; b = tb_;
    #1;
    ra = to_real(ta); rb = to_real(tb_);
    checks += 2;
    if (lt !== (ra < rb)) begin
      failures++;
      $display("FAIL: lt %h %h", ta, tb_);
    end
    if (mag_lt !== ((ra < 0.0 ? -ra : ra) < (rb < 0.0 ? -rb : rb))) begin
      failures++;
      $display("FAIL: mag_lt %h %h", ta, tb_);
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
    for (int n = 0; n < 2000; n++) begin
      x = 21'($urandom);
      z = (n % 5 == 0) ? {~x[20], x[19:0]} : 21'($urandom);
      if (n % 7 == 0) z[19:14] = x[19:14];
      try(x, z);
      try(x, x);
    end
    try(21'd0, {1'b1, 6'd0, 14'd7});
    try({1'b1, 6'd0, 14'd0}, from_real(2.0 ** -13));
    try(from_real(2.0 ** -13), from_real(2.0 ** -13));
    try(from_real(-0.99 * 2.0 ** -13), from_real(2.0 ** -13));
    try(from_real(-1.01 * 2.0 ** -13), from_real(2.0 ** -13));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
