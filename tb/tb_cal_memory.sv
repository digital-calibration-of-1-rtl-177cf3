// tb_cal_memory: checks the calibration memory: all 110 bit locations written
// and read back against a model array, weights reset to 0.5 and VrefH to 1.0,
// weight writes and reads for indices 1..14, index 15 reading 0.5,
// out-of-range writes ignored, and a reset that restores the weights while
// keeping the stored bits.
module tb_cal_memory;
  import fp21_pkg::*;
  import cal_pkg::*;
  import fp21_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic bit_we = 1'b0, bit_wdata = 1'b0, bit_rdata;
  logic [BIT_AW-1:0] bit_waddr = '0, bit_raddr = '0;
  logic [STG_W-1:0] w_raddr = '0, w_waddr = '0;
  fp21_t w_rdata, w_wdata = FP_ZERO, vrefh;
  logic w_we = 1'b0;
  int checks = 0, failures = 0;
  logic model_bits [N_BITS_MEM];
  logic [20:0] model_w [1:N_WEIGHTS];

  cal_memory dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic read_all;
    for (int a = 0; a < N_BITS_MEM; a++) begin
      bit_raddr = BIT_AW'(a);
      #1;
      check(bit_rdata == model_bits[a], $sformatf("bit %0d", a));
    end
    for (int j = 1; j <= N_WEIGHTS; j++) begin
      w_raddr = STG_W'(j);
      #1;
      check(w_rdata == model_w[j], $sformatf("weight %0d = %h", j, w_rdata));
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int j = 1; j <= N_WEIGHTS; j++) model_w[j] = from_real(0.5);
    check(vrefh == from_real(1.0), "VrefH constant");
    for (int a = 0; a < N_BITS_MEM; a++) begin
      model_bits[a] = 1'($urandom);
      bit_we = 1'b1; bit_waddr = BIT_AW'(a); bit_wdata = model_bits[a];
      @(negedge clk);
    end
    bit_we = 1'b1; bit_waddr = BIT_AW'(N_BITS_MEM); bit_wdata = ~model_bits[0];
    @(negedge clk);
    bit_we = 1'b0;
    read_all();
    for (int j = 1; j <= N_WEIGHTS; j++) begin
      model_w[j] = {1'b0, 6'(28 + $urandom % 4), 14'($urandom)};
      w_we = 1'b1; w_waddr = STG_W'(j); w_wdata = model_w[j];
      @(negedge clk);
    end
    w_we = 1'b1; w_waddr = 4'd15; w_wdata = from_real(3.0);
    @(negedge clk);
    w_we = 1'b1; w_waddr = 4'd0; w_wdata = from_real(3.0);
    @(negedge clk);
    w_we = 1'b0;
    read_all();
    w_raddr = 4'd15; #1;
    check(w_rdata == from_real(0.5), "index 15 reads 0.5");
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int j = 1; j <= N_WEIGHTS; j++) model_w[j] = from_real(0.5);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
