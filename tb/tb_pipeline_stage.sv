// tb_pipeline_stage: checks the 1.5 bit stage model, with op-amp gain 40
// (stage gain 1.895) and ideal: the code against the decision table
// (below -VREF/4: 00, up to +VREF/4: 01, above: 10), the residue against
// k*(2*vin - d*VREF) worked out here, and the one-clock latency.
module tb_pipeline_stage;
  logic clk = 1'b0;
  real vin, vres_e, vres_i;
  logic [1:0] code_e, code_i;
  int checks = 0, failures = 0;

  pipeline_stage dut_err (.clk, .vin, .code(code_e), .vres(vres_e));
  pipeline_stage #(.IDEAL(1'b1)) dut_ideal (.clk, .vin, .code(code_i), .vres(vres_i));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, k;
    int d;
    logic [1:0] c;
    k = 1.0 - 2.1 / 40.0;
    for (int n = 0; n < 1000; n++) begin
      case (n)
        0: v = -0.25;
        1: v = 0.25;
        2: v = 1.0;
        3: v = -1.0;
        default: v = -1.0 + 2.0 * real'($urandom % 100000) / 100000.0;
      endcase
      @(negedge clk);
      vin = v;
      @(negedge clk);
      if (v < -0.25)     begin c = 2'b00; d = -1; end
      else if (v < 0.25) begin c = 2'b01; d = 0;  end
      else               begin c = 2'b10; d = 1;  end
      check(code_e == c && code_i == c, $sformatf("code for %f", v));
      check(absr(vres_e - k * (2.0 * v - real'(d))) < 1e-12, $sformatf("residue %f for %f", vres_e, v));
      check(absr(vres_i - (2.0 * v - real'(d))) < 1e-12, $sformatf("ideal residue %f for %f", vres_i, v));
    end
    // latency: output changes only at the clock edge
    @(negedge clk); vin = 0.9;
    @(negedge clk); vin = -0.9;
    #1;
    check(code_e == 2'b10, "output changed before the clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
