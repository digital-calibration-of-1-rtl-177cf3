// tb_pipelined_adc: checks the calibration ADC model (11 stages with op-amp
// gain 40, two ideal stages, 2-bit flash). For DC inputs held until the
// pipeline has settled it compares every stage code with a chain of stage
// equations evaluated here; with cal_sel = i it checks that stages i..14
// convert VrefH instead, while stages before i keep converting vin. It also
// checks the latency: stage s reflects a new input after s clocks. With
// cal_mode = 0 the flash must convert the residue of stage 11 (extra stages
// bypassed), with cal_mode = 1 that of stage 13.
module tb_pipelined_adc;
  logic clk = 1'b0;
  real vin;
  logic [3:0] cal_sel;
  logic cal_mode;
  logic [14:1][1:0] codes;
  int checks = 0, failures = 0;

  pipelined_adc dut (.clk, .vin, .cal_mode, .cal_sel, .codes);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // expected code of every stage
  function automatic logic [14:1][1:0] model(real v0, int sel, bit mode);
    logic [14:1][1:0] c;
    real v, k, v11;
    int d;
    v = v0;
    v11 = 0.0;
    for (int s = 1; s <= 14; s++) begin
      if (s == sel) v = 1.0;
      if (s == 14 && !mode) v = v11;
      if (s == 14) begin
        c[s] = (v < -0.5) ? 2'd0 : (v < 0.0) ? 2'd1 : (v < 0.5) ? 2'd2 : 2'd3;
      end else begin
        if (v < -0.25)     begin c[s] = 2'd0; d = -1; end
        else if (v < 0.25) begin c[s] = 2'd1; d = 0;  end
        else               begin c[s] = 2'd2; d = 1;  end
        k = (s <= 11) ? 1.0 - 2.1 / 40.0 : 1.0;
        v = k * (2.0 * v - real'(d));
        if (s == 11) v11 = v;
      end
    end
    return c;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    int sel;
    logic [14:1][1:0] e;
    for (int n = 0; n < 300; n++) begin
      v   = -1.0 + 2.0 * real'($urandom % 100000) / 100000.0;
      sel = (n % 3 == 0) ? 1 + int'($urandom % 11) : 0;
      @(negedge clk);
      vin = v;
      cal_sel = 4'(sel);
      cal_mode = (sel != 0) || (n % 2 == 1);
      repeat (16) @(negedge clk);
      e = model(v, sel, cal_mode);
      for (int s = 1; s <= 14; s++)
        check(codes[s] == e[s], $sformatf("v=%f sel=%0d stage %0d code %0d expected %0d", v, sel, s, codes[s], e[s]));
    end
    // latency: from -0.9 to +0.9, stage s follows after s clocks
    @(negedge clk); cal_sel = 4'd0; cal_mode = 1'b1; vin = -0.9;
    repeat (16) @(negedge clk);
    vin = 0.9;
    e = model(0.9, 0, 1'b1);
    for (int t = 1; t <= 3; t++) begin
      @(negedge clk);
      check(codes[t] == e[t], $sformatf("stage %0d not updated after %0d clocks", t, t));
      if (t < 3) check(codes[t+1] == model(-0.9, 0, 1'b1)[t+1], $sformatf("stage %0d updated early", t + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
