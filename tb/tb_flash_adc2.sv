// tb_flash_adc2: checks the 2-bit flash model on random inputs and on its
// thresholds -VREF/2, 0, +VREF/2, including the one-clock latency.
module tb_flash_adc2;
  logic clk = 1'b0;
  real vin;
  logic [1:0] code;
  int checks = 0, failures = 0;

  flash_adc2 dut (.clk, .vin, .code);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    logic [1:0] c;
    for (int n = 0; n < 1000; n++) begin
      case (n)
        0: v = -0.5;
        1: v = 0.0;
        2: v = 0.5;
        3: v = -0.5000001;
        default: v = -1.0 + 2.0 * real'($urandom % 100000) / 100000.0;
      endcase
      @(negedge clk);
      vin = v;
      #1;
      c = (v < -0.5) ? 2'd0 : (v < 0.0) ? 2'd1 : (v < 0.5) ? 2'd2 : 2'd3;
      @(negedge clk);
      checks++;
      if (code !== c) begin
        failures++;
        $display("FAIL: %f -> %b, expected %b", v, code, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
