// tb_stage_align: drives random codes into the alignment registers every
// clock and checks that output s equals the input of stage s from
// N_STAGES - s clocks earlier, for the 14-stage default and a 3-stage case.
module tb_stage_align;
  logic clk = 1'b0;
  logic [14:1][1:0] ci, co;
  logic [3:1][1:0]  ci3, co3;
  logic [14:1][1:0] hist [$];
  logic [3:1][1:0]  hist3 [$];
  int checks = 0, failures = 0;

  stage_align dut (.clk, .codes_in(ci), .codes_out(co));
  stage_align #(.N_STAGES(3)) dut3 (.clk, .codes_in(ci3), .codes_out(co3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int s = 1; s <= 14; s++) ci[s] = 2'($urandom);
      for (int s = 1; s <= 3; s++)  ci3[s] = 2'($urandom);
      hist.push_front(ci);
      hist3.push_front(ci3);
      #1;
      if (t >= 14) begin
        for (int s = 1; s <= 14; s++) begin
          checks++;
          if (co[s] !== hist[14 - s][s]) begin
            failures++;
            if (failures < 10) $display("FAIL: t=%0d stage %0d", t, s);
          end
        end
        for (int s = 1; s <= 3; s++) begin
          checks++;
          if (co3[s] !== hist3[3 - s][s]) failures++;
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
