// det_clk_gen_tb: checks the detection clock model against a 10 ns clock.
//
// Samples det_clk at fixed offsets from each rising clock edge: it must be
// low within 0.5 ns of an edge on either side and high elsewhere.
`timescale 1ns/1ps
module det_clk_gen_tb;
  logic clk = 1'b0;
  logic det_clk;
  int checks = 0, failures = 0;

  det_clk_gen #(.T_CLK_PS(10000), .GUARD_PS(500)) dut (.clk(clk), .det_clk(det_clk));

  always #5 clk = !clk;

  task automatic expect_level(input logic v, input string where);
    checks++;
    if (det_clk !== v) begin
      failures++;
      $display("FAIL at %t (%s): det_clk=%0b expected %0b", $time, where, det_clk, v);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);                        // first edge at 5 ns
    repeat (20) begin
      #0.2 expect_level(1'b0, "just after edge");
      #0.6 expect_level(1'b1, "after guard");
      #4.0 expect_level(1'b1, "mid cycle");
      #4.6 expect_level(1'b1, "before guard");
      #0.3 expect_level(1'b0, "just before edge");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
