// tdc_tb: self-checking testbench for the transition detector and counter.
//
// Drives the detection clock by hand (low 1 ns around each 10 ns boundary)
// and toggles the monitored node a chosen number of times inside the
// transparent phase and, as legal transitions, inside the low pulse. After
// each window the held count must equal the number of illegal transitions,
// saturated at 3, and must stay stable through the next window.
`timescale 1ns/1ps
module tdc_tb;
  logic       rst_n = 1'b1;
  logic       det_clk = 1'b0;
  logic       node = 1'b0;
  logic [1:0] count;
  int checks = 0, failures = 0;

  tdc #(.CNT_W(2)) dut (.rst_n(rst_n), .det_clk(det_clk), .node(node), .count(count));

  // one detection window: `legal` toggles in the low pulse, `illegal` toggles
  // in the transparent phase, then the count is checked
  task automatic window(input int illegal, input int legal);
    int exp;
    det_clk = 1'b0;
    for (int i = 0; i < legal; i++) begin #0.1; node = !node; end
    #0.5 det_clk = 1'b1;
    #1;
    for (int i = 0; i < illegal; i++) begin #0.7; node = !node; end
    #1;
    if (count !== 2'(exp_prev)) begin
      failures++;
      $display("FAIL: count changed inside a window: %0d, held %0d", count, exp_prev);
    end
    checks++;
    #(8.0 - 0.7 * illegal - 2.0);
    det_clk = 1'b0;                       // window closes, count is handed over
    #0.2;
    exp = (illegal > 3) ? 3 : illegal;
    checks++;
    if (count !== 2'(exp)) begin
      failures++;
      $display("FAIL: %0d illegal, %0d legal transitions: count %0d, expected %0d",
               illegal, legal, count, exp);
    end
    exp_prev = exp;
    #0.3;
  endtask

  int exp_prev = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #0.5 rst_n = 1'b0;
    #1 rst_n = 1'b1;
    window(0, 0);
    window(1, 0);     // min or max error: category 1
    window(2, 0);     // max-min error: category 2
    window(0, 3);     // only legal transitions
    window(1, 2);
    window(3, 0);
    window(5, 1);     // saturates
    window(0, 0);
    for (int k = 0; k < 40; k++) window($urandom_range(0, 4), $urandom_range(0, 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
