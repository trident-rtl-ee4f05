// det_clk_gen: behavioural model of the detection clock generator.
//
// This is a behavioural model, not synthesizable logic: the real part is a
// delay-based pulse shaper. It produces a detection clock that is high
// (transparent: transition counters active) for most of the cycle and low for
// a short guard interval around every rising edge of the system clock. Since
// a causal model cannot look ahead, it uses the known clock period: after a
// rising clock edge det_clk rises GUARD_PS later and falls again GUARD_PS
// before the next expected rising edge. det_clk is low until the first clock
// edge.
//
// Interface: clk in, det_clk out. Timing: T_CLK_PS must equal the period of
// clk. Both delays are this design's assumptions; the shape (low only briefly
// around the rising clock edge) follows the scheme.
module det_clk_gen #(
  parameter int unsigned T_CLK_PS = 10000,
  parameter int unsigned GUARD_PS = 500
) (
  input  logic clk,
  output logic det_clk
);
  timeunit 1ps;
  timeprecision 1ps;

  initial det_clk = 1'b0;

  always @(posedge clk) begin
    #(GUARD_PS) det_clk <= 1'b1;
    #(T_CLK_PS - 2 * GUARD_PS) det_clk <= 1'b0;
  end

endmodule
