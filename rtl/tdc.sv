// tdc: transition detector and counter for one pipestage.
//
// The monitored node is the data signal at the end of a pipestage. While the
// detection clock is high (its transparent phase) every rising and every
// falling transition of the node is an illegal transition and is counted: a
// double-edge flip-flop arrangement, built here as one counter clocked by each
// edge of the node. During the short low pulse of the detection clock, which
// brackets the rising edge of the system clock, both counters are held cleared,
// so transitions there are legal and ignored, and the next window starts from
// zero. On the falling edge of the detection clock the sum of the two counters
// is copied to `count`, which the controller samples on the following system
// clock edge and which stays stable for a full cycle.
//
// Interface: node (monitored signal), det_clk, rst_n (asynchronous reset of
// the counters and of `count`; the counters are also cleared by every low
// pulse). count saturates at
// 2**CNT_W-1. A count of 1 is a single error, 2 or more a chain error.
// Counting edges of the data signal and clearing on the low pulse follow the
// scheme; the counter width and the two-counter form are this design's choice.
module tdc #(
  parameter int unsigned CNT_W = 2
) (
  input  logic             rst_n,
  input  logic             det_clk,
  input  logic             node,
  output logic [CNT_W-1:0] count
);

  localparam logic [CNT_W-1:0] MAX = '1;

  logic [CNT_W-1:0] rise_cnt, fall_cnt;
  logic [CNT_W:0]   sum;

  // counters are asynchronously cleared while det_clk is low or in reset
  logic clr_n;
  assign clr_n = det_clk && rst_n;

  // rising transitions
  always_ff @(posedge node or negedge clr_n) begin
    if (!clr_n)            rise_cnt <= '0;
    else if (rise_cnt != MAX) rise_cnt <= rise_cnt + 1'b1;
  end

  // falling transitions
  always_ff @(negedge node or negedge clr_n) begin
    if (!clr_n)            fall_cnt <= '0;
    else if (fall_cnt != MAX) fall_cnt <= fall_cnt + 1'b1;
  end

  assign sum = {1'b0, rise_cnt} + {1'b0, fall_cnt};

  // hand the window's count over as the detection clock deactivates
  always_ff @(negedge det_clk or negedge rst_n) begin
    if (!rst_n)        count <= '0;
    else if (sum[CNT_W]) count <= MAX;
    else               count <= sum[CNT_W-1:0];
  end

endmodule
