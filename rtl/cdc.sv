// cdc: choke detection controller.
//
// Detection: at every rising clk edge the controller reads the transition
// counts of the window that just closed, one per pipestage. A count of 1 is a
// single error (SE), 2 or more a chain error (CE). Only a stage holding a
// valid instruction that is not being squashed counts. If several stages err
// at once the oldest instruction (the latest stage) is taken.
//
// Correction: in the cycle after the error window the controller raises
// `flush` with `replay_pc`, the PC of the errant instruction taken from the
// CCR, and `flush_pos`, the errant instruction's position in the window in
// that cycle (its stage, plus one if the pipeline advanced; NUM_STAGES means
// it has already left WB). In the same cycle `log` writes the error instance
// (EID, stage, class) into the choke error table.
//
// Avoidance: every valid instruction in the window carries the classes the
// table predicted for each stage (for DE the live lookup, pred_de). While an
// instruction sits in a stage predicted to err, the pipeline must be held
// until it has spent 1 (SE) or 2 (CE) extra cycles there: `stall` is high as
// long as the largest such need in the window exceeds the number of cycles
// the window has already been held. A hold the pipeline makes for its own
// reasons (pipe_stall) counts too. The hold counter restarts whenever the
// pipeline advances or is flushed.
//
// The classification, the flush-and-replay and the 1/2 stall cycles follow
// the scheme; the one-cycle correction latency, the oldest-first rule and the
// window-wide hold are this design's choices.
module cdc
  import trident_pkg::*;
#(
  parameter int unsigned NUM_ST = NUM_STAGES,
  parameter int unsigned CNT_W  = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  detect_en,
  input  logic                  avoid_en,
  input  logic [CNT_W-1:0]      tdc_count [NUM_ST],
  input  ccr_entry_t            ccr       [NUM_ST],
  input  err_class_e            pred_de,
  input  logic                  pipe_stall,
  output logic                  stall,
  output logic                  advance,
  output logic                  flush,
  output logic [POS_W-1:0]      flush_pos,
  output logic [PC_W-1:0]       replay_pc,
  output err_log_t              log
);

  // ---- detection ----------------------------------------------------------
  logic                det;
  logic [STAGE_W-1:0]  det_stage;
  err_class_e          det_cls;

  always_comb begin
    det       = 1'b0;
    det_stage = '0;
    det_cls   = CLS_NONE;
    for (int s = 0; s < NUM_ST; s++) begin
      if (detect_en && ccr[s].valid && tdc_count[s] != '0 &&
          !(flush && POS_W'(s) <= flush_pos)) begin
        det       = 1'b1;                       // later stages override
        det_stage = STAGE_W'(s);
        det_cls   = (tdc_count[s] == CNT_W'(1)) ? CLS_SE : CLS_CE;
      end
    end
  end

  // ---- correction ---------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flush     <= 1'b0;
      flush_pos <= '0;
      replay_pc <= '0;
      log       <= '0;
    end else begin
      flush     <= det;
      flush_pos <= POS_W'(det_stage) + POS_W'(advance);
      replay_pc <= ccr[det_stage].pc;
      log.valid <= det;
      log.eid   <= ccr[det_stage].eid;
      log.stage <= det_stage;
      log.cls   <= det_cls;
    end
  end

  // ---- avoidance ----------------------------------------------------------
  logic [1:0] need, held;

  always_comb begin
    need = '0;
    for (int s = 0; s < NUM_ST; s++) begin
      err_class_e c;
      c = (s == 0) ? pred_de : ccr[s].pred[s];
      if (avoid_en && ccr[s].valid && !(flush && POS_W'(s) <= flush_pos) &&
          stall_need(c) > need)
        need = stall_need(c);
    end
  end

  assign stall   = need > held;
  assign advance = !(stall || pipe_stall);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 held <= '0;
    else if (advance || flush)  held <= '0;
    else if (held != 2'd3)      held <= held + 1'b1;
  end

  // ---- rules of the pipeline interface --------------------------------------
  // a flush always comes with its log entry, and points into the window
  a_flush_logs: assert property (@(posedge clk) disable iff (!rst_n)
                                 flush == log.valid && flush_pos <= POS_W'(NUM_ST));
  // no avoidance stall while avoidance is off
  a_no_stall_off: assert property (@(posedge clk) disable iff (!rst_n) !avoid_en |-> !stall);
  // an avoidance hold never lasts more than two cycles
  a_stall_bound: assert property (@(posedge clk) disable iff (!rst_n) stall |-> held < 2'd2);

endmodule
