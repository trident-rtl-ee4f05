// trident: choke-point timing error resilience for the DE..WB window of a
// pipeline.
//
// Choke points (a few process-variation-affected gates that dominate a
// path's delay) can make a path too slow (maximum timing violation) or, when
// the gate is a hold-fix buffer that has become fast, too fast (minimum
// timing violation). This block watches one node at the end of each
// pipestage from DE to WB with a transition detector and counter (tdc),
// clocked by a detection clock (det_clk_gen) that is transparent for the
// whole cycle except a short interval around the rising clock edge. Any
// transition of a node inside the transparent phase is illegal:
//   - detection: the controller (cdc) classifies a stage's count (1 = single
//     error, 2 or more = chain error) and logs the error instance in the
//     choke error table (cet), keyed by the errant instruction's opcode and
//     operand sizes taken from the choke clearance register (ccr);
//   - correction: in the next cycle it flushes the errant instruction and all
//     younger ones and gives the pipeline the PC to replay from;
//   - avoidance: each instruction entering DE is looked up in the table; a
//     predicted error in a stage holds the pipeline for 1 (SE) or 2 (CE)
//     cycles while the instruction occupies that stage.
//
// Pipeline interface: de_* describe the instruction presented to DE this
// cycle; it enters when `advance` is high at the rising clk edge. pipe_stall
// is the pipeline's own hold. stage_node[i] is the monitored node of stage i.
// `stall` is the avoidance hold, `advance` the resulting move enable.
// `flush`/`flush_pos`/`replay_pc` is the correction request (one cycle).
// err_* report each logged error, cet_hit a table match for the
// instruction in DE, cet_evict a pseudo-LRU replacement,
// cet_count the table occupancy. avoid_en and detect_en switch the avoidance
// and the detection/correction stages. T_CLK_PS must be clk's period.
module trident
  import trident_pkg::*;
#(
  parameter int unsigned CET_ENTRIES = 128,
  parameter int unsigned CNT_W       = 2,
  parameter int unsigned T_CLK_PS    = 10000,
  parameter int unsigned GUARD_PS    = 500
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       detect_en,
  input  logic                       avoid_en,
  // instruction presented to DE
  input  logic                       de_valid,
  input  logic [PC_W-1:0]            de_pc,
  input  logic [OPC_W-1:0]           de_opcode,
  input  logic [DATA_W-1:0]          de_op_a,
  input  logic [DATA_W-1:0]          de_op_b,
  input  logic                       pipe_stall,
  // monitored node of each pipestage, index 0 = DE
  input  logic [NUM_STAGES-1:0]      stage_node,
  // control back to the pipeline
  output logic                       stall,
  output logic                       advance,
  output logic                       flush,
  output logic [POS_W-1:0]           flush_pos,
  output logic [PC_W-1:0]            replay_pc,
  // observation
  output logic                       err_valid,
  output logic [STAGE_W-1:0]         err_stage,
  output err_class_e                 err_class,
  output logic                       cet_hit,
  output logic                       cet_evict,
  output logic [$clog2(CET_ENTRIES):0] cet_count
);

  logic             det_clk;
  logic [CNT_W-1:0] tdc_count [NUM_STAGES];
  ccr_entry_t       ccr_q     [NUM_STAGES];
  stage_cls_t       pred0;
  err_log_t         log;
  eid_t             de_eid;

  det_clk_gen #(.T_CLK_PS(T_CLK_PS), .GUARD_PS(GUARD_PS)) u_detclk (
    .clk    (clk),
    .det_clk(det_clk)
  );

  for (genvar s = 0; s < NUM_STAGES; s++) begin : g_tdc
    tdc #(.CNT_W(CNT_W)) u_tdc (
      .rst_n  (rst_n),
      .det_clk(det_clk),
      .node   (stage_node[s]),
      .count  (tdc_count[s])
    );
  end

  assign de_eid.opcode = de_opcode;
  assign de_eid.size_a = operand_size(de_op_a);
  assign de_eid.size_b = operand_size(de_op_b);

  ccr u_ccr (
    .clk      (clk),
    .rst_n    (rst_n),
    .advance  (advance),
    .in_valid (de_valid),
    .in_pc    (de_pc),
    .in_eid   (de_eid),
    .pred0    (pred0),
    .flush    (flush),
    .flush_pos(flush_pos),
    .entries  (ccr_q)
  );

  // the latest instruction in the window is compared against the table
  cet #(.ENTRIES(CET_ENTRIES)) u_cet (
    .clk   (clk),
    .rst_n (rst_n),
    .lk_en (ccr_q[0].valid && advance),
    .lk_eid(ccr_q[0].eid),
    .lk_hit(cet_hit),
    .lk_cls(pred0),
    .wr    (log),
    .evict (cet_evict),
    .count (cet_count)
  );

  cdc #(.CNT_W(CNT_W)) u_cdc (
    .clk       (clk),
    .rst_n     (rst_n),
    .detect_en (detect_en),
    .avoid_en  (avoid_en),
    .tdc_count (tdc_count),
    .ccr       (ccr_q),
    .pred_de   (pred0[0]),
    .pipe_stall(pipe_stall),
    .stall     (stall),
    .advance   (advance),
    .flush     (flush),
    .flush_pos (flush_pos),
    .replay_pc (replay_pc),
    .log       (log)
  );

  assign err_valid = log.valid;
  assign err_stage = log.stage;
  assign err_class = log.cls;

endmodule
