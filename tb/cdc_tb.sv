// cdc_tb: self-checking testbench for the choke detection controller.
//
// Part 1, directed: a window whose instruction in a stage is predicted to
// give an SE must stall the pipeline for exactly one cycle, a CE for exactly
// two; with avoidance off there is no stall. An error count of 1 or 2 on a
// stage must give, one cycle later, a flush with the errant PC, the right
// position and a log entry of class SE or CE; when two stages err the older
// instruction wins; an invalid stage or detection off gives nothing.
// Part 2, random: counts, window and holds are random; the expected flush,
// position, PC, logged EID/stage/class and stall are worked out from the
// rules above and compared every cycle.
`timescale 1ns/1ps
module cdc_tb;
  import trident_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b1;
  logic             detect_en, avoid_en, pipe_stall;
  logic [1:0]       tdc_count [NUM_STAGES];
  ccr_entry_t       ccr       [NUM_STAGES];
  err_class_e       pred_de;
  logic             stall, advance, flush;
  logic [POS_W-1:0] flush_pos;
  logic [PC_W-1:0]  replay_pc;
  err_log_t         log;
  int checks = 0, failures = 0;

  cdc #(.CNT_W(2)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL at %t: %s", $time, msg);
    end
  endtask

  task automatic clear_window();
    for (int s = 0; s < NUM_STAGES; s++) begin
      ccr[s] = '0;
      ccr[s].valid = 1'b1;
      ccr[s].pc = PC_W'(32'h100 + 4 * s);
      ccr[s].eid = eid_t'(s + 1);
      tdc_count[s] = '0;
    end
    pred_de = CLS_NONE;
  endtask

  // count the stall cycles a predicted class in stage `st` produces
  task automatic stall_run(input int st, input err_class_e c, output int n);
    clear_window();
    if (st == 0) pred_de = c;
    else ccr[st].pred[st] = c;
    n = 0;
    for (int k = 0; k < 6; k++) begin
      #1;
      if (stall) n++;
      if (!stall) break;
      @(negedge clk);
    end
    @(negedge clk);
    clear_window();       // the instruction has moved on
    @(negedge clk);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;
  int n_se = 0, n_ce = 0, n_stall = 0;

  initial begin
    detect_en = 1; avoid_en = 1; pipe_stall = 0;
    clear_window();
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset is seen
    #11 rst_n = 1'b1;
    @(negedge clk);

    // ---- avoidance ----
    for (int st = 0; st < NUM_STAGES; st++) begin
      stall_run(st, CLS_SE, n); check(n == 1, $sformatf("SE in stage %0d: %0d stall cycles", st, n));
      stall_run(st, CLS_CE, n); check(n == 2, $sformatf("CE in stage %0d: %0d stall cycles", st, n));
    end
    avoid_en = 0;
    stall_run(2, CLS_CE, n); check(n == 0, "no stall with avoidance off");
    avoid_en = 1;
    // a hold by the pipeline itself counts toward the need
    clear_window();
    ccr[1].pred[1] = CLS_CE;
    pipe_stall = 1;
    #1 check(stall && !advance, "CE hold, cycle 1");
    @(negedge clk); pipe_stall = 0;
    #1 check(stall && !advance, "CE hold, cycle 2");
    @(negedge clk);
    #1 check(!stall && advance, "CE hold served after two held cycles");
    @(negedge clk);
    clear_window();
    @(negedge clk);

    // ---- detection and correction ----
    tdc_count[1] = 2'd1;                       // SE in EX, pipeline advances
    @(negedge clk);
    tdc_count[1] = 2'd0;
    check(flush && flush_pos == 3'd2 && replay_pc == 32'h104, "SE flush, PC, position");
    check(log.valid && log.cls == CLS_SE && log.stage == 2'd1 && log.eid == eid_t'(2), "SE log");
    @(negedge clk);
    check(!flush && !log.valid, "flush lasts one cycle");
    tdc_count[3] = 2'd2;                       // CE in WB while held
    pipe_stall = 1;
    @(negedge clk);
    tdc_count[3] = 2'd0; pipe_stall = 0;
    check(flush && flush_pos == 3'd3 && replay_pc == 32'h10c && log.cls == CLS_CE, "CE flush while held");
    @(negedge clk);
    tdc_count[0] = 2'd1; tdc_count[2] = 2'd3;  // two stages: the older (2) wins
    @(negedge clk);
    tdc_count[0] = 2'd0; tdc_count[2] = 2'd0;
    check(flush && log.stage == 2'd2 && log.cls == CLS_CE && replay_pc == 32'h108, "oldest first");
    @(negedge clk);
    ccr[1].valid = 0; tdc_count[1] = 2'd1;     // no instruction: ignored
    @(negedge clk);
    check(!flush, "invalid stage ignored");
    clear_window();
    detect_en = 0; tdc_count[2] = 2'd1;
    @(negedge clk);
    check(!flush, "detection off");
    detect_en = 1; clear_window();
    @(negedge clk);

    // ---- random ----
    begin
      bit         e_flush;
      int         e_pos, e_stage;
      logic [PC_W-1:0] e_pc;
      eid_t       e_eid;
      err_class_e e_cls;
      int         held;
      e_flush = 0; held = 0; e_pos = 0; e_stage = 0; e_pc = 0; e_eid = '0; e_cls = CLS_NONE;
      for (int cyc = 0; cyc < 5000; cyc++) begin
        int need, det_s;
        bit adv, st;
        @(negedge clk);
        for (int s = 0; s < NUM_STAGES; s++) begin
          ccr[s].valid = ($urandom_range(0, 4) != 0);
          ccr[s].pc    = $urandom;
          ccr[s].eid   = eid_t'($urandom);
          ccr[s].pred  = stage_cls_t'($urandom & 32'h5555 | (($urandom_range(0,3) == 0) ? 32'h00aa : 32'h0));
          tdc_count[s] = ($urandom_range(0, 5) == 0) ? 2'($urandom_range(1, 3)) : 2'd0;
        end
        for (int s = 0; s < NUM_STAGES; s++)
          if (ccr[s].pred[s] == 2'd3) ccr[s].pred[s] = CLS_CE;
        pred_de    = ($urandom_range(0, 5) == 0) ? CLS_SE : CLS_NONE;
        pipe_stall = ($urandom_range(0, 6) == 0);
        #1;
        // outputs registered from the last cycle
        check(flush == e_flush, "random: flush");
        if (e_flush) begin
          check(int'(flush_pos) == e_pos && replay_pc == e_pc, "random: position / PC");
          check(log.valid && log.eid == e_eid && int'(log.stage) == e_stage && log.cls == e_cls,
                "random: log");
        end
        // stall this cycle
        need = 0;
        for (int s = 0; s < NUM_STAGES; s++) begin
          err_class_e c;
          c = (s == 0) ? pred_de : ccr[s].pred[s];
          if (ccr[s].valid && !(e_flush && s <= e_pos)) begin
            if (c == CLS_SE && need < 1) need = 1;
            if (c == CLS_CE) need = 2;
          end
        end
        st  = (need > held);
        adv = !(st || pipe_stall);
        check(stall == st && advance == adv, "random: stall");
        n_stall += st;
        // detection at the coming edge
        det_s = -1;
        for (int s = 0; s < NUM_STAGES; s++)
          if (ccr[s].valid && tdc_count[s] != 0 && !(e_flush && s <= e_pos)) det_s = s;
        held = (adv || e_flush) ? 0 : ((held < 3) ? held + 1 : 3);
        e_flush = (det_s >= 0);
        if (e_flush) begin
          e_stage = det_s;
          e_pos   = det_s + int'(adv);
          e_pc    = ccr[det_s].pc;
          e_eid   = ccr[det_s].eid;
          e_cls   = (tdc_count[det_s] == 2'd1) ? CLS_SE : CLS_CE;
          if (e_cls == CLS_SE) n_se++; else n_ce++;
        end
      end
    end
    check(n_se > 50 && n_ce > 50 && n_stall > 50, "random coverage");
    $display("SE=%0d CE=%0d stall cycles=%0d", n_se, n_ce, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
