// trident_tb: end-to-end testbench of the choke error resilience block at its
// default parameters (128-entry table, four-stage DE..WB window, 10 ns clock).
//
// The testbench plays both the pipeline and the chip's choke points:
//   - a program: each PC gives an opcode and two operands by a fixed hash;
//   - a choke signature: a fixed hash of (opcode, operand sizes) marks about
//     one EID in six as erring in one stage, as a single error (one illegal
//     transition) or a chain error (two);
//   - a shadow of the DE..WB window. An instruction that owns a choke point in
//     stage s makes the stage's node toggle inside the transparent phase in a
//     cycle where it leaves s having been held there fewer cycles than its
//     class needs (1 for SE, 2 for CE). Every valid stage also toggles its
//     node right after each clock edge, inside the detection clock's guard
//     interval, which must never count.
// Every cycle the block's flush, flush position, replay PC and logged class
// are compared with the errors injected one cycle earlier; a flush without an
// injected error, or an injected error without a flush, fails.
// Phases: (A) a 16-instruction loop with avoidance on: each choke must err
// once and then be avoided by stall cycles; (B) the same loop with avoidance
// off: no stall may appear and the chokes err on every pass; (C) a long
// stream of new instructions with random pipeline holds, enough distinct
// erring EIDs to fill the 128-entry table and force pseudo-LRU replacement.
// Each mechanism (SE and CE detection, flush/replay, replay of an instruction
// past WB, SE and CE avoidance, table hit, replacement, avoidance off,
// pipeline hold) is counted and must occur at least once.
`timescale 1ns/1ps
module trident_tb;
  import trident_pkg::*;

  localparam int NS = NUM_STAGES;

  logic             clk = 1'b0, rst_n = 1'b1;
  logic             detect_en = 1'b1, avoid_en = 1'b1;
  logic             de_valid;
  logic [PC_W-1:0]  de_pc;
  logic [OPC_W-1:0] de_opcode;
  logic [DATA_W-1:0] de_op_a, de_op_b;
  logic             pipe_stall;
  logic [NS-1:0]    stage_node;
  logic             stall, advance, flush;
  logic [POS_W-1:0] flush_pos;
  logic [PC_W-1:0]  replay_pc;
  logic             err_valid;
  logic [STAGE_W-1:0] err_stage;
  err_class_e       err_class;
  logic             cet_hit, cet_evict;
  logic [7:0]       cet_count;

  trident dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL at %t: %s", $time, msg);
    end
  endtask

  // ---- program and choke signature -----------------------------------------
  function automatic logic [31:0] mix(input logic [31:0] x);
    logic [31:0] h;
    h = x * 32'h9e3779b1;
    h = h ^ (h >> 15);
    h = h * 32'h85ebca6b;
    return h ^ (h >> 13);
  endfunction

  task automatic instr(input logic [31:0] pc, output logic [5:0] opc,
                       output logic [31:0] a, output logic [31:0] b);
    logic [31:0] h1, h2, h3;
    h1 = mix(pc); h2 = mix(pc ^ 32'h5bd1e995); h3 = mix(pc + 32'h1234567);
    opc = h1[5:0];
    a = h2 >> h1[12:8];          // operand widths spread over 0..32 bits
    b = h3 >> h1[20:16];
  endtask

  function automatic int sig_bits(input logic [31:0] v);
    return $clog2(64'(v) + 64'd1);
  endfunction

  // class and stage of the choke point an EID meets on this chip
  task automatic signature(input logic [5:0] opc, input int sa, input int sb,
                           output int cls, output int st);
    logic [31:0] h;
    h   = mix({14'd0, opc, sa[5:0], sb[5:0]} ^ 32'hc001d00d);
    st  = int'(h[9:8]);
    cls = (h[3:0] == 4'd0 || h[3:0] == 4'd1) ? 2 : ((h[3:0] < 4'd5) ? 1 : 0);
  endtask

  // ---- shadow window ----------------------------------------------------
  bit          sh_v    [NS];
  logic [31:0] sh_pc   [NS];
  int          sh_cls  [NS];     // choke class in its stage, 0 = none
  int          sh_st   [NS];
  int          sh_key  [NS];
  int          sh_hold [NS];

  // errors seen per (EID key, stage), for the avoidance check
  int seen [int];

  // mechanism counters
  int n_se = 0, n_ce = 0, n_flush = 0, n_past_wb = 0, n_avoid_se = 0, n_avoid_ce = 0;
  int n_hit = 0, n_evict = 0, n_off_err = 0, n_hold = 0, n_stall = 0, n_repeat = 0;

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] fetch_pc;
  int          phase;          // 0 = A, 1 = B, 2 = C
  logic [31:0] loop_lo, loop_hi;

  // expected report for the current cycle, from the injection one cycle ago
  bit          e_flush;
  int          e_pos, e_stage, e_cls;
  logic [31:0] e_pc;

  task automatic run_cycles(input int ncyc, input int hold_pct);
    for (int cyc = 0; cyc < ncyc; cyc++) begin
      int det_s;
      bit adv, fl;
      int fpos;
      logic [5:0] opc; logic [31:0] a, b;
      @(negedge clk);
      pipe_stall = ($urandom_range(0, 99) < hold_pct);
      #0.01;
      // ---- report of last cycle's errors ----
      check(flush == e_flush, $sformatf("flush %0b expected %0b", flush, e_flush));
      if (e_flush) begin
        check(int'(flush_pos) == e_pos, $sformatf("flush_pos %0d expected %0d", flush_pos, e_pos));
        check(replay_pc == e_pc, $sformatf("replay_pc %h expected %h", replay_pc, e_pc));
        check(err_valid && int'(err_stage) == e_stage && int'(err_class) == e_cls,
              $sformatf("logged stage %0d class %0d, expected %0d / %0d", err_stage, err_class, e_stage, e_cls));
        n_flush++;
        if (e_pos == NS) n_past_wb++;
      end
      fl   = flush;
      fpos = int'(flush_pos);
      adv  = advance;
      check(adv == !(stall || pipe_stall), "advance");
      if (stall) n_stall++;
      if (pipe_stall) n_hold++;
      if (!avoid_en) check(!stall, "no avoidance stall with avoidance off");
      if (cet_hit && sh_v[0]) n_hit++;
      if (cet_evict) n_evict++;
      // ---- choke points of this cycle ----
      det_s = -1;
      for (int s = 0; s < NS; s++) begin
        if (sh_v[s] && !(fl && s <= fpos) && sh_cls[s] != 0 && sh_st[s] == s && adv) begin
          if (sh_hold[s] < sh_cls[s]) begin
            det_s = s;
            fork
              automatic int ss = s, nn = sh_cls[s];
              begin
                for (int k = 0; k < nn; k++) begin #0.6; stage_node[ss] = !stage_node[ss]; end
              end
            join_none
          end else begin
            if (sh_cls[s] == 1) n_avoid_se++; else n_avoid_ce++;
          end
        end
      end
      e_flush = (det_s >= 0);
      if (e_flush) begin
        int key;
        e_stage = det_s;
        e_pos   = det_s + 1;                  // it leaves the stage at this edge
        e_pc    = sh_pc[det_s];
        e_cls   = sh_cls[det_s];
        if (e_cls == 1) n_se++; else n_ce++;
        if (!avoid_en) n_off_err++;
        key = sh_key[det_s] * 4 + det_s;
        if (avoid_en && seen.exists(key) && n_evict == 0) begin
          n_repeat++;
          check(0, $sformatf("choke at pc %h erred again although it is in the table", e_pc));
        end
        seen[key] = 1;
      end
      // ---- instruction presented to DE ----
      if (fl) begin
        check(replay_pc == e_pc_prev, "replay address");
        de_valid = 1'b0;
        fetch_pc = replay_pc;
      end else begin
        de_valid = 1'b1;
      end
      de_pc = fetch_pc;
      instr(fetch_pc, opc, a, b);
      de_opcode = opc; de_op_a = a; de_op_b = b;
      // ---- clock edge: shadow window moves ----
      @(posedge clk);
      if (adv) begin
        for (int s = NS - 1; s > 0; s--) begin
          sh_v[s]    = sh_v[s-1] && !(fl && (s - 1) <= fpos);
          sh_pc[s]   = sh_pc[s-1];
          sh_cls[s]  = sh_cls[s-1];
          sh_st[s]   = sh_st[s-1];
          sh_key[s]  = sh_key[s-1];
          sh_hold[s] = 0;
        end
        sh_v[0]  = de_valid && !fl;
        sh_pc[0] = fetch_pc;
        begin
          int c, st, sa, sb;
          sa = sig_bits(a); sb = sig_bits(b);
          signature(opc, sa, sb, c, st);
          sh_cls[0] = c; sh_st[0] = st; sh_key[0] = (int'(opc) << 12) | (sa << 6) | sb;
        end
        sh_hold[0] = 0;
        if (!fl) fetch_pc = (phase < 2 && fetch_pc == loop_hi) ? loop_lo : fetch_pc + 4;
      end else begin
        for (int s = 0; s < NS; s++) begin
          if (fl && s <= fpos) sh_v[s] = 0;
          sh_hold[s]++;
        end
      end
      if (e_flush) e_pos = adv ? det_s + 1 : det_s;
      e_pc_prev = e_pc;
      // legal activity inside the guard interval after the edge
      #0.1;
      for (int s = 0; s < NS; s++) if (sh_v[s]) stage_node[s] = !stage_node[s];
    end
  endtask

  logic [31:0] e_pc_prev;

  initial begin
    de_valid = 0; de_pc = 0; de_opcode = 0; de_op_a = 0; de_op_b = 0;
    pipe_stall = 0; stage_node = '0;
    for (int s = 0; s < NS; s++) begin
      sh_v[s] = 0; sh_pc[s] = 0; sh_cls[s] = 0; sh_st[s] = 0; sh_key[s] = 0; sh_hold[s] = 0;
    end
    e_flush = 0; e_pos = 0; e_stage = 0; e_cls = 0; e_pc = 0; e_pc_prev = 0;
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset is seen
    #11 rst_n = 1'b1;

    // A: loop with avoidance
    phase = 0; loop_lo = 32'h1000; loop_hi = 32'h103c; fetch_pc = loop_lo;
    run_cycles(600, 0);
    begin
      int errs_a;
      errs_a = n_se + n_ce;
      $display("phase A: errors=%0d avoided=%0d stall cycles=%0d", errs_a, n_avoid_se + n_avoid_ce, n_stall);
      check(errs_a > 0 && n_avoid_se + n_avoid_ce > 0, "phase A: errors and avoidances");
      // B: same loop, avoidance off
      avoid_en = 0; phase = 1;
      run_cycles(300, 0);
      check(n_off_err > 3, "phase B: chokes err again with avoidance off");
    end
    // C: new code, random holds, table replacement
    avoid_en = 1; phase = 2; fetch_pc = 32'h0010_0000;
    run_cycles(8000, 10);
    // drain
    run_cycles(4, 0);

    $display("SE=%0d CE=%0d flush=%0d past_WB=%0d avoided SE=%0d CE=%0d hits=%0d evictions=%0d",
             n_se, n_ce, n_flush, n_past_wb, n_avoid_se, n_avoid_ce, n_hit, n_evict);
    $display("errors with avoidance off=%0d pipeline holds=%0d stall cycles=%0d table=%0d",
             n_off_err, n_hold, n_stall, cet_count);
    check(n_se > 0,       "mechanism: single error detected");
    check(n_ce > 0,       "mechanism: chain error detected");
    check(n_flush > 0,    "mechanism: flush and replay");
    check(n_past_wb > 0,  "mechanism: replay of an instruction past WB");
    check(n_avoid_se > 0, "mechanism: SE avoided by one stall");
    check(n_avoid_ce > 0, "mechanism: CE avoided by two stalls");
    check(n_hit > 0,      "mechanism: table hit");
    check(n_evict > 0,    "mechanism: pseudo-LRU replacement");
    check(n_off_err > 0,  "mechanism: avoidance off");
    check(n_hold > 0,     "mechanism: pipeline hold");
    check(cet_count == 8'd128, "table full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
