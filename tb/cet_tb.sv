// cet_tb: self-checking testbench for the choke error table.
//
// Instance `dut` has 8 entries so that replacement happens often. Random
// lookups and writes over a small EID space are applied and compared with a
// reference table kept in the testbench: per-entry valid/EID/classes and a
// pseudo-LRU tree stored as one "points right" flag per internal node. The
// lookup result, the eviction flag and the occupancy are checked every cycle.
// Instance `dut_full` has the default 128 entries: it is filled with 128
// distinct EIDs in order, after which the 129th EID must evict entry 0 (the
// least recently used), and a lookup of a stored EID must return its class.
`timescale 1ns/1ps
module cet_tb;
  import trident_pkg::*;

  localparam int N = 8;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic       lk_en;
  eid_t       lk_eid;
  logic       lk_hit;
  stage_cls_t lk_cls;
  err_log_t   wr;
  logic       evict;
  logic [$clog2(N):0] count;
  int checks = 0, failures = 0;

  cet #(.ENTRIES(N)) dut (.*);

  // full-size instance
  logic       f_lk_en;
  eid_t       f_lk_eid;
  logic       f_lk_hit;
  stage_cls_t f_lk_cls;
  err_log_t   f_wr;
  logic       f_evict;
  logic [7:0] f_count;
  cet dut_full (.clk(clk), .rst_n(rst_n), .lk_en(f_lk_en), .lk_eid(f_lk_eid),
                .lk_hit(f_lk_hit), .lk_cls(f_lk_cls), .wr(f_wr), .evict(f_evict),
                .count(f_count));

  always #5 clk = !clk;

  // reference
  bit         rv [N];
  eid_t       re [N];
  stage_cls_t rc [N];
  bit         right [1:N-1];

  function automatic int ref_find(eid_t e);
    for (int i = 0; i < N; i++) if (rv[i] && re[i] == e) return i;
    return -1;
  endfunction

  function automatic int ref_victim();
    int node = 1;
    while (node < N) node = right[node] ? 2 * node + 1 : 2 * node;
    return node - N;
  endfunction

  function automatic void ref_touch(int idx);
    int leaf = idx + N;
    while (leaf > 1) begin
      right[leaf / 2] = (leaf % 2 == 0);   // used the left child: point right
      leaf = leaf / 2;
    end
  endfunction

  function automatic eid_t small_eid(int k);
    eid_t e;
    e.opcode = OPC_W'(k % 5);
    e.size_a = SIZE_W'(k / 5);
    e.size_b = SIZE_W'(7);
    return e;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL at %t: %s", $time, msg);
    end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_evict = 0, n_hit = 0, n_merge = 0;

  initial begin
    lk_en = 0; lk_eid = '0; wr = '0;
    f_lk_en = 0; f_lk_eid = '0; f_wr = '0;
    for (int i = 0; i < N; i++) begin rv[i] = 0; re[i] = '0; rc[i] = '0; end
    for (int i = 1; i < N; i++) right[i] = 0;
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset is seen
    #11 rst_n = 1'b1;

    // ---- random run against the reference (8 entries) ----
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int li, wi, cnt;
      bit exp_ev;
      @(negedge clk);
      lk_en  = 1'($urandom_range(0, 1));
      lk_eid = small_eid($urandom_range(0, 19));
      wr.valid = ($urandom_range(0, 2) == 0);
      wr.eid   = small_eid($urandom_range(0, 19));
      wr.stage = STAGE_W'($urandom_range(0, NUM_STAGES - 1));
      wr.cls   = ($urandom_range(0, 1) != 0) ? CLS_CE : CLS_SE;
      #1;
      li = ref_find(lk_eid);
      check(lk_hit == (li >= 0), "lookup hit");
      if (li >= 0) begin
        n_hit++;
        check(lk_cls == rc[li], "lookup classes");
      end
      cnt = 0;
      for (int i = 0; i < N; i++) cnt += rv[i];
      check(int'(count) == cnt, "occupancy");
      // reference update, in the DUT's order: lookup touch, then write
      if (lk_en && li >= 0) ref_touch(li);
      exp_ev = 0;
      if (wr.valid) begin
        wi = ref_find(wr.eid);
        if (wi >= 0) begin
          n_merge++;
          if (wr.cls > rc[wi][wr.stage]) rc[wi][wr.stage] = wr.cls;
        end else begin
          wi = -1;
          for (int i = N - 1; i >= 0; i--) if (!rv[i]) wi = i;
          if (wi < 0) begin
            wi = ref_victim();
            exp_ev = 1;
          end
          rv[wi] = 1; re[wi] = wr.eid; rc[wi] = '0; rc[wi][wr.stage] = wr.cls;
        end
        ref_touch(wi);
      end
      check(evict == exp_ev, "evict flag");
      n_evict += exp_ev;
    end
    check(n_evict > 10 && n_hit > 10 && n_merge > 10, "coverage of replacement, hit, merge");
    @(negedge clk);
    wr = '0; lk_en = 0;

    // ---- full size: 128 entries ----
    for (int k = 0; k < 128; k++) begin
      @(negedge clk);
      f_wr.valid = 1; f_wr.eid = eid_t'(k + 1000); f_wr.stage = 2'(k % 4);
      f_wr.cls = (k % 3 == 0) ? CLS_CE : CLS_SE;
      #1 check(!f_evict, "no eviction while filling");
    end
    @(negedge clk);
    f_wr = '0;
    #1 check(f_count == 8'd128, "table full at 128 entries");
    f_lk_eid = eid_t'(1000 + 77);
    #1 check(f_lk_hit && f_lk_cls[1] == CLS_SE && f_lk_cls[0] == CLS_NONE, "full-size lookup");
    @(negedge clk);
    f_wr.valid = 1; f_wr.eid = eid_t'(5000); f_wr.stage = 2'd3; f_wr.cls = CLS_CE;
    #1 check(f_evict, "129th EID evicts");
    @(negedge clk);
    f_wr = '0;
    f_lk_eid = eid_t'(1000);
    #1 check(!f_lk_hit, "entry 0 (least recently used) was the victim");
    f_lk_eid = eid_t'(5000);
    #1 check(f_lk_hit && f_lk_cls[3] == CLS_CE, "new entry present");
    check(f_count == 8'd128, "still 128 entries");

    $display("hits=%0d merges=%0d evictions=%0d", n_hit, n_merge, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
