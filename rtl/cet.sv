// cet: choke error table.
//
// Each of the ENTRIES entries records one error instance ID (EID: opcode and
// operand sizes) with the error class seen in each pipestage. Every entry is
// compared with the lookup key in parallel, so the table is a register array
// with one comparator per entry. The lookup port is combinational: lk_hit and
// the per-stage classes lk_cls of the matching entry are valid in the same
// cycle as lk_eid. A write logs an error: if the EID is already stored its
// stage's class is raised (a CE is never lowered to an SE); otherwise an empty
// entry is taken, or, once the table is full, the victim chosen by a tree
// pseudo-LRU over all entries. `evict` flags, in the cycle of such a write,
// that a valid entry is being replaced.
//
// Pseudo-LRU: ENTRIES-1 tree bits, node 1 the root, node n with children 2n
// and 2n+1, leaves ENTRIES..2*ENTRIES-1 standing for entries 0..ENTRIES-1. A
// bit of 0 points the victim search to the left child. Using an entry (a hit
// on a lookup with lk_en, or a write) sets the bits on its path to point away
// from it. Timing: writes and tree updates take effect at the rising clk edge.
// The table size and the pseudo-LRU policy follow the scheme; the register
// form, the EID contents and the merge on rewrite are this design's choices.
module cet
  import trident_pkg::*;
#(
  parameter int unsigned ENTRIES = 128   // power of two
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       lk_en,
  input  eid_t                       lk_eid,
  output logic                       lk_hit,
  output stage_cls_t                 lk_cls,
  input  err_log_t                   wr,
  output logic                       evict,
  output logic [$clog2(ENTRIES):0]   count
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic       valid [ENTRIES];
  eid_t       eid   [ENTRIES];
  stage_cls_t cls   [ENTRIES];
  logic [ENTRIES-1:1] plru;

  // ---- lookup -------------------------------------------------------------
  logic [IDX_W-1:0] lk_idx;
  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (!lk_hit && valid[i] && eid[i] == lk_eid) begin
        lk_hit = 1'b1;
        lk_idx = IDX_W'(i);
      end
    lk_cls = lk_hit ? cls[lk_idx] : '0;
  end

  // ---- write target: matching entry, else empty entry, else PLRU victim ---
  logic             wr_hit, has_free;
  logic [IDX_W-1:0] wr_hit_idx, free_idx, victim_idx, wr_idx;

  always_comb begin
    wr_hit     = 1'b0;
    wr_hit_idx = '0;
    has_free   = 1'b0;
    free_idx   = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (!wr_hit && valid[i] && eid[i] == wr.eid) begin
        wr_hit     = 1'b1;
        wr_hit_idx = IDX_W'(i);
      end
      if (!has_free && !valid[i]) begin
        has_free = 1'b1;
        free_idx = IDX_W'(i);
      end
    end
  end


  assign wr_idx = wr_hit ? wr_hit_idx : (has_free ? free_idx : victim_idx);
  assign evict  = wr.valid && !wr_hit && !has_free;

  // point every tree bit on the path of entry `idx` away from it
  function automatic logic [ENTRIES-1:1] touch(input logic [ENTRIES-1:1] t,
                                               input logic [IDX_W-1:0] idx);
    logic [ENTRIES-1:1] r;
    int unsigned node;
    r    = t;
    node = 1;
    for (int l = IDX_W - 1; l >= 0; l--) begin
      r[node] = !idx[l];               // went right -> point left, and back
      node    = 2 * node + int'(idx[l]);
    end
    return r;
  endfunction

  // the lookup is used first, so a write never evicts the entry just hit
  logic [ENTRIES-1:1] plru_lk, plru_nx;
  assign plru_lk = (lk_en && lk_hit) ? touch(plru, lk_idx) : plru;
  assign plru_nx = wr.valid ? touch(plru_lk, wr_idx) : plru_lk;

  always_comb begin
    int unsigned node;
    node = 1;
    for (int l = 0; l < IDX_W; l++)
      node = plru_lk[node] ? 2 * node + 1 : 2 * node;
    victim_idx = IDX_W'(node - ENTRIES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        valid[i] <= 1'b0;
        eid[i]   <= '0;
        cls[i]   <= '0;
      end
      plru <= '0;
    end else begin
      if (wr.valid) begin
        valid[wr_idx] <= 1'b1;
        eid[wr_idx]   <= wr.eid;
        for (int s = 0; s < NUM_STAGES; s++) begin
          if (wr_hit) begin
            if (s == int'(wr.stage) && wr.cls > cls[wr_idx][s])
              cls[wr_idx][s] <= wr.cls;
          end else begin
            cls[wr_idx][s] <= (s == int'(wr.stage)) ? wr.cls : CLS_NONE;
          end
        end
      end
      plru <= plru_nx;
    end
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < ENTRIES; i++) count += {{IDX_W{1'b0}}, valid[i]};
  end

  // replacement only happens on a write into a full table
  a_evict_full: assert property (@(posedge clk) disable iff (!rst_n)
                                 evict |-> (wr.valid && count == ($clog2(ENTRIES) + 1)'(ENTRIES)));

endmodule
