// ccr: choke clearance register, the instruction buffer of the DE..WB window.
//
// Entry i describes the instruction in pipestage i (0 = DE, NUM_STAGES-1 =
// WB): valid bit, PC, EID (opcode and operand sizes) and the error classes
// the choke error table predicted for it. The entry in DE gets its prediction
// from a live table lookup (pred0); that prediction is stored with the
// instruction when it moves to the next stage and travels with it from then.
// The controller reads the window to build the EID of an errant instruction,
// to take the PC to replay from, and to decide stall cycles.
//
// Timing: on a rising clk edge with `advance` every entry moves one stage on
// and the instruction presented at in_* enters DE; the WB entry leaves. With
// `flush`, the instructions at positions 0..flush_pos (the errant one and all
// younger ones) are squashed, and the instruction presented at in_* is
// dropped; older ones carry on. Keeping PC, opcode and operand sizes follows
// the scheme; the carried prediction and the squash rule are this design's.
module ccr
  import trident_pkg::*;
#(
  parameter int unsigned NUM_ST = NUM_STAGES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   advance,
  input  logic                   in_valid,
  input  logic [PC_W-1:0]        in_pc,
  input  eid_t                   in_eid,
  input  stage_cls_t             pred0,
  input  logic                   flush,
  input  logic [POS_W-1:0]       flush_pos,
  output ccr_entry_t             entries [NUM_ST]
);

  ccr_entry_t q [NUM_ST];

  // an entry at position i is squashed by a flush reaching it
  function automatic logic squashed(input logic [POS_W-1:0] i);
    return flush && (i <= flush_pos);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_ST; i++) q[i] <= '0;
    end else if (advance) begin
      q[0].valid <= in_valid && !flush;
      q[0].pc    <= in_pc;
      q[0].eid   <= in_eid;
      q[0].pred  <= '0;
      for (int i = 1; i < NUM_ST; i++) begin
        q[i]       <= q[i-1];
        q[i].valid <= q[i-1].valid && !squashed(POS_W'(i - 1));
      end
      q[1].pred <= pred0;
    end else begin
      for (int i = 0; i < NUM_ST; i++)
        if (squashed(POS_W'(i))) q[i].valid <= 1'b0;
    end
  end

  assign entries = q;

endmodule
