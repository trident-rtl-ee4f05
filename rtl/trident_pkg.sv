// trident_pkg: types and constants shared by the choke-error resilience blocks.
//
// An instruction is identified for error prediction by its error instance ID
// (EID): the opcode plus the size, in significant bits, of each of its two
// source operands. The window watched by the scheme spans the pipestages from
// decode to writeback (DE, EX, MEM, WB), so NUM_STAGES is 4. Error classes
// follow the two categories a transition counter can report: a single error
// (SE, one illegal transition, a minimum or a maximum timing violation) and a
// chain error (CE, two or more illegal transitions in one cycle).
// The four-stage window, the 6-bit opcode and the encodings below are this
// design's choices; the classes and what the EID holds follow the scheme.
package trident_pkg;

  localparam int unsigned NUM_STAGES = 4;   // DE, EX, MEM, WB
  localparam int unsigned STAGE_W    = 2;   // index of a stage
  localparam int unsigned POS_W      = 3;   // 0..NUM_STAGES (NUM_STAGES = past WB)
  localparam int unsigned PC_W       = 32;
  localparam int unsigned DATA_W     = 32;
  localparam int unsigned OPC_W      = 6;
  localparam int unsigned SIZE_W     = 6;   // 0..32 significant bits

  typedef enum logic [1:0] {
    CLS_NONE = 2'd0,
    CLS_SE   = 2'd1,   // single error: one stall cycle avoids it
    CLS_CE   = 2'd2    // chain error: two stall cycles avoid it
  } err_class_e;

  typedef struct packed {
    logic [OPC_W-1:0]  opcode;
    logic [SIZE_W-1:0] size_a;
    logic [SIZE_W-1:0] size_b;
  } eid_t;

  // error class per pipestage, index 0 = DE
  typedef err_class_e [NUM_STAGES-1:0] stage_cls_t;

  typedef struct packed {
    logic       valid;
    logic [PC_W-1:0] pc;
    eid_t       eid;
    stage_cls_t pred;      // CET prediction carried with the instruction
  } ccr_entry_t;

  // one logged error instance, from the controller to the table
  typedef struct packed {
    logic                valid;
    eid_t                eid;
    logic [STAGE_W-1:0]  stage;
    err_class_e          cls;
  } err_log_t;

  // number of significant bits of an operand: index of the highest set bit
  // plus one, 0 for a zero operand
  function automatic logic [SIZE_W-1:0] operand_size(input logic [DATA_W-1:0] v);
    logic [SIZE_W-1:0] n;
    n = '0;
    for (int i = 0; i < DATA_W; i++)
      if (v[i]) n = SIZE_W'(i + 1);
    return n;
  endfunction

  // stall cycles needed to avoid an error of class c
  function automatic logic [1:0] stall_need(input err_class_e c);
    case (c)
      CLS_SE:  return 2'd1;
      CLS_CE:  return 2'd2;
      default: return 2'd0;
    endcase
  endfunction

endpackage
