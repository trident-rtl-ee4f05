// ccr_tb: self-checking testbench for the choke clearance register.
//
// Random advance, instruction and flush patterns are applied; a reference
// window kept in the testbench shifts on advance, drops the presented
// instruction on a flush and squashes positions 0..flush_pos. After every
// edge each entry's valid bit, and for valid entries PC, EID and carried
// prediction, are compared.
`timescale 1ns/1ps
module ccr_tb;
  import trident_pkg::*;

  logic             clk = 1'b0, rst_n = 1'b1;
  logic             advance, in_valid, flush;
  logic [PC_W-1:0]  in_pc;
  eid_t             in_eid;
  stage_cls_t       pred0;
  logic [POS_W-1:0] flush_pos;
  ccr_entry_t       entries [NUM_STAGES];
  int checks = 0, failures = 0;

  ccr dut (.*);

  always #5 clk = !clk;

  // reference window
  logic             r_valid [NUM_STAGES];
  logic [PC_W-1:0]  r_pc    [NUM_STAGES];
  eid_t             r_eid   [NUM_STAGES];
  stage_cls_t       r_pred  [NUM_STAGES];

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_flush = 0, n_shift = 0;

  initial begin
    advance = 0; in_valid = 0; flush = 0; in_pc = 0; in_eid = '0; pred0 = '0; flush_pos = 0;
    for (int i = 0; i < NUM_STAGES; i++) begin
      r_valid[i] = 0; r_pc[i] = 0; r_eid[i] = '0; r_pred[i] = '0;
    end
    #1 rst_n = 1'b0;  // a falling edge, so the asynchronous reset is seen
    #11 rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      advance   = ($urandom_range(0, 3) != 0);
      in_valid  = ($urandom_range(0, 4) != 0);
      in_pc     = $urandom;
      in_eid    = eid_t'($urandom);
      pred0     = stage_cls_t'($urandom);
      flush     = ($urandom_range(0, 9) == 0);
      flush_pos = POS_W'($urandom_range(0, NUM_STAGES));
      @(posedge clk);
      // reference update
      if (advance) begin n_shift++;
        for (int i = NUM_STAGES - 1; i > 0; i--) begin
          r_valid[i] = r_valid[i-1] && !(flush && (i - 1) <= int'(flush_pos));
          r_pc[i]    = r_pc[i-1];
          r_eid[i]   = r_eid[i-1];
          r_pred[i]  = (i == 1) ? pred0 : r_pred[i-1];
        end
        r_valid[0] = in_valid && !flush;
        r_pc[0]    = in_pc;
        r_eid[0]   = in_eid;
        r_pred[0]  = '0;
      end else begin
        for (int i = 0; i < NUM_STAGES; i++)
          if (flush && i <= int'(flush_pos)) r_valid[i] = 1'b0;
      end
      if (flush) n_flush++;
      #1;
      for (int i = 0; i < NUM_STAGES; i++) begin
        checks++;
        if (entries[i].valid !== r_valid[i] ||
            (r_valid[i] && (entries[i].pc !== r_pc[i] || entries[i].eid !== r_eid[i] ||
                            (i > 0 && entries[i].pred !== r_pred[i])))) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d entry %0d: valid %0b/%0b pc %h/%h", cyc, i,
                     entries[i].valid, r_valid[i], entries[i].pc, r_pc[i]);
        end
      end
    end
    checks++;
    if (n_flush == 0 || n_shift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
