// Test host for the SIMT prototype processor: loads the 2-by-2
// matrix-vector element program (acc = a1*b1 + a2*b2 by repeated addition,
// a kernel loop of two passes closed by the conditional skip) and random
// per-thread data, starts the core, and checks every thread's final
// registers, data memory and sign flag, the cycle count of the run (41
// issued slots of 24 cycles) and the issue rate of 0.5 operations per cycle.
// It also counts the mechanisms seen: skip instructions reaching the
// instruction register, halt, and conditional adds done and suppressed.
module sfqp_host
  import sfqp_pkg::*;
#(parameter int THREADS = 12) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          im_load_en,
  output logic [IW-1:0] im_load_data,
  output logic          dm_load_en,
  output logic [15:0]   dm_load_data,
  output logic          start,
  input  logic          running,
  input  logic          halted,
  input  logic [15:0]   rf_entry,
  input  logic [15:0]   dm_entry,
  input  logic [THREADS-1:0] sign_flags,
  input  logic [3:0]    head_thread,
  input  logic [IW-1:0] ir,
  input  logic [4:0]    im_pos,
  input  logic [31:0]   issued_ops,
  output logic          finished,
  output int            checks,
  output int            failures
);
  int n_skip = 0, n_add_taken = 0, n_add_not = 0;
  logic [IW-1:0] ir_q;
  always @(posedge clk) begin
    ir_q <= ir;
    if (ir != ir_q && ir[9:4] == OP_SKS0) n_skip++;
  end

  // Program: {opcode, field1, field2}
  function automatic logic [9:0] ins(logic [5:0] op, logic [1:0] f1, logic [1:0] f2);
    return {op, f1, f2};
  endfunction
  logic [9:0] prog [24];
  initial begin
    prog[0]  = ins(OP_LI,   2, 1);   // count = 1
    prog[1]  = ins(OP_LI,   3, 0);   // acc = 0
    prog[2]  = ins(OP_NOP,  0, 0);
    prog[3]  = ins(OP_LW,   1, 2);   // multiplier b1
    prog[4]  = ins(OP_LW,   0, 0);   // multiplicand a1
    prog[5]  = ins(OP_SUBI, 1, 1);
    prog[6]  = ins(OP_ADDS0,3, 0);
    prog[7]  = ins(OP_SW,   1, 2);
    prog[8]  = ins(OP_LW,   1, 3);   // multiplier b2
    prog[9]  = ins(OP_LW,   0, 1);   // multiplicand a2
    prog[10] = ins(OP_SUBI, 1, 1);
    prog[11] = ins(OP_ADDS0,3, 0);
    prog[12] = ins(OP_SW,   1, 3);
    prog[13] = ins(OP_SUBI, 2, 1);   // count--
    for (int i = 14; i <= 18; i++) prog[i] = '0;
    prog[19] = {OP_SKS0, 4'd6};      // skip 6 entries if sign flag == 0
    prog[20] = '0;                   // delay slot
    prog[21] = ins(OP_SW,   3, 0);   // M[0] = acc
    prog[22] = '0;
    prog[23] = {OP_HLT, 4'd0};
  end

  int a1 [THREADS], a2 [THREADS], b1 [THREADS], b2 [THREADS];
  int cyc;
  logic [THREADS-1:0] seen;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    im_load_en = 0; dm_load_en = 0; start = 0; im_load_data = '0; dm_load_data = '0;
    finished = 0; checks = 0; failures = 0;
    wait (rst_n);
    @(posedge clk);
    for (int i = 0; i < 24; i++) begin
      im_load_en <= 1; im_load_data <= prog[i]; @(posedge clk);
    end
    im_load_en <= 0;
    for (int t = 0; t < THREADS; t++) begin
      a1[t] = int'($urandom_range(7)) - 4; a2[t] = int'($urandom_range(7)) - 4;
      b1[t] = int'($urandom_range(2));     b2[t] = int'($urandom_range(2));
      dm_load_en <= 1;
      dm_load_data <= {4'(b2[t]), 4'(b1[t]), 4'(a2[t]), 4'(a1[t])};
      @(posedge clk);
    end
    dm_load_en <= 0;
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    cyc = 1;
    while (!halted && cyc < 5000) begin @(posedge clk); cyc++; end
    // HLT is reached in slot 41 (0-based): one cycle loads the instruction
    // register, 41 slots of 24 cycles issue, the halt state follows the first
    // cycle of the HLT slot; `halted` is sampled just after each edge, before
    // the edge's updates, so it is seen one edge later.
    chk("cycles from start to halt", cyc, 1 + 41*24 + 1 + 2);
    chk("issued thread-operations", int'(issued_ops), 41 * THREADS);
    chk("issue rate x1000 (0.5 op/cycle)", int'(issued_ops) * 1000 / (41 * 24), 500);
    repeat (30) @(posedge clk);   // drain the pipeline
    seen = '0;
    for (int k = 0; k < 2*THREADS; k++) begin
      @(negedge clk);
      if (!seen[head_thread]) begin
        int t;
        t = int'(head_thread);
        seen[t] = 1'b1;
        chk($sformatf("t%0d M0=acc", t), int'(dm_entry[3:0]),   (a1[t]*b1[t] + a2[t]*b2[t]) & 15);
        chk($sformatf("t%0d M1", t),     int'(dm_entry[7:4]),   a2[t] & 15);
        chk($sformatf("t%0d M2", t),     int'(dm_entry[11:8]),  (b1[t]-2) & 15);
        chk($sformatf("t%0d M3", t),     int'(dm_entry[15:12]), (b2[t]-2) & 15);
        chk($sformatf("t%0d r0", t),     int'(rf_entry[3:0]),   a2[t] & 15);
        chk($sformatf("t%0d r1", t),     int'(rf_entry[7:4]),   (b2[t]-2) & 15);
        chk($sformatf("t%0d r2", t),     int'(rf_entry[11:8]),  15);
        chk($sformatf("t%0d r3", t),     int'(rf_entry[15:12]), (a1[t]*b1[t] + a2[t]*b2[t]) & 15);
        chk($sformatf("t%0d sign", t),   int'(sign_flags[t]),   1);
      end
    end
    for (int t = 0; t < THREADS; t++) begin
      if (b1[t] > 0 || b2[t] > 0) n_add_taken++;
      if (b1[t] < 2 || b2[t] < 2) n_add_not++;
    end
    chk("all threads seen", int'(seen), (1 << THREADS) - 1);
    chk("mechanism: conditional skip taken and not taken (2 loop passes)", n_skip, 2);
    chk("mechanism: halt", int'(halted), 1);
    chk("mechanism: conditional add both ways", int'(n_add_taken > 0 && n_add_not > 0), 1);
    finished = 1;
  end

endmodule
