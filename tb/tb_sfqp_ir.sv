// Test of the instruction register and decoder of the SIMT processor: every
// 10-bit instruction word is loaded; the register must hold it until the next
// load, and the decoded control bits must match the instruction-set table
// (opcode classes, register fields, 4-bit skip offset).
module tb_sfqp_ir;
  import sfqp_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [IW-1:0] instr_in = '0, ir;
  dec_t dec;
  int checks = 0, failures = 0;
  sfqp_ir dut (.*);
  always #5 clk = ~clk;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int w = 0; w < 1024; w++) begin
      logic [5:0] op;
      instr_in = IW'(w); load = 1; @(posedge clk); #1;
      load = 0; instr_in = IW'($urandom); @(posedge clk); #1;   // no load: must hold
      op = 6'(w >> 4);
      chk($sformatf("ir %0d", w), int'(ir), w);
      chk("rsd", int'(dec.rsd), (w >> 2) & 3);
      chk("rs", int'(dec.rs), w & 3);
      chk("offset", int'(dec.offset), w & 15);
      chk($sformatf("alu %0d", w), int'(dec.alu), int'(op inside {OP_ADD, OP_SUB, OP_ADDS0, OP_SUBS0, OP_ADDI, OP_SUBI}));
      chk("sub", int'(dec.sub), int'(op inside {OP_SUB, OP_SUBS0, OP_SUBI}));
      chk("imm", int'(dec.use_imm), int'(op inside {OP_ADDI, OP_SUBI}));
      chk("cond", int'(dec.cond), int'(op inside {OP_ADDS0, OP_SUBS0}));
      chk("set_flag", int'(dec.set_flag), int'(op inside {OP_ADD, OP_SUB, OP_ADDI, OP_SUBI}));
      chk("lw", int'(dec.lw), int'(op == OP_LW));
      chk("sw", int'(dec.sw), int'(op == OP_SW));
      chk("li", int'(dec.li), int'(op == OP_LI));
      chk("skip", int'(dec.skip), int'(op == OP_SKS0));
      chk("halt", int'(dec.halt), int'(op == OP_HLT));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
