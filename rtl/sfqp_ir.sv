// Instruction register and decoder of the SIMT prototype processor.
//
// Captures a 10-bit instruction on `load` and presents it decoded for the
// whole instruction slot, during which every thread executes it. Field
// positions follow the published instruction format: opcode [9:4], rsd/rd
// [3:2], rs/imm [1:0], offset [3:0]. Opcodes outside the instruction set decode
// as NOP (this implementation's choice). Reset clears the register to NOP.
module sfqp_ir
  import sfqp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [IW-1:0] instr_in,
  output logic [IW-1:0] ir,
  output dec_t          dec
);
  always_ff @(posedge clk) begin
    if (!rst_n)    ir <= '0;
    else if (load) ir <= instr_in;
  end

  always_comb begin
    dec        = '0;
    dec.rsd    = ir[3:2];
    dec.rs     = ir[1:0];
    dec.offset = ir[3:0];
    case (ir[9:4])
      OP_ADD:   begin dec.op = OP_ADD;   dec.alu = 1'b1; dec.set_flag = 1'b1; end
      OP_SUB:   begin dec.op = OP_SUB;   dec.alu = 1'b1; dec.sub = 1'b1; dec.set_flag = 1'b1; end
      OP_ADDS0: begin dec.op = OP_ADDS0; dec.alu = 1'b1; dec.cond = 1'b1; end
      OP_SUBS0: begin dec.op = OP_SUBS0; dec.alu = 1'b1; dec.sub = 1'b1; dec.cond = 1'b1; end
      OP_ADDI:  begin dec.op = OP_ADDI;  dec.alu = 1'b1; dec.use_imm = 1'b1; dec.set_flag = 1'b1; end
      OP_SUBI:  begin dec.op = OP_SUBI;  dec.alu = 1'b1; dec.use_imm = 1'b1; dec.sub = 1'b1; dec.set_flag = 1'b1; end
      OP_LW:    begin dec.op = OP_LW;    dec.lw = 1'b1; end
      OP_LI:    begin dec.op = OP_LI;    dec.li = 1'b1; end
      OP_SW:    begin dec.op = OP_SW;    dec.sw = 1'b1; end
      OP_SKS0:  begin dec.op = OP_SKS0;  dec.skip = 1'b1; end
      OP_HLT:   begin dec.op = OP_HLT;   dec.halt = 1'b1; end
      default:  dec.op = OP_NOP;
    endcase
  end
endmodule
