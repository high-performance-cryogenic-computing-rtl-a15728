// 4-bit bit-parallel, gate-level-pipelined SIMT processor (prototype).
//
// Twelve threads share one instruction stream. Each instruction is issued for
// every thread in turn, one thread every second cycle, and flows through a
// STAGES-deep pipeline (24). Architectural state lives in loop-shaped shift
// registers that rotate with the issuing thread: the register file (4 x 4 bits
// per thread), the data memory (4 x 4 bits per thread) and the sign flag
// register (1 bit per thread). The instruction memory is a 24-entry loop of
// 10-bit instructions advanced once per 24-cycle slot.
//
// Because the slot length equals the pipeline depth, a register or memory
// result is written back in the cycle in which the same thread issues its next
// instruction, after that instruction has read its operands: two consecutive
// instructions of a program must not depend on each other through registers or
// memory (the program is scheduled for this). The sign flag is written back at
// stage FLAG_STAGE and is seen by the next instruction.
//
// Operation: fill the instruction memory (`im_load_en`, 24 words) and the data
// memory (`dm_load_en`, one 16-bit thread entry per load), pulse `start`, wait
// for `halted`, then read the state: `rf_entry`/`dm_entry` show the thread at
// the port (`head_thread`) and the rings keep turning, so all threads pass by
// within 24 cycles. `ir` and `im_pos` show the current instruction and its
// instruction-memory entry. The operation of each instruction follows the published
// instruction set; the ALU result is computed at issue and carried down the
// pipeline stages, an abstraction of the gate-level pipeline.
module sfqp_core
  import sfqp_pkg::*;
#(
  parameter int THREADS    = 12,
  parameter int STAGES     = 24,
  parameter int IM_ENTRIES = 24,
  parameter int FLAG_STAGE = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          im_load_en,
  input  logic [IW-1:0] im_load_data,
  input  logic          dm_load_en,
  input  logic [4*DW-1:0] dm_load_data,
  input  logic          start,
  output logic          running,
  output logic          halted,
  output logic [4*DW-1:0] rf_entry,
  output logic [4*DW-1:0] dm_entry,
  output logic [THREADS-1:0] sign_flags,
  output logic [$clog2(THREADS)-1:0] head_thread,
  output logic [IW-1:0] ir,
  output logic [$clog2(IM_ENTRIES)-1:0] im_pos,
  output logic [31:0]   issued_ops
);
  localparam int ISSUE_GAP = 2;
  localparam int TW = $clog2(THREADS);

  // Pipeline packet: what an issued operation will write back.
  typedef struct packed {
    logic          vld;
    logic          wr_reg;
    logic [1:0]    reg_addr;
    logic          wr_dm;
    logic [1:0]    dm_addr;
    logic [DW-1:0] data;
    logic          wr_flag;
    logic          flag;
  } pkt_t;

  initial begin
    assert (STAGES == THREADS * ISSUE_GAP)
      else $error("slot length must equal the pipeline depth");
  end

  logic [IW-1:0] im_instr;
  dec_t dec;
  logic issue, rotate, ir_load, im_advance;
  logic [3:0] im_skip;
  logic [TW-1:0] thread, dm_head;
  logic [DW-1:0] qa, qb, dq, alu_y;
  logic alu_sign, flag_q;
  pkt_t pipe [STAGES];
  pkt_t issue_pkt;

  sfqp_imem #(.ENTRIES(IM_ENTRIES), .IW(IW)) u_im (
    .clk, .rst_n, .load_en(im_load_en), .load_data(im_load_data),
    .advance(im_advance), .skip(im_skip), .instr(im_instr), .pos(im_pos));

  sfqp_ir u_ir (.clk, .rst_n, .load(ir_load), .instr_in(im_instr), .ir, .dec);

  sfqp_ctrl #(.THREADS(THREADS), .ISSUE_GAP(ISSUE_GAP)) u_ctrl (
    .clk, .rst_n, .start, .dec, .flag0(flag_q), .issue, .rotate, .thread,
    .ir_load, .im_advance, .im_skip, .running, .halted, .issued_ops);

  sfqp_regfile #(.THREADS(THREADS), .NREG(4), .DW(DW)) u_rf (
    .clk, .rst_n, .rotate, .ra(dec.rsd), .rb(dec.rs), .qa, .qb,
    .we(pipe[STAGES-1].vld && pipe[STAGES-1].wr_reg), .wa(pipe[STAGES-1].reg_addr),
    .wd(pipe[STAGES-1].data), .entry(rf_entry), .head(head_thread));

  sfqp_dmem #(.THREADS(THREADS), .WORDS(4), .DW(DW)) u_dm (
    .clk, .rst_n, .rotate, .addr(dec.rs), .q(dq),
    .we(pipe[STAGES-1].vld && pipe[STAGES-1].wr_dm), .wa(pipe[STAGES-1].dm_addr),
    .wd(pipe[STAGES-1].data), .load_en(dm_load_en), .load_data(dm_load_data),
    .entry(dm_entry), .head(dm_head));

  sfqp_sfr #(.THREADS(THREADS), .LAG((FLAG_STAGE + ISSUE_GAP - 1) / ISSUE_GAP)) u_sfr (
    .clk, .rst_n, .rotate, .q(flag_q),
    .we(pipe[FLAG_STAGE-1].vld && pipe[FLAG_STAGE-1].wr_flag), .wd(pipe[FLAG_STAGE-1].flag),
    .flags(sign_flags));

  sfqp_alu #(.DW(DW)) u_alu (
    .a(qa), .b(dec.use_imm ? zext_imm(dec.rs) : qb), .sub(dec.sub), .y(alu_y), .sign(alu_sign));

  // Operation of the issued instruction for the thread at the port.
  always_comb begin
    issue_pkt          = '0;
    issue_pkt.vld      = issue;
    issue_pkt.reg_addr = dec.rsd;
    issue_pkt.dm_addr  = dec.rs;
    issue_pkt.flag     = alu_sign;
    if (dec.alu) begin
      issue_pkt.wr_reg  = dec.cond ? !flag_q : 1'b1;
      issue_pkt.wr_flag = dec.set_flag;
      issue_pkt.data    = alu_y;
    end else if (dec.li) begin
      issue_pkt.wr_reg = 1'b1;
      issue_pkt.data   = zext_imm(dec.rs);
    end else if (dec.lw) begin
      issue_pkt.wr_reg = 1'b1;
      issue_pkt.data   = dq;
    end else if (dec.sw) begin
      issue_pkt.wr_dm = 1'b1;
      issue_pkt.data  = qa;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES; s++) pipe[s] <= '0;
    end else begin
      pipe[0] <= issue_pkt;
      for (int s = 1; s < STAGES; s++) pipe[s] <= pipe[s-1];
    end
  end

  // The data memory and the register file rotate together (outside loading).
  assert property (@(posedge clk) disable iff (!rst_n || dm_load_en) dm_head == head_thread);
  assert property (@(posedge clk) disable iff (!rst_n) issue |-> thread == head_thread);
endmodule
