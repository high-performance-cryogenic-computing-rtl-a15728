// Shared types and constants of the 4-bit SIMT prototype processor.
//
// Instructions are 10 bits wide: a 6-bit opcode in [9:4] followed by either two
// 2-bit fields ([3:2] rsd/rd, [1:0] rs/imm) or one 4-bit offset ([3:0]) for
// control instructions. The opcode values are the processor's published
// instruction set; the decoded-control struct is this implementation's own.
package sfqp_pkg;
  localparam int IW = 10;  // instruction width
  localparam int DW = 4;   // datapath width

  typedef enum logic [5:0] {
    OP_NOP   = 6'b000000,
    OP_HLT   = 6'b000001,
    OP_SKS0  = 6'b000010,  // conditional skip (SK6S0 in the program listing)
    OP_LI    = 6'b010000,
    OP_SW    = 6'b010100,
    OP_ADD   = 6'b100000,
    OP_ADDS0 = 6'b100100,
    OP_SUB   = 6'b101000,
    OP_SUBS0 = 6'b101100,
    OP_ADDI  = 6'b110000,
    OP_SUBI  = 6'b111000,
    OP_LW    = 6'b111100
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [1:0]  rsd;      // rsd (binary op) or rd (data transfer)
    logic [1:0]  rs;       // rs or 2-bit immediate
    logic [3:0]  offset;   // control-instruction offset
    logic        alu;      // ADD/SUB/ADDI/SUBI/ADDS0/SUBS0
    logic        use_imm;  // second operand is the zero-extended immediate
    logic        sub;      // subtract
    logic        cond;     // executes only when the thread's sign flag is 0
    logic        set_flag; // writes the sign flag
    logic        li;
    logic        lw;
    logic        sw;
    logic        skip;
    logic        halt;
  } dec_t;

  // Zero-extends the 2-bit immediate to the datapath width.
  function automatic logic [DW-1:0] zext_imm(input logic [1:0] imm);
    return {{(DW-2){1'b0}}, imm};
  endfunction
endpackage
