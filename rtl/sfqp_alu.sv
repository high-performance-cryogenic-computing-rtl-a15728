// 4-bit bit-parallel ALU of the SIMT prototype processor.
//
// Adds or subtracts two DW-bit operands in two's complement and reports the
// sign (most significant bit) of the result, which the processor stores in the
// per-thread sign flag register. Purely combinational here; in the processor
// the result is carried down the gate-level pipeline by sfqp_core.
module sfqp_alu #(
  parameter int DW = 4
) (
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic          sub,
  output logic [DW-1:0] y,
  output logic          sign
);
  always_comb begin
    y    = sub ? (a - b) : (a + b);
    sign = y[DW-1];
  end
endmodule
