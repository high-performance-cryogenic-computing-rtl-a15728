// Instruction memory of the SIMT prototype processor: a 24-entry loop-shaped
// shift register of 10-bit instructions (240 bits).
//
// The entry at the access port is `instr`. While `load_en` is high the memory
// is filled at low speed: each load replaces the entry at the port and turns
// the loop by one, so after ENTRIES loads the first loaded word is back at the
// port. During execution `advance` turns the loop by 1 + `skip` entries, which
// the controller asserts once per instruction slot; a skip of n entries is how
// the conditional skip instruction jumps over the termination and
// initialisation areas of the looping program. The loop is modelled as an
// array with a rotating port index, equivalent at the ports to the shift
// register. Reset puts entry 0 at the port; the contents are not reset.
module sfqp_imem #(
  parameter int ENTRIES = 24,
  parameter int IW      = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_en,
  input  logic [IW-1:0] load_data,
  input  logic          advance,
  input  logic [3:0]    skip,
  output logic [IW-1:0] instr,
  output logic [$clog2(ENTRIES)-1:0] pos
);
  localparam int AW = $clog2(ENTRIES);
  logic [IW-1:0] mem [ENTRIES];

  function automatic logic [AW-1:0] wrap_add(input logic [AW-1:0] p, input int unsigned n);
    int unsigned s;
    s = (int'(p) + n) % ENTRIES;
    return AW'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos <= '0;
    end else if (load_en) begin
      mem[pos] <= load_data;
      pos      <= wrap_add(pos, 1);
    end else if (advance) begin
      pos <= wrap_add(pos, 1 + int'(skip));
    end
  end

  assign instr = mem[pos];
endmodule
