// Shift-register-based memory chunk (SRmem).
//
// LEN entries of LANES x W bits circulate through a loop of DFFs closed by an
// input multiplexer: each `shift` moves the loop by one entry, the entry
// leaving the port (`dout`) re-enters at the tail unless `wr` selects `din`
// instead. Reading is thus sequential and non-destructive; writing replaces
// the entry passing the port. `at_origin` is high when entry 0 is at the port,
// so a controller can rewind the chunk by shifting until it rises; a full turn
// takes LEN cycles, which is the data-movement cost of this memory style.
// The loop is modelled as an array with a rotating port index, which behaves
// identically at the ports and keeps simulation of large buffers cheap.
// Reset only moves entry 0 to the port; the contents are not reset.
module snpu_sr_chunk #(
  parameter int LANES = 256,
  parameter int W     = 8,
  parameter int LEN   = 1536
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift,
  input  logic                 wr,
  input  logic [LANES*W-1:0]   din,
  output logic [LANES*W-1:0]   dout,
  output logic                 at_origin
);
  localparam int AW = (LEN > 1) ? $clog2(LEN) : 1;
  logic [LANES*W-1:0] mem [LEN];
  logic [AW-1:0] pos;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos <= '0;
    end else if (shift) begin
      if (wr) mem[pos] <= din;
      pos <= (int'(pos) == LEN-1) ? '0 : pos + 1'b1;
    end
  end

  assign dout      = mem[pos];
  assign at_origin = (pos == '0);

  assert property (@(posedge clk) disable iff (!rst_n) wr |-> shift)
    else $error("write without shift");
endmodule
