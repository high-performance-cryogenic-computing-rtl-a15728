// Branches of the SuperNPU's store-and-forward (2D systolic) network.
//
// Each branch is a DFF that receives a word from one PE and hands it to the
// next PE one cycle later; the word is also used by the PE beside it (the
// splitter of the physical network is a plain fan-out here). Chaining these
// links along a PE row moves each ifmap pixel one column per cycle, so no wire
// ever drives more than one hop. N branches can be placed side by side in one
// instance (the PE array uses one instance per row); each has a W-bit word
// and a valid bit. Valid bits are reset; data words are not.
// Interface: d/vld in, q/q_vld out one cycle later. The DFF-plus-splitter
// structure is the published one; the grouping of branches is this
// implementation's choice.
module snpu_nw_link #(
  parameter int W = 8,
  parameter int N = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N*W-1:0] d,
  input  logic [N-1:0]   vld,
  output logic [N*W-1:0] q,
  output logic [N-1:0]   q_vld
);
  always_ff @(posedge clk) begin
    q <= d;
    if (!rst_n) q_vld <= '0;
    else        q_vld <= vld;
  end
endmodule
