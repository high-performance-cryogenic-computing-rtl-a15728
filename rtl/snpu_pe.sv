// Weight-stationary processing element of the SuperNPU.
//
// The PE keeps NREGS stationary weights and computes
//   psum_out = psum_in + ifmap * weight[wsel]      (modulo 2^DATA_W)
// in a STAGES-deep, feedback-free pipeline (15 stages for 8-bit data):
//   stage 1      captures the pixel and the selected weight (partial products),
//   stage 2      takes the partial sum from the PE above,
//   stages 3..   add one partial product per stage (DATA_W stages),
//   remaining    stages only carry the result to the output.
// A pixel reaches psum_out STAGES cycles after it is presented; the partial
// sum from above is used one cycle after the pixel, so the row below must see
// the same pixel STAGES-1 cycles later. Presenting a pixel once per weight
// register (wsel = 0, 1, ...) lets one pixel feed several filters.
//
// Weights are loaded through a shift chain down the column: `w_shift` moves
// w_in into the chain register (w_out feeds the PE below) and `w_commit`
// copies the chain register into weight register `w_idx`.
// Partial sums are DATA_W bits wide and wrap. psum_vld_out is the OR of the
// pixel's valid bit and the valid bit arriving from above.
// The staging of the multiplier and the weight-load chain are this
// implementation's choices; the stage count and register count are the
// published ones.
module snpu_pe #(
  parameter int DATA_W = 8,
  parameter int NREGS  = 8,
  parameter int STAGES = 15
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [DATA_W-1:0]         ifmap_in,
  input  logic                      ifmap_vld_in,
  input  logic [$clog2(NREGS)-1:0]  wsel_in,
  input  logic [DATA_W-1:0]         w_in,
  input  logic                      w_shift,
  input  logic                      w_commit,
  input  logic [$clog2(NREGS)-1:0]  w_idx,
  output logic [DATA_W-1:0]         w_out,
  input  logic [DATA_W-1:0]         psum_in,
  input  logic                      psum_vld_in,
  output logic [DATA_W-1:0]         psum_out,
  output logic                      psum_vld_out
);
  // Pipeline registers as packed vectors, index = stage - 1.
  logic [STAGES-1:0][DATA_W-1:0] a_q;    // multiplicand (pixel)
  logic [STAGES-1:0][DATA_W-1:0] b_q;    // multiplier (weight)
  logic [STAGES-1:0][DATA_W-1:0] acc_q;  // running sum
  logic [STAGES-1:0][DATA_W-1:0] acc_d;
  logic [STAGES-1:0]             vld_q;

  logic [DATA_W-1:0] wreg [NREGS];
  logic [DATA_W-1:0] wchain;

  initial assert (STAGES >= DATA_W + 2) else $error("STAGES too small for DATA_W");

  always_ff @(posedge clk) begin
    if (w_shift)  wchain <= w_in;
    if (w_commit) wreg[w_idx] <= wchain;
  end
  assign w_out = wchain;

  // stage 1: operands; stage 2: psum from above; stages 3..DATA_W+2: one
  // partial product each; the rest only delay.
  always_comb begin
    acc_d[0] = '0;
    acc_d[1] = psum_in;
    for (int s = 2; s < STAGES; s++)
      acc_d[s] = (s - 2 < DATA_W && b_q[s-1][(s-2) % DATA_W])
               ? acc_q[s-1] + (a_q[s-1] << (s-2)) : acc_q[s-1];
  end

  always_ff @(posedge clk) begin
    a_q   <= {a_q[STAGES-2:0], ifmap_in};
    b_q   <= {b_q[STAGES-2:0], wreg[wsel_in]};
    acc_q <= acc_d;
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[STAGES-2:1], vld_q[0] | psum_vld_in, ifmap_vld_in};
  end

  assign psum_out     = acc_q[STAGES-1];
  assign psum_vld_out = vld_q[STAGES-1];
endmodule
