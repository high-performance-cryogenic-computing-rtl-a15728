// Integrated psum/ofmap buffer of the SuperNPU.
//
// One pool of CHUNKS shift-register chunks (LEN entries, COLS lanes of W bits)
// replaces separate psum and ofmap buffers. Through separate selections, one
// chunk serves as the psum source (`ps_*`, multiplexer tree) while another
// receives new results (`of_*`, decoder); the chunk written by one weight
// mapping is simply selected as the psum source of the next, so no psum data
// moves between buffers. A third selection (`ho_*`) lets the host read a chunk
// out. Each selection may shift its chunk; selections that shift in the same
// cycle must name different chunks.
module snpu_out_buf #(
  parameter int COLS   = 64,
  parameter int W      = 8,
  parameter int CHUNKS = 256,
  parameter int LEN    = 1536
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(CHUNKS)-1:0]  ps_chunk,
  input  logic                       ps_shift,
  output logic [COLS*W-1:0]          ps_data,
  output logic                       ps_at_origin,
  input  logic [$clog2(CHUNKS)-1:0]  of_chunk,
  input  logic                       of_shift,
  input  logic                       of_wr,
  input  logic [COLS*W-1:0]          of_data,
  output logic                       of_at_origin,
  input  logic [$clog2(CHUNKS)-1:0]  ho_chunk,
  input  logic                       ho_shift,
  output logic [COLS*W-1:0]          ho_data,
  output logic                       ho_at_origin
);
  logic [COLS*W-1:0] dout [CHUNKS];
  logic [CHUNKS-1:0] at_origin;

  for (genvar i = 0; i < CHUNKS; i++) begin : g_chunk
    wire sel_p = ps_shift && (int'(ps_chunk) == i);
    wire sel_o = of_shift && (int'(of_chunk) == i);
    wire sel_h = ho_shift && (int'(ho_chunk) == i);
    snpu_sr_chunk #(.LANES(COLS), .W(W), .LEN(LEN)) u_chunk (
      .clk, .rst_n, .shift(sel_p || sel_o || sel_h), .wr(sel_o && of_wr), .din(of_data),
      .dout(dout[i]), .at_origin(at_origin[i]));
  end

  assign ps_data      = dout[ps_chunk];
  assign ps_at_origin = at_origin[ps_chunk];
  assign of_at_origin = at_origin[of_chunk];
  assign ho_data      = dout[ho_chunk];
  assign ho_at_origin = at_origin[ho_chunk];

  assert property (@(posedge clk) disable iff (!rst_n)
                   (ps_shift && of_shift) |-> ps_chunk != of_chunk)
    else $error("psum and ofmap selections name the same chunk");
  assert property (@(posedge clk) disable iff (!rst_n) of_wr |-> of_shift);
endmodule
