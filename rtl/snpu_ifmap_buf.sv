// Divided ifmap buffer of the SuperNPU.
//
// The buffer is split into CHUNKS shift-register chunks of LEN entries, each
// ROWS lanes wide; lane r of a chunk holds one ifmap channel, so the buffer
// holds up to ROWS*CHUNKS channels. A write decoder appends host (off-chip)
// data to chunk `wr_chunk`; a multiplexer tree presents chunk `rd_chunk` to the
// data alignment unit, and `rd_shift` advances that chunk. Only the selected
// chunks move, so the shifting distance is one chunk's length rather than the
// whole buffer's. Write and read selections must not name the same chunk in
// the same cycle.
module snpu_ifmap_buf #(
  parameter int ROWS   = 256,
  parameter int W      = 8,
  parameter int CHUNKS = 64,
  parameter int LEN    = 1536
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(CHUNKS)-1:0]  wr_chunk,
  input  logic [ROWS*W-1:0]          wr_data,
  input  logic [$clog2(CHUNKS)-1:0]  rd_chunk,
  input  logic                       rd_shift,
  output logic [ROWS*W-1:0]          rd_data,
  output logic                       rd_at_origin
);
  logic [ROWS*W-1:0] dout [CHUNKS];
  logic [CHUNKS-1:0] at_origin;

  for (genvar i = 0; i < CHUNKS; i++) begin : g_chunk
    wire sel_w = wr_en && (int'(wr_chunk) == i);
    wire sel_r = rd_shift && (int'(rd_chunk) == i);
    snpu_sr_chunk #(.LANES(ROWS), .W(W), .LEN(LEN)) u_chunk (
      .clk, .rst_n, .shift(sel_w || sel_r), .wr(sel_w), .din(wr_data),
      .dout(dout[i]), .at_origin(at_origin[i]));
  end

  assign rd_data      = dout[rd_chunk];
  assign rd_at_origin = at_origin[rd_chunk];

  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr_en && rd_shift) |-> wr_chunk != rd_chunk)
    else $error("ifmap chunk written and streamed in the same cycle");
endmodule
