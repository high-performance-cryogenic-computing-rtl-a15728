// SuperNPU: a weight-stationary systolic neural processing unit built for
// gate-level-pipelined superconducting logic.
//
// Data path: divided ifmap buffer -> data alignment unit -> ROWS x COLS PE
// array (NREGS weights per PE) -> integrated psum/ofmap buffer, plus a weight
// buffer of ROWS*NREGS entries of COLS weights. All memories are
// shift-register chunks read and written sequentially.
//
// Host interface (off-chip memory side):
//   if_wr/if_wr_chunk/if_wr_data  append a ROWS-channel word to an ifmap chunk
//   wb_wr/wb_wr_data              append a COLS-weight word to the weight buffer;
//                                 for register k, entries k*ROWS .. k*ROWS+ROWS-1
//                                 hold rows ROWS-1 down to 0
//   dau_cfg_we/row/cfg, layer_we/layer_in   alignment configuration
//   map_start/map_in -> busy, done          run one weight mapping
//   ho_chunk/ho_shift -> ho_data            read an output chunk
// One mapping: load weights, rewind the chunks, stream `npix` ifmap entries
// (each for `nk` weight registers), drain. For every valid result slot the
// ofmap chunk receives one COLS-wide word: column c, slot k is filter
// k*COLS + c. With use_psum the word first accumulates onto the psum chunk's
// entry in the same order, which is how a previous mapping's output becomes
// this mapping's partial sum. PE row 0 must have a weight mapped; its valid
// pattern paces the psum reads.
// Timing of one mapping: nk*(ROWS+1) cycles of weight loading, up to LEN
// cycles of rewinding, exactly npix*nk streaming cycles (one slot of
// ROWS*COLS MACs per cycle, no stall), then a fixed drain (snpu_ctrl) during
// which the ifmap chunk is turned back to entry 0 for the host's next fill.
// Buffer sizes, chunk counts, array size, register count and PE depth are the
// published ones; the host ports, the sequencer and the word orders are this
// implementation's choices.
module snpu_top
  import snpu_pkg::*;
#(
  parameter int ROWS      = 256,
  parameter int COLS      = 64,
  parameter int NREGS     = 8,
  parameter int STAGES    = 15,
  parameter int W         = 8,
  parameter int IF_CHUNKS = 64,
  parameter int OF_CHUNKS = 256,
  parameter int LEN       = 1536,
  parameter int ADJ_MAX   = LEN - 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          if_wr,
  input  logic [$clog2(IF_CHUNKS)-1:0]  if_wr_chunk,
  input  logic [ROWS*W-1:0]             if_wr_data,
  input  logic                          wb_wr,
  input  logic [COLS*W-1:0]             wb_wr_data,
  input  logic                          dau_cfg_we,
  input  logic [$clog2(ROWS)-1:0]       dau_cfg_row,
  input  dau_row_cfg_t                  dau_cfg,
  input  logic                          layer_we,
  input  layer_cfg_t                    layer_in,
  input  logic                          map_start,
  input  mapping_t                      map_in,
  output logic                          busy,
  output logic                          done,
  output logic [2:0]                    phase,
  input  logic [$clog2(OF_CHUNKS)-1:0]  ho_chunk,
  input  logic                          ho_shift,
  output logic [COLS*W-1:0]             ho_data,
  output logic                          ho_at_origin,
  output logic [31:0]                   results_written
);
  localparam int SW = $clog2(NREGS);
  localparam int WB_LEN = ROWS * NREGS;

  layer_cfg_t layer;
  mapping_t   map;
  logic wb_shift_c, w_shift, w_commit, if_rot, ps_rot, of_rot;
  logic dau_vld, dau_pix_adv, dau_restart;
  logic [SW-1:0] w_idx, dau_wsel;
  logic if_at_origin, ps_at_origin, of_at_origin, wb_at_origin;
  logic [ROWS*W-1:0] if_rd_data;
  logic [COLS*W-1:0] wb_dout, ps_data;
  logic [ROWS-1:0][W-1:0] row_data;
  logic [ROWS-1:0]        row_vld;
  logic [ROWS-1:0][SW-1:0] row_wsel;
  logic [COLS-1:0][W-1:0] out_data;
  logic [COLS-1:0]        out_vld;
  logic                   row0_vld_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      layer           <= '0;
      row0_vld_q      <= 1'b0;
      results_written <= '0;
    end else begin
      if (layer_we) layer <= layer_in;
      row0_vld_q <= row_vld[0];
      if (out_vld[0]) results_written <= results_written + 1;
    end
  end

  snpu_ctrl #(.ROWS(ROWS), .COLS(COLS), .NREGS(NREGS), .STAGES(STAGES), .ADJ_MAX(ADJ_MAX)) u_ctrl (
    .clk, .rst_n, .start(map_start), .map_in, .map,
    .if_at_origin, .ps_at_origin, .of_at_origin, .wb_at_origin,
    .wb_shift(wb_shift_c), .w_shift, .w_commit, .w_idx, .if_rot, .ps_rot, .of_rot,
    .dau_vld, .dau_wsel, .dau_pix_adv, .dau_restart, .phase, .busy, .done);

  snpu_sr_chunk #(.LANES(COLS), .W(W), .LEN(WB_LEN)) u_wbuf (
    .clk, .rst_n, .shift(wb_wr || wb_shift_c), .wr(wb_wr), .din(wb_wr_data),
    .dout(wb_dout), .at_origin(wb_at_origin));

  snpu_ifmap_buf #(.ROWS(ROWS), .W(W), .CHUNKS(IF_CHUNKS), .LEN(LEN)) u_ibuf (
    .clk, .rst_n, .wr_en(if_wr), .wr_chunk(if_wr_chunk), .wr_data(if_wr_data),
    .rd_chunk(map.if_chunk[$clog2(IF_CHUNKS)-1:0]), .rd_shift(if_rot),
    .rd_data(if_rd_data), .rd_at_origin(if_at_origin));

  snpu_dau #(.ROWS(ROWS), .W(W), .NREGS(NREGS), .STAGES(STAGES), .ADJ_MAX(ADJ_MAX)) u_dau (
    .clk, .rst_n, .cfg_we(dau_cfg_we), .cfg_row(dau_cfg_row), .cfg_data(dau_cfg), .layer,
    .in_data(if_rd_data), .in_vld(dau_vld), .in_wsel(dau_wsel), .pix_adv(dau_pix_adv),
    .restart(dau_restart), .row_data, .row_vld, .row_wsel);

  snpu_pe_array #(.ROWS(ROWS), .COLS(COLS), .DATA_W(W), .NREGS(NREGS), .STAGES(STAGES)) u_array (
    .clk, .rst_n, .row_data, .row_vld, .row_wsel,
    .w_in(wb_dout), .w_shift, .w_commit, .w_idx,
    .psum_in(map.use_psum ? ps_data : '0), .psum_in_vld(1'b0),
    .out_data, .out_vld);

  snpu_out_buf #(.COLS(COLS), .W(W), .CHUNKS(OF_CHUNKS), .LEN(LEN)) u_obuf (
    .clk, .rst_n,
    .ps_chunk(map.ps_chunk[$clog2(OF_CHUNKS)-1:0]), .ps_shift(ps_rot || (map.use_psum && row0_vld_q)),
    .ps_data, .ps_at_origin,
    .of_chunk(map.of_chunk[$clog2(OF_CHUNKS)-1:0]), .of_shift(of_rot || out_vld[0]), .of_wr(out_vld[0]),
    .of_data(out_data), .of_at_origin,
    .ho_chunk, .ho_shift, .ho_data, .ho_at_origin);

  // All columns of a result word are valid together.
  assert property (@(posedge clk) disable iff (!rst_n) out_vld[0] |-> &out_vld)
    else $error("result word with partly valid columns");
endmodule
