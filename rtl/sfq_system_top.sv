// Top level: the two superconducting-logic designs side by side.
//
//  - sfqp_core: the 4-bit bit-parallel, gate-level-pipelined SIMT processor
//    (12 threads, 24 pipeline stages, shift-register state).
//  - snpu_top:  the SuperNPU weight-stationary neural processing unit
//    (256 x 64 PE array, 8 weights per PE, divided shift-register buffers).
// The two share nothing but the clock and reset; each brings out its own
// ports, prefixed proc_ and npu_. The on-chip clock generator of the
// processor chip is outside the RTL: `clk` is an input.
module sfq_system_top
  import sfqp_pkg::*;
  import snpu_pkg::*;
#(
  parameter int NPU_ROWS      = 256,
  parameter int NPU_COLS      = 64,
  parameter int NPU_NREGS     = 8,
  parameter int NPU_STAGES    = 15,
  parameter int NPU_IF_CHUNKS = 64,
  parameter int NPU_OF_CHUNKS = 256,
  parameter int NPU_LEN       = 1536
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // processor
  input  logic                              proc_im_load_en,
  input  logic [9:0]                        proc_im_load_data,
  input  logic                              proc_dm_load_en,
  input  logic [15:0]                       proc_dm_load_data,
  input  logic                              proc_start,
  output logic                              proc_running,
  output logic                              proc_halted,
  output logic [15:0]                       proc_rf_entry,
  output logic [15:0]                       proc_dm_entry,
  output logic [11:0]                       proc_sign_flags,
  output logic [3:0]                        proc_head_thread,
  output logic [9:0]                        proc_ir,
  output logic [4:0]                        proc_im_pos,
  output logic [31:0]                       proc_issued_ops,
  // SuperNPU
  input  logic                              npu_if_wr,
  input  logic [$clog2(NPU_IF_CHUNKS)-1:0]  npu_if_wr_chunk,
  input  logic [NPU_ROWS*8-1:0]             npu_if_wr_data,
  input  logic                              npu_wb_wr,
  input  logic [NPU_COLS*8-1:0]             npu_wb_wr_data,
  input  logic                              npu_dau_cfg_we,
  input  logic [$clog2(NPU_ROWS)-1:0]       npu_dau_cfg_row,
  input  dau_row_cfg_t                      npu_dau_cfg,
  input  logic                              npu_layer_we,
  input  layer_cfg_t                        npu_layer_in,
  input  logic                              npu_map_start,
  input  mapping_t                          npu_map_in,
  output logic                              npu_busy,
  output logic                              npu_done,
  output logic [2:0]                        npu_phase,
  input  logic [$clog2(NPU_OF_CHUNKS)-1:0]  npu_ho_chunk,
  input  logic                              npu_ho_shift,
  output logic [NPU_COLS*8-1:0]             npu_ho_data,
  output logic                              npu_ho_at_origin,
  output logic [31:0]                       npu_results_written
);
  sfqp_core u_proc (
    .clk, .rst_n,
    .im_load_en(proc_im_load_en), .im_load_data(proc_im_load_data),
    .dm_load_en(proc_dm_load_en), .dm_load_data(proc_dm_load_data),
    .start(proc_start), .running(proc_running), .halted(proc_halted),
    .rf_entry(proc_rf_entry), .dm_entry(proc_dm_entry), .sign_flags(proc_sign_flags),
    .head_thread(proc_head_thread), .ir(proc_ir), .im_pos(proc_im_pos),
    .issued_ops(proc_issued_ops));

  snpu_top #(
    .ROWS(NPU_ROWS), .COLS(NPU_COLS), .NREGS(NPU_NREGS), .STAGES(NPU_STAGES), .W(8),
    .IF_CHUNKS(NPU_IF_CHUNKS), .OF_CHUNKS(NPU_OF_CHUNKS), .LEN(NPU_LEN)
  ) u_npu (
    .clk, .rst_n,
    .if_wr(npu_if_wr), .if_wr_chunk(npu_if_wr_chunk), .if_wr_data(npu_if_wr_data),
    .wb_wr(npu_wb_wr), .wb_wr_data(npu_wb_wr_data),
    .dau_cfg_we(npu_dau_cfg_we), .dau_cfg_row(npu_dau_cfg_row), .dau_cfg(npu_dau_cfg),
    .layer_we(npu_layer_we), .layer_in(npu_layer_in),
    .map_start(npu_map_start), .map_in(npu_map_in), .busy(npu_busy), .done(npu_done),
    .phase(npu_phase), .ho_chunk(npu_ho_chunk), .ho_shift(npu_ho_shift),
    .ho_data(npu_ho_data), .ho_at_origin(npu_ho_at_origin),
    .results_written(npu_results_written));
endmodule
