// End-to-end test of the whole system at a reduced NPU size (8 x 4 PEs,
// 2 weight registers, 15-stage PEs, 64-entry chunks; the processor is at its
// published size): the SIMT processor runs the matrix-vector element program
// while the SuperNPU runs three convolution mappings (stride 1, stride 1 with
// psum accumulation, stride 2). Hosts sfqp_host and snpu_host drive and check
// both designs against reference models and count every mechanism seen:
// conditional skip, halt, conditional add; weight loading, chunk rewinding,
// DAU bubbles and delay bypassing, multi-register slots, psum accumulation,
// stride selection.
module tb_sfq_system_top;
  import sfqp_pkg::*;
  import snpu_pkg::*;
  localparam int ROWS = 8, COLS = 4, NREGS = 2, STAGES = 15, IFC = 2, OFC = 4, LEN = 64;
  localparam int C = 2, K = 2, H = 6, WD = 6, NK = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  // processor side
  logic p_im_load_en, p_dm_load_en, p_start, p_running, p_halted, p_finished;
  logic [9:0] p_im_load_data, p_ir;
  logic [15:0] p_dm_load_data, p_rf_entry, p_dm_entry;
  logic [11:0] p_sign_flags;
  logic [3:0] p_head_thread;
  logic [4:0] p_im_pos;
  logic [31:0] p_issued_ops;
  int p_checks, p_failures;
  // NPU side
  logic if_wr, wb_wr, dau_cfg_we, layer_we, map_start, busy, done, ho_shift, ho_at_origin, n_finished;
  logic [$clog2(IFC)-1:0] if_wr_chunk;
  logic [ROWS*8-1:0] if_wr_data;
  logic [COLS*8-1:0] wb_wr_data, ho_data;
  logic [$clog2(ROWS)-1:0] dau_cfg_row;
  dau_row_cfg_t dau_cfg;
  layer_cfg_t layer_in;
  mapping_t map_in;
  logic [2:0] phase;
  logic [$clog2(OFC)-1:0] ho_chunk;
  logic [31:0] results_written;
  int n_checks, n_failures;

  sfq_system_top #(.NPU_ROWS(ROWS), .NPU_COLS(COLS), .NPU_NREGS(NREGS), .NPU_STAGES(STAGES),
                   .NPU_IF_CHUNKS(IFC), .NPU_OF_CHUNKS(OFC), .NPU_LEN(LEN)) dut (
    .clk, .rst_n,
    .proc_im_load_en(p_im_load_en), .proc_im_load_data(p_im_load_data),
    .proc_dm_load_en(p_dm_load_en), .proc_dm_load_data(p_dm_load_data),
    .proc_start(p_start), .proc_running(p_running), .proc_halted(p_halted),
    .proc_rf_entry(p_rf_entry), .proc_dm_entry(p_dm_entry), .proc_sign_flags(p_sign_flags),
    .proc_head_thread(p_head_thread), .proc_ir(p_ir), .proc_im_pos(p_im_pos),
    .proc_issued_ops(p_issued_ops),
    .npu_if_wr(if_wr), .npu_if_wr_chunk(if_wr_chunk), .npu_if_wr_data(if_wr_data),
    .npu_wb_wr(wb_wr), .npu_wb_wr_data(wb_wr_data),
    .npu_dau_cfg_we(dau_cfg_we), .npu_dau_cfg_row(dau_cfg_row), .npu_dau_cfg(dau_cfg),
    .npu_layer_we(layer_we), .npu_layer_in(layer_in),
    .npu_map_start(map_start), .npu_map_in(map_in),
    .npu_busy(busy), .npu_done(done), .npu_phase(phase),
    .npu_ho_chunk(ho_chunk), .npu_ho_shift(ho_shift), .npu_ho_data(ho_data),
    .npu_ho_at_origin(ho_at_origin), .npu_results_written(results_written));

  sfqp_host phost (
    .clk, .rst_n, .im_load_en(p_im_load_en), .im_load_data(p_im_load_data),
    .dm_load_en(p_dm_load_en), .dm_load_data(p_dm_load_data), .start(p_start),
    .running(p_running), .halted(p_halted), .rf_entry(p_rf_entry), .dm_entry(p_dm_entry),
    .sign_flags(p_sign_flags), .head_thread(p_head_thread), .ir(p_ir), .im_pos(p_im_pos),
    .issued_ops(p_issued_ops), .finished(p_finished), .checks(p_checks), .failures(p_failures));

  snpu_host #(.ROWS(ROWS), .COLS(COLS), .NREGS(NREGS), .STAGES(STAGES),
              .IF_CHUNKS(IFC), .OF_CHUNKS(OFC), .LEN(LEN),
              .C(C), .K(K), .H(H), .WD(WD), .NK(NK), .NMAP(3)) nhost (
    .clk, .rst_n, .if_wr, .if_wr_chunk, .if_wr_data, .wb_wr, .wb_wr_data,
    .dau_cfg_we, .dau_cfg_row, .dau_cfg, .layer_we, .layer_in, .map_start, .map_in,
    .busy, .done, .phase, .ho_chunk, .ho_shift, .ho_data, .ho_at_origin, .results_written,
    .finished(n_finished), .checks(n_checks), .failures(n_failures));

  initial begin
    wait (p_finished && n_finished);
    $display("processor: checks=%0d failures=%0d  npu: checks=%0d failures=%0d",
             p_checks, p_failures, n_checks, n_failures);
    $display("TB_RESULT checks=%0d failures=%0d", p_checks + n_checks, p_failures + n_failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", p_checks + n_checks, p_failures + n_failures + 1);
    $finish;
  end
endmodule
