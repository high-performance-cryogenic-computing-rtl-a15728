// End-to-end test of the SuperNPU at a reduced size (8 x 4 PEs, 2 weight
// registers, 15-stage PEs, 64-entry chunks): three convolution mappings with
// stride 1 and 2, psum accumulation across mappings and result readout, all
// checked against a reference model (see snpu_host).
module tb_snpu_top;
  import snpu_pkg::*;
  localparam int ROWS = 8, COLS = 4, NREGS = 2, STAGES = 15, IFC = 2, OFC = 4, LEN = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, if_wr, wb_wr, dau_cfg_we, layer_we, map_start, busy, done, ho_shift, ho_at_origin, finished;
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
  int checks, failures;

  snpu_top #(.ROWS(ROWS), .COLS(COLS), .NREGS(NREGS), .STAGES(STAGES),
             .IF_CHUNKS(IFC), .OF_CHUNKS(OFC), .LEN(LEN)) dut (.*);
  snpu_host #(.ROWS(ROWS), .COLS(COLS), .NREGS(NREGS), .STAGES(STAGES),
              .IF_CHUNKS(IFC), .OF_CHUNKS(OFC), .LEN(LEN),
              .C(2), .K(2), .H(6), .WD(6), .NK(2), .NMAP(3)) host (.*);

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
