// End-to-end test of the SIMT prototype processor on its own: the 12-thread
// core runs the matrix-vector element program driven and checked by
// sfqp_host (final state of every thread, run length, issue rate).
module tb_sfqp_core;
  import sfqp_pkg::*;
  localparam int THREADS = 12;
  logic clk = 0, rst_n = 0;
  logic im_load_en, dm_load_en, start, finished;
  logic [IW-1:0] im_load_data;
  logic [15:0] dm_load_data;
  logic running, halted;
  logic [15:0] rf_entry, dm_entry;
  logic [THREADS-1:0] sign_flags;
  logic [3:0] head_thread;
  logic [IW-1:0] ir;
  logic [4:0] im_pos;
  logic [31:0] issued_ops;
  int checks, failures;

  sfqp_core dut (.*);
  sfqp_host host (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
