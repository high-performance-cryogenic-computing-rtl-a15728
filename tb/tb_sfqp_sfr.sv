// Test of the sign-flag loop of the SIMT processor: the read port shows the
// flag of the thread at the loop head; writes land LAG (4) positions behind
// it, i.e. on the thread that issued 4 slots earlier. Random rotations and
// writes are checked against a model of the loop.
module tb_sfqp_sfr;
  localparam int T = 12, LAG = 4;
  logic clk = 0, rst_n = 0, rotate = 0, we = 0, wd = 0, q;
  logic [T-1:0] flags, m;
  int h = 0, checks = 0, failures = 0;
  sfqp_sfr dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    m = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      chk("q", int'(q), int'(m[h]));
      chk("flags", int'(flags), int'(m));
      rotate = $urandom_range(1); we = $urandom_range(1); wd = $urandom_range(1);
      @(posedge clk); #1;
      if (we) m[(h + T - LAG) % T] = wd;
      if (rotate) h = (h + 1) % T;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
