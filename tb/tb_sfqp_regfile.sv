// Test of the 12-thread register file loop of the SIMT processor: random
// rotations, reads and writes; the two read ports, the whole entry at the
// port and the thread at the port must match a model where only the entry of
// the thread at the port is visible and writable.
module tb_sfqp_regfile;
  localparam int T = 12;
  logic clk = 0, rst_n = 0, rotate = 0, we = 0;
  logic [1:0] ra = '0, rb = '0, wa = '0;
  logic [3:0] qa, qb, wd = '0;
  logic [15:0] entry;
  logic [3:0] head;
  logic [3:0] m [T][4];
  int h = 0, checks = 0, failures = 0;
  sfqp_regfile dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    foreach (m[t, r]) m[t][r] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      ra = 2'($urandom); rb = 2'($urandom);
      #1;
      chk("head", int'(head), h);
      chk("qa", int'(qa), int'(m[h][ra]));
      chk("qb", int'(qb), int'(m[h][rb]));
      chk("entry", int'(entry), int'({m[h][3], m[h][2], m[h][1], m[h][0]}));
      rotate = $urandom_range(1); we = $urandom_range(1); wa = 2'($urandom); wd = 4'($urandom);
      @(posedge clk); #1;
      if (we) m[h][wa] = wd;
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
