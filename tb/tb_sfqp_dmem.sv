// Test of the 12-thread data memory loop of the SIMT processor: a host load
// of every thread's four words (the loop turns one thread per word), then
// random rotations, reads and word writes, checked against a model of the
// loop.
module tb_sfqp_dmem;
  localparam int T = 12;
  logic clk = 0, rst_n = 0, rotate = 0, we = 0, load_en = 0;
  logic [1:0] addr = '0, wa = '0;
  logic [3:0] q, wd = '0;
  logic [15:0] load_data = '0, entry;
  logic [3:0] head;
  logic [3:0] m [T][4];
  int h = 0, checks = 0, failures = 0;
  sfqp_dmem dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < T; t++) begin
      load_data = 16'($urandom); load_en = 1;
      for (int w = 0; w < 4; w++) m[t][w] = load_data[w*4 +: 4];
      @(posedge clk); #1;
    end
    load_en = 0;
    for (int i = 0; i < 2000; i++) begin
      addr = 2'($urandom);
      #1;
      chk("head", int'(head), h);
      chk("q", int'(q), int'(m[h][addr]));
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
