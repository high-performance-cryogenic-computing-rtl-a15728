// Test of one shift-register chunk of the SuperNPU buffers (4 lanes, 16
// entries): random shifts with and without writes; the word at the port and
// the origin flag must follow a model of a rotating loop whose port entry is
// replaced when written. A full lap returns to the origin after exactly LEN
// shifts.
module tb_snpu_sr_chunk;
  localparam int L = 4, LEN = 16;
  logic clk = 0, rst_n = 0, shift = 0, wr = 0, at_origin;
  logic [L*8-1:0] din = '0, dout;
  logic [L*8-1:0] m [LEN];
  int p = 0, checks = 0, failures = 0;
  snpu_sr_chunk #(.LANES(L), .W(8), .LEN(LEN)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < LEN; i++) begin
      m[i] = (L*8)'($urandom); din = m[i]; shift = 1; wr = 1; @(posedge clk); #1;
    end
    chk("origin after one lap", at_origin, 1);
    for (int i = 0; i < 1000; i++) begin
      chk("dout", dout, m[p]);
      chk("at_origin", at_origin, p == 0);
      shift = $urandom_range(1); wr = shift && $urandom_range(1); din = (L*8)'($urandom);
      @(posedge clk); #1;
      if (wr) m[p] = din;
      if (shift) p = (p + 1) % LEN;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
