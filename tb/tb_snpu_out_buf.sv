// Test of the integrated psum/ofmap buffer of the SuperNPU (4 chunks of 8
// entries, 3 lanes): random psum reads, ofmap writes and host reads on
// distinct chunks in the same cycle, checked against a model of independent
// loops. It also runs the reuse pattern of the integrated buffer: results
// written to one chunk are read back through the psum selection.
module tb_snpu_out_buf;
  localparam int C = 3, NC = 4, LEN = 8;
  logic clk = 0, rst_n = 0;
  logic [1:0] ps_chunk = '0, of_chunk = '0, ho_chunk = '0;
  logic ps_shift = 0, of_shift = 0, of_wr = 0, ho_shift = 0;
  logic [C*8-1:0] ps_data, of_data = '0, ho_data;
  logic ps_at_origin, of_at_origin, ho_at_origin;
  logic [C*8-1:0] m [NC][LEN];
  int p [NC];
  int checks = 0, failures = 0;
  snpu_out_buf #(.COLS(C), .W(8), .CHUNKS(NC), .LEN(LEN)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    foreach (p[i]) p[i] = 0;
    foreach (m[c, e]) m[c][e] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // fill every chunk through the ofmap selection
    for (int c = 0; c < NC; c++)
      for (int e = 0; e < LEN; e++) begin
        of_chunk = 2'(c); of_data = (C*8)'($urandom); m[c][e] = of_data; of_shift = 1; of_wr = 1;
        @(posedge clk); #1;
      end
    // psum reuse: write chunk 2 fully, then read it back through ps selection
    of_chunk = 2;
    for (int e = 0; e < LEN; e++) begin
      of_data = (C*8)'($urandom); m[2][e] = of_data; of_shift = 1; of_wr = 1; @(posedge clk); #1;
    end
    of_shift = 0; of_wr = 0; ps_chunk = 2;
    for (int e = 0; e < LEN; e++) begin
      chk("psum reuse", ps_data, m[2][e]); ps_shift = 1; @(posedge clk); #1;
    end
    ps_shift = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [1:0] a, b, c;
      a = 2'($urandom); b = a + 2'(1 + $urandom_range(2)); c = a + 2'd1;
      while (c == a || c == b) c = c + 2'd1;
      ps_chunk = a; of_chunk = b; ho_chunk = c;
      #1;
      chk("ps_data", ps_data, m[a][p[a]]);
      chk("ps_at_origin", ps_at_origin, p[a] == 0);
      chk("ho_data", ho_data, m[c][p[c]]);
      chk("ho_at_origin", ho_at_origin, p[c] == 0);
      chk("of_at_origin", of_at_origin, p[b] == 0);
      ps_shift = $urandom_range(1); of_shift = $urandom_range(1); of_wr = of_shift && $urandom_range(1);
      ho_shift = $urandom_range(1); of_data = (C*8)'($urandom);
      @(posedge clk); #1;
      if (of_wr) m[b][p[b]] = of_data;
      if (ps_shift) p[a] = (p[a] + 1) % LEN;
      if (of_shift) p[b] = (p[b] + 1) % LEN;
      if (ho_shift) p[c] = (p[c] + 1) % LEN;
    end
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
