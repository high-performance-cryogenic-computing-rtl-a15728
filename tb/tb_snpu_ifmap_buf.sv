// Test of the divided ifmap buffer of the SuperNPU (4 chunks of 8 entries, 4
// lanes): random host writes to one chunk while another chunk is streamed and
// shifted; the streamed word and origin flag must follow a model in which
// only the selected chunks move.
module tb_snpu_ifmap_buf;
  localparam int R = 4, NC = 4, LEN = 8;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_shift = 0, rd_at_origin;
  logic [1:0] wr_chunk = '0, rd_chunk = '0;
  logic [R*8-1:0] wr_data = '0, rd_data;
  logic [R*8-1:0] m [NC][LEN];
  int p [NC];
  int checks = 0, failures = 0, n_moves_while_writing = 0;
  snpu_ifmap_buf #(.ROWS(R), .W(8), .CHUNKS(NC), .LEN(LEN)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    foreach (p[i]) p[i] = 0;
    foreach (m[c, e]) m[c][e] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // fill every chunk once from the host side
    for (int c = 0; c < NC; c++)
      for (int e = 0; e < LEN; e++) begin
        wr_en = 1; wr_chunk = 2'(c); wr_data = (R*8)'($urandom); m[c][e] = wr_data; @(posedge clk); #1;
      end
    wr_en = 0;
    for (int i = 0; i < 3000; i++) begin
      rd_chunk = 2'($urandom);
      #1;
      chk("rd_data", rd_data, m[rd_chunk][p[rd_chunk]]);
      chk("rd_at_origin", rd_at_origin, p[rd_chunk] == 0);
      rd_shift = $urandom_range(1);
      wr_en = $urandom_range(1); wr_chunk = 2'($urandom); wr_data = (R*8)'($urandom);
      if (wr_en && rd_shift && wr_chunk == rd_chunk) wr_chunk = wr_chunk + 1'b1;
      @(posedge clk); #1;
      if (wr_en) begin m[wr_chunk][p[wr_chunk]] = wr_data; p[wr_chunk] = (p[wr_chunk] + 1) % LEN; end
      if (rd_shift) p[rd_chunk] = (p[rd_chunk] + 1) % LEN;
      if (wr_en && rd_shift) n_moves_while_writing++;
    end
    chk("streaming while writing happened", n_moves_while_writing > 0, 1);
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
