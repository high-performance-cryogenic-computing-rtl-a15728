// Test of the store-and-forward link between neighbouring PEs of the SuperNPU:
// random words and valid bits must appear at the output exactly one cycle
// later; reset clears the valid bit.
module tb_snpu_nw_link;
  logic clk = 0, rst_n = 0, vld = 0, q_vld;
  logic [11:0] d = '0, q, d_q;
  logic v_q;
  int checks = 0, failures = 0;
  snpu_nw_link #(.W(12)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk); #1;
    checks++; if (q_vld !== 1'b0) begin failures++; $display("FAIL valid not cleared by reset"); end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      d = 12'($urandom); vld = $urandom_range(1); d_q = d; v_q = vld;
      @(posedge clk); #1;
      checks += 2;
      if (q != d_q) begin failures++; $display("FAIL data"); end
      if (q_vld != v_q) begin failures++; $display("FAIL valid"); end
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
