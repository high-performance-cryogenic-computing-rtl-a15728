// Test of one SuperNPU processing element (8-bit data, 8 weight registers, 15
// gate-level pipeline stages): loads 8 weights through the weight chain, then
// feeds a new random pixel, weight select and psum every cycle. Each result
// psum + pixel * weight[wsel] (mod 256) and its valid bit must leave exactly
// STAGES cycles after the pixel entered (psum joins one cycle later), i.e.
// one MAC per cycle per PE with a 15-cycle latency. The chain output must
// show the weight shifted in the cycle before.
module tb_snpu_pe;
  localparam int NR = 8, ST = 15;
  logic clk = 0, rst_n = 0;
  logic [7:0] ifmap_in = '0, w_in = '0, w_out, psum_in = '0, psum_out;
  logic ifmap_vld_in = 0, w_shift = 0, w_commit = 0, psum_vld_in = 0, psum_vld_out;
  logic [2:0] wsel_in = '0, w_idx = '0;
  logic [7:0] wt [NR];
  int cyc = 0, checks = 0, failures = 0;
  logic [7:0] e_data [4096];
  logic       e_vld  [4096];
  snpu_pe #(.DATA_W(8), .NREGS(NR), .STAGES(ST)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    foreach (e_vld[i]) e_vld[i] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < NR; k++) begin
      wt[k] = 8'($urandom);
      w_in = wt[k]; w_shift = 1; @(posedge clk); #1; w_shift = 0;
      chk("weight chain output", int'(w_out), int'(wt[k]));
      w_idx = 3'(k); w_commit = 1; @(posedge clk); #1; w_commit = 0;
    end
    // stream: pixel enters at cycle i, psum at cycle i+1, result at i+ST
    for (int i = 0; i < 2000 + ST; i++) begin
      logic [7:0] px, ps;
      logic [2:0] s;
      logic v;
      px = 8'($urandom); s = 3'($urandom); v = ($urandom_range(3) != 0);
      if (i < 2000) begin
        ifmap_in = px; wsel_in = s; ifmap_vld_in = v;
      end else begin
        ifmap_in = '0; ifmap_vld_in = 0;
      end
      // psum for the pixel of the previous cycle
      ps = 8'($urandom);
      psum_in = ps; psum_vld_in = 1'b0;
      if (i >= 1) e_data[i - 1 + ST] = e_data[i - 1 + ST] + ps;
      if (i < 2000) begin
        e_data[i + ST] = px * wt[s];
        e_vld[i + ST]  = v;
      end
      if (i >= ST) begin
        chk($sformatf("valid @%0d", i), int'(psum_vld_out), int'(e_vld[i]));
        if (e_vld[i]) chk($sformatf("psum @%0d", i), int'(psum_out), int'(e_data[i]));
      end
      @(posedge clk); #1;
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
