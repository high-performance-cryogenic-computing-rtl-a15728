// Test of the weight-stationary PE array of the SuperNPU at 4 x 3 PEs with 2
// weight registers and 10-stage PEs. Both weight registers are loaded through
// the column weight chains; then every cycle a new slot enters: row r gets
// its pixel (r*(STAGES-1) cycles after row 0, the skew the DAU provides),
// weight select and valid bit, and the psum word follows one cycle after row
// 0. Each result word must equal psum + sum over rows of pixel * weight and
// leave exactly LATENCY = (ROWS-1)(STAGES-1) + STAGES + COLS-1 cycles after
// row 0 received the slot, all columns aligned: one slot (ROWS*COLS MACs) per
// cycle.
module tb_snpu_pe_array;
  localparam int R = 4, C = 3, NR = 2, ST = 10, N = 300;
  localparam int LAT = (R-1)*(ST-1) + ST + C - 1;
  logic clk = 0, rst_n = 0;
  logic [R-1:0][7:0] row_data;
  logic [R-1:0] row_vld;
  logic [R-1:0][0:0] row_wsel;
  logic [C-1:0][7:0] w_in, psum_in, out_data;
  logic w_shift = 0, w_commit = 0, psum_in_vld;
  logic [0:0] w_idx = '0;
  logic [C-1:0] out_vld;
  logic [7:0] wt [NR][R][C];
  logic [7:0] px [N][R];
  logic       pv [N][R];
  logic       sl [N];
  logic [7:0] ps [N][C];
  int checks = 0, failures = 0, nvalid = 0;
  snpu_pe_array #(.ROWS(R), .COLS(C), .DATA_W(8), .NREGS(NR), .STAGES(ST)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    row_data = '0; row_vld = '0; row_wsel = '0; w_in = '0; psum_in = '0; psum_in_vld = 0;
    foreach (wt[k, r, c]) wt[k][r][c] = 8'($urandom);
    foreach (px[t, r]) begin px[t][r] = 8'($urandom); pv[t][r] = ($urandom_range(4) != 0); end
    foreach (sl[t]) sl[t] = 1'($urandom);
    foreach (ps[t, c]) ps[t][c] = 8'($urandom);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < NR; k++) begin
      for (int j = 0; j < R; j++) begin
        for (int c = 0; c < C; c++) w_in[c] = wt[k][R-1-j][c];
        w_shift = 1; @(posedge clk); #1;
      end
      w_shift = 0; w_idx = 1'(k); w_commit = 1; @(posedge clk); #1; w_commit = 0;
    end
    // cycle i: row r carries slot i - r*(ST-1); psum carries slot i-1; output slot i-LAT
    for (int i = 0; i < N + LAT + 2; i++) begin
      for (int r = 0; r < R; r++) begin
        int t;
        t = i - r*(ST-1);
        if (t >= 0 && t < N) begin
          row_vld[r] = pv[t][r]; row_data[r] = pv[t][r] ? px[t][r] : 8'd0; row_wsel[r] = sl[t];
        end else begin
          row_vld[r] = 0; row_data[r] = '0; row_wsel[r] = '0;
        end
      end
      if (i >= 1 && i - 1 < N) begin
        for (int c = 0; c < C; c++) psum_in[c] = ps[i-1][c];
        psum_in_vld = 1;
      end else begin
        psum_in = '0; psum_in_vld = 0;
      end
      if (i >= LAT && i - LAT < N) begin
        int t;
        t = i - LAT;
        for (int c = 0; c < C; c++) begin
          logic [7:0] e;
          e = ps[t][c];
          for (int r = 0; r < R; r++) if (pv[t][r]) e += px[t][r] * wt[sl[t]][r][c];
          chk($sformatf("slot %0d col %0d valid", t, c), int'(out_vld[c]), 1);
          chk($sformatf("slot %0d col %0d data", t, c), int'(out_data[c]), int'(e));
        end
        nvalid++;
      end else begin
        chk("no result outside the stream", int'(out_vld), 0);
      end
      @(posedge clk); #1;
    end
    chk("slots received", nvalid, N);
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
