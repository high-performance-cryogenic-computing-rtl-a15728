// Test of one row of the SuperNPU data alignment unit (row 2 of 4, 15-stage
// PEs, so a fixed skew of 2*14 cycles, delays up to 40). A 7 x 6 image is
// streamed with several configurations (channel, filter position, delay
// including 0 and the maximum), stride 1 with two weight-register slots per
// pixel and in_vld gaps, and stride 2 with one slot. Every slot must come out
// exactly 1 + delay + 28 cycles later: the selected channel's pixel with
// valid set when the filter position needs it, a zero bubble otherwise.
module tb_snpu_dau_row;
  import snpu_pkg::*;
  localparam int R = 4, NR = 2, ST = 15, ADJ = 40, HH = 7, WW = 6, MAXC = 4000;
  logic clk = 0, rst_n = 0;
  localparam int ROW = 2;
  logic in_vld = 0, pix_adv = 0, restart = 0;
  logic [7:0] out_data;
  logic out_vld;
  logic [0:0] out_wsel;
  layer_cfg_t layer = '0;
  logic [R-1:0][7:0] in_data = '0;
  logic [0:0] in_wsel = '0;
  dau_row_cfg_t cfg [R];
  logic [R-1:0][7:0] row_data;
  logic [R-1:0] row_vld;
  logic [R-1:0][0:0] row_wsel;
  logic [7:0] ed [R][MAXC];
  logic       ev [R][MAXC];
  logic       ew [R][MAXC];
  int checks = 0, failures = 0, n_need = 0, n_bubble = 0, cyc = 0;
  snpu_dau_row #(.ROWS(R), .W(8), .NREGS(NR), .STAGES(ST), .ROW(ROW), .ADJ_MAX(ADJ)) dut (
    .clk, .rst_n, .in_data, .in_vld, .in_wsel, .pix_adv, .restart, .cfg(cfg[ROW]), .layer,
    .out_data, .out_vld, .out_wsel);
  // only the row under test is checked; the others mirror it
  always_comb begin
    row_data = '0; row_vld = '0; row_wsel = '0;
    row_data[ROW] = out_data; row_vld[ROW] = out_vld; row_wsel[ROW] = out_wsel;
  end
  always #5 clk = ~clk;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  function automatic bit needed(dau_row_cfg_t c, int y, int x, int sl2, int oh, int ow);
    int dy, dx, s;
    s = 1 << sl2; dy = y - int'(c.ky); dx = x - int'(c.kx);
    return c.en && dy >= 0 && dx >= 0 && dy % s == 0 && dx % s == 0 && dy / s < oh && dx / s < ow;
  endfunction

  // per-cycle check of all rows against the schedule
  always @(negedge clk) if (rst_n) begin
    for (int r = ROW; r <= ROW; r++) begin
      chk($sformatf("row %0d valid @%0d", r, cyc), int'(row_vld[r]), int'(ev[r][cyc]));
      if (ev[r][cyc]) begin
        chk($sformatf("row %0d data @%0d", r, cyc), int'(row_data[r]), int'(ed[r][cyc]));
        chk($sformatf("row %0d wsel @%0d", r, cyc), int'(row_wsel[r]), int'(ew[r][cyc]));
      end
    end
  end

  task automatic stream(int sl2, int nk, int gaps);
    int oh, ow, k;
    oh = (HH - 3) / (1 << sl2) + 1; ow = (WW - 3) / (1 << sl2) + 1;   // 3 x 3 filter
    layer.width = COORD_W'(WW); layer.stride_log2 = 2'(sl2); layer.oh = COORD_W'(oh); layer.ow = COORD_W'(ow);
    restart = 1; @(posedge clk); #1; cyc++; restart = 0;
    for (int p = 0; p < HH*WW; p++) begin
      k = 0;
      while (k < nk) begin
        if (gaps != 0 && $urandom_range(3) == 0) begin
          in_vld = 0; pix_adv = 0;
        end else begin
          in_vld = 1; pix_adv = (k == nk-1); in_wsel = 1'(k);
          for (int l = 0; l < R; l++) in_data[l] = 8'($urandom);
          for (int r = ROW; r <= ROW; r++) begin
            int t;
            bit n;
            t = cyc + 1 + int'(cfg[r].delay) + r*(ST-1);
            n = needed(cfg[r], p / WW, p % WW, sl2, oh, ow);
            ev[r][t] = n; ed[r][t] = n ? in_data[cfg[r].chan] : 8'd0; ew[r][t] = 1'(k);
            if (n) n_need++; else if (cfg[r].en) n_bubble++;
          end
          k++;
        end
        @(posedge clk); #1; cyc++;
      end
    end
    in_vld = 0; pix_adv = 0;
    repeat (ADJ + R*ST + 4) begin @(posedge clk); #1; cyc++; end
  endtask

  initial begin
    foreach (ev[r, t]) begin ev[r][t] = 0; ed[r][t] = 0; ew[r][t] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    foreach (cfg[r]) cfg[r] = '0;
    cfg[ROW] = '{en: 1, chan: 2, ky: 0, kx: 0, delay: 17};
    stream(0, 2, 1);
    cfg[ROW] = '{en: 1, chan: 1, ky: 1, kx: 2, delay: 0};
    stream(0, 1, 1);
    cfg[ROW] = '{en: 1, chan: 3, ky: 2, kx: 1, delay: 40};
    stream(1, 1, 0);
    cfg[ROW] = '{en: 1, chan: 0, ky: 1, kx: 1, delay: 5};
    stream(1, 2, 1);
    chk("mechanism: needed pixels selected", int'(n_need > 0), 1);
    chk("mechanism: bubbles inserted", int'(n_bubble > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (MAXC - 10) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
