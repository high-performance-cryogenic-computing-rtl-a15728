// Test of the SuperNPU data alignment unit (4 rows, 15-stage PEs, delays up to
// 40). Each row is configured with its own channel, filter position (ky, kx)
// and delay; a 7 x 6 image is streamed twice, once with stride 1 and two
// weight-register slots per pixel (in_vld gaps included), once with stride 2
// and one slot per pixel. For every row, each streamed slot must come out
// exactly 1 + delay + ROW*(STAGES-1) cycles later as the selected channel's
// pixel with valid set when the filter position needs that pixel (inside the
// output map, stride-aligned), or as a zero bubble otherwise; disabled rows
// never output valid data.
module tb_snpu_dau;
  import snpu_pkg::*;
  localparam int R = 4, NR = 2, ST = 15, ADJ = 40, HH = 7, WW = 6, MAXC = 4000;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, in_vld = 0, pix_adv = 0, restart = 0;
  logic [1:0] cfg_row = '0;
  dau_row_cfg_t cfg_data = '0;
  layer_cfg_t layer = '0;
  logic [R-1:0][7:0] in_data = '0, row_data;
  logic [0:0] in_wsel = '0;
  logic [R-1:0] row_vld;
  logic [R-1:0][0:0] row_wsel;
  dau_row_cfg_t cfg [R];
  logic [7:0] ed [R][MAXC];
  logic       ev [R][MAXC];
  logic       ew [R][MAXC];
  int checks = 0, failures = 0, n_need = 0, n_bubble = 0, cyc = 0;
  snpu_dau #(.ROWS(R), .W(8), .NREGS(NR), .STAGES(ST), .ADJ_MAX(ADJ)) dut (.*);
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
    for (int r = 0; r < R; r++) begin
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
          for (int r = 0; r < R; r++) begin
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
    cfg[0] = '{en: 1, chan: 2, ky: 0, kx: 0, delay: 17};
    cfg[1] = '{en: 1, chan: 0, ky: 1, kx: 2, delay: 3};
    cfg[2] = '{en: 0, chan: 1, ky: 0, kx: 0, delay: 0};
    cfg[3] = '{en: 1, chan: 3, ky: 2, kx: 1, delay: 0};
    for (int r = 0; r < R; r++) begin
      cfg_row = 2'(r); cfg_data = cfg[r]; cfg_we = 1; @(posedge clk); #1; cyc++;
    end
    cfg_we = 0;
    stream(0, 2, 1);
    cfg[0].delay = 40; cfg[1].delay = 0;
    for (int r = 0; r < 2; r++) begin
      cfg_row = 2'(r); cfg_data = cfg[r]; cfg_we = 1; @(posedge clk); #1; cyc++;
    end
    cfg_we = 0;
    stream(1, 1, 0);
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
