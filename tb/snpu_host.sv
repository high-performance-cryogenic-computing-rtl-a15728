// Test host for the SuperNPU: plays the role of the off-chip side and checks
// the results of convolution layers against a reference computed here.
//
// For each of up to three mappings it fills the weight buffer and an ifmap
// chunk, programs the data alignment unit for a C-channel, K x K-filter
// convolution of an H x W image (row r = channel*K*K + ky*K + kx, delay
// chosen so all rows align), runs the mapping and reads the output chunk back:
//   1. stride 1, NK weight registers, no psum           -> out chunk 0
//   2. stride 1, new channels and weights, psum from 0  -> out chunk 1
//      (the expected result is the sum of both layers' contributions)
//   3. stride 2, one weight register, no psum           -> out chunk 2
// It counts the mechanisms exercised (weight loading, chunk rewinding, DAU
// bubbles, DAU delay bypassing, multi-register slots, psum accumulation,
// stride selection) and checks the stream phase lasts exactly npix*nk cycles,
// i.e. one ifmap slot per cycle with no stall.
module snpu_host
  import snpu_pkg::*;
#(
  parameter int ROWS = 8, COLS = 4, NREGS = 2, STAGES = 15,
  parameter int IF_CHUNKS = 2, OF_CHUNKS = 4, LEN = 64,
  parameter int C = 2, K = 2, H = 6, WD = 6, NK = 2,
  parameter int NMAP = 3
) (
  input  logic                          clk,
  output logic                          rst_n,
  output logic                          if_wr,
  output logic [$clog2(IF_CHUNKS)-1:0]  if_wr_chunk,
  output logic [ROWS*8-1:0]             if_wr_data,
  output logic                          wb_wr,
  output logic [COLS*8-1:0]             wb_wr_data,
  output logic                          dau_cfg_we,
  output logic [$clog2(ROWS)-1:0]       dau_cfg_row,
  output dau_row_cfg_t                  dau_cfg,
  output logic                          layer_we,
  output layer_cfg_t                    layer_in,
  output logic                          map_start,
  output mapping_t                      map_in,
  input  logic                          busy,
  input  logic                          done,
  input  logic [2:0]                    phase,
  output logic [$clog2(OF_CHUNKS)-1:0]  ho_chunk,
  output logic                          ho_shift,
  input  logic [COLS*8-1:0]             ho_data,
  input  logic                          ho_at_origin,
  input  logic [31:0]                   results_written,
  output logic                          finished,
  output int                            checks,
  output int                            failures
);
  localparam int NF = COLS * NK;           // filters per mapping
  localparam int FMAX = COLS * NREGS;
  typedef logic [7:0] byte_t;

  byte_t img  [2][C][H][WD];               // two channel groups
  byte_t wts  [2][FMAX][C][K][K];
  byte_t ref_out [FMAX][H][WD];
  int    cyc_phase [8];
  int    n_wload, n_rewind, n_bubble, n_bypass, n_multireg, n_psum, n_stride;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; if_wr = 0; if_wr_chunk = '0; if_wr_data = '0; wb_wr = 0; wb_wr_data = '0;
    dau_cfg_we = 0; dau_cfg_row = '0; dau_cfg = '0; layer_we = 0; layer_in = '0;
    map_start = 0; map_in = '0; ho_chunk = '0; ho_shift = 0; finished = 0;
    checks = 0; failures = 0;
    n_wload = 0; n_rewind = 0; n_bubble = 0; n_bypass = 0; n_multireg = 0; n_psum = 0; n_stride = 0;
    foreach (cyc_phase[i]) cyc_phase[i] = 0;
  end

  // Phase cycle counters (phase encoding of snpu_ctrl: 1 wload 2 rewind 3 stream 4 drain)
  always @(posedge clk) if (rst_n) cyc_phase[phase]++;

  task automatic run_mapping(int m, int grp, int stride_log2, int nk, int use_psum,
                             int ps_chunk, int of_chunk, int if_chunk);
    int oh, ow, s, koff_max, npix, nout, st0, cnt;
    s  = 1 << stride_log2;
    oh = (H - K) / s + 1;
    ow = (WD - K) / s + 1;
    koff_max = (K-1)*WD + (K-1);
    npix = H * WD;
    // weight buffer: register k, entry j -> PE row ROWS-1-j
    for (int k = 0; k < NREGS; k++)
      for (int j = 0; j < ROWS; j++) begin
        int r, ch, ky, kx;
        r = ROWS-1-j; ch = r / (K*K); ky = (r / K) % K; kx = r % K;
        for (int c = 0; c < COLS; c++)
          wb_wr_data[c*8 +: 8] = (ch < C) ? wts[grp][k*COLS + c][ch][ky][kx] : 8'($urandom);
        wb_wr = 1; @(posedge clk); #1;
      end
    wb_wr = 0;
    // ifmap chunk: lane ch holds channel ch in raster order
    for (int e = 0; e < LEN; e++) begin
      for (int l = 0; l < ROWS; l++)
        if_wr_data[l*8 +: 8] = (l < C && e < npix) ? img[grp][l][e / WD][e % WD] : 8'($urandom);
      if_wr = 1; if_wr_chunk = $bits(if_wr_chunk)'(if_chunk); @(posedge clk); #1;
    end
    if_wr = 0;
    // layer and DAU rows
    layer_in.width = COORD_W'(WD); layer_in.stride_log2 = 2'(stride_log2);
    layer_in.oh = COORD_W'(oh); layer_in.ow = COORD_W'(ow);
    layer_we = 1; @(posedge clk); #1; layer_we = 0;
    for (int r = 0; r < ROWS; r++) begin
      int ch, ky, kx;
      ch = r / (K*K); ky = (r / K) % K; kx = r % K;
      dau_cfg.en = (ch < C); dau_cfg.chan = CH_W'(ch); dau_cfg.ky = K_W'(ky); dau_cfg.kx = K_W'(kx);
      dau_cfg.delay = DLY_W'((koff_max - (ky*WD + kx)) * nk);
      if (dau_cfg.en && dau_cfg.delay != DLY_W'(koff_max * nk)) n_bypass++;
      dau_cfg_row = $bits(dau_cfg_row)'(r); dau_cfg_we = 1; @(posedge clk); #1;
    end
    dau_cfg_we = 0;
    // run
    map_in = '0;
    map_in.if_chunk = 16'(if_chunk); map_in.ps_chunk = 16'(ps_chunk); map_in.use_psum = use_psum[0];
    map_in.of_chunk = 16'(of_chunk); map_in.npix = LEN_W'(npix); map_in.nk = 4'(nk);
    foreach (cyc_phase[i]) cyc_phase[i] = 0;
    st0 = int'(results_written);
    map_start = 1; @(posedge clk); #1; map_start = 0;
    while (!done) begin @(posedge clk); #1; end
    chk($sformatf("map%0d stream cycles = npix*nk", m), cyc_phase[3], npix * nk);
    chk($sformatf("map%0d weight-load cycles", m), cyc_phase[1], nk * (ROWS + 1));
    nout = oh * ow * nk;
    chk($sformatf("map%0d result words", m), int'(results_written) - st0, nout);
    if (cyc_phase[1] > 0) n_wload++;
    if (cyc_phase[2] > 1) n_rewind++;
    if (npix > oh * ow) n_bubble++;
    if (nk > 1) n_multireg++;
    if (use_psum) n_psum++;
    if (stride_log2 > 0) n_stride++;
    // reference
    for (int f = 0; f < NF; f++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          byte_t acc;
          acc = use_psum ? ref_out[f][oy][ox] : 8'd0;
          for (int ch = 0; ch < C; ch++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++)
                acc += wts[grp][f][ch][ky][kx] * img[grp][ch][oy*s + ky][ox*s + kx];
          ref_out[f][oy][ox] = acc;
        end
    // read the output chunk from its origin
    ho_chunk = $bits(ho_chunk)'(of_chunk);
    cnt = 0;
    while (!ho_at_origin && cnt < LEN) begin ho_shift = 1; @(posedge clk); #1; cnt++; end
    for (int e = 0; e < nout; e++) begin
      int o, k;
      o = e / nk; k = e % nk;
      for (int c = 0; c < COLS; c++)
        chk($sformatf("map%0d out[f%0d][%0d]", m, k*COLS + c, o), int'(ho_data[c*8 +: 8]),
            int'(ref_out[k*COLS + c][o / ow][o % ow]));
      ho_shift = 1; @(posedge clk); #1;
    end
    ho_shift = 0;
  endtask

  initial begin
    for (int g = 0; g < 2; g++) begin
      foreach (img[g][c, y, x]) img[g][c][y][x] = 8'($urandom);
      foreach (wts[g][f, c, y, x]) wts[g][f][c][y][x] = 8'($urandom);
    end
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    #1;
    run_mapping(1, 0, 0, NK, 0, 0, 0, 0);
    if (NMAP > 1) run_mapping(2, 1, 0, NK, 1, 0, 1 % OF_CHUNKS, 1 % IF_CHUNKS);
    if (NMAP > 2) begin
      // stride-2 layer: one weight register, fresh accumulation
      run_mapping(3, 0, 1, 1, 0, 0, 2 % OF_CHUNKS, 0);
    end
    chk("mechanism: weight loading",      int'(n_wload > 0), 1);
    chk("mechanism: chunk rewinding",     int'(n_rewind > 0), 1);
    chk("mechanism: DAU bubbles",         int'(n_bubble > 0), 1);
    chk("mechanism: DAU delay bypassing", int'(n_bypass > 0), 1);
    if (NK > 1) chk("mechanism: multi-register slots", int'(n_multireg > 0), 1);
    if (NMAP > 1) chk("mechanism: psum accumulation", int'(n_psum > 0), 1);
    if (NMAP > 2) chk("mechanism: stride 2 selection", int'(n_stride > 0), 1);
    $display("mechanisms: wload=%0d rewind=%0d bubble=%0d bypass=%0d multireg=%0d psum=%0d stride=%0d",
             n_wload, n_rewind, n_bubble, n_bypass, n_multireg, n_psum, n_stride);
    finished = 1;
  end
endmodule
