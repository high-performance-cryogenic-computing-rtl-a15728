// Weight-stationary systolic PE array of the SuperNPU (ROWS x COLS).
//
// Each row receives an ifmap stream from the data alignment unit on the west
// edge; store-and-forward links carry it one column further per cycle. Partial
// sums flow south through the column; weights are shifted south through the
// PEs' weight chains from `w_in` at the top. Row r+1 must receive a pixel
// STAGES-1 cycles after row r (the DAU provides this skew).
//
// Column c sees a pixel c cycles after column 0, so the array skews the
// incoming psum word by c cycles per lane and deskews the outgoing word by
// COLS-1-c, and the buffers exchange whole aligned COLS-lane words:
//   - the psum word for a pixel is due one cycle after row 0 received it;
//   - the result word leaves LATENCY cycles after row 0 received it.
// out_vld is the OR of the valid bits of all rows for that result.
module snpu_pe_array #(
  parameter int ROWS   = 256,
  parameter int COLS   = 64,
  parameter int DATA_W = 8,
  parameter int NREGS  = 8,
  parameter int STAGES = 15,
  localparam int LATENCY = (ROWS-1)*(STAGES-1) + STAGES + COLS - 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic [ROWS-1:0][DATA_W-1:0]           row_data,
  input  logic [ROWS-1:0]                       row_vld,
  input  logic [ROWS-1:0][$clog2(NREGS)-1:0]    row_wsel,
  input  logic [COLS-1:0][DATA_W-1:0]           w_in,
  input  logic                                  w_shift,
  input  logic                                  w_commit,
  input  logic [$clog2(NREGS)-1:0]              w_idx,
  input  logic [COLS-1:0][DATA_W-1:0]           psum_in,
  input  logic                                  psum_in_vld,
  output logic [COLS-1:0][DATA_W-1:0]           out_data,
  output logic [COLS-1:0]                       out_vld
);
  localparam int SW = $clog2(NREGS);

  // Horizontal signals: h_*[r][c] is what PE(r,c) receives.
  logic [ROWS-1:0][COLS-1:0][DATA_W-1:0] h_data;
  logic [ROWS-1:0][COLS-1:0]             h_vld;
  logic [ROWS-1:0][COLS-1:0][SW-1:0]     h_wsel;
  // Vertical signals: v_*[r][c] enters PE(r,c) from above.
  logic [ROWS:0][COLS-1:0][DATA_W-1:0]   v_psum;
  logic [ROWS:0][COLS-1:0]               v_vld;
  logic [ROWS:0][COLS-1:0][DATA_W-1:0]   v_w;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign h_data[r][0] = row_data[r];
    assign h_vld[r][0]  = row_vld[r];
    assign h_wsel[r][0] = row_wsel[r];
    if (COLS > 1) begin : g_links
      // The row's COLS-1 network branches side by side: branch c takes what
      // PE(r,c) receives and hands it to PE(r,c+1) one cycle later.
      snpu_nw_link #(.W(DATA_W+SW), .N(COLS-1)) u_link (
        .clk, .rst_n,
        .d({h_data[r][COLS-2:0], h_wsel[r][COLS-2:0]}), .vld(h_vld[r][COLS-2:0]),
        .q({h_data[r][COLS-1:1], h_wsel[r][COLS-1:1]}), .q_vld(h_vld[r][COLS-1:1]));
    end
    for (genvar c = 0; c < COLS; c++) begin : g_col
      snpu_pe #(.DATA_W(DATA_W), .NREGS(NREGS), .STAGES(STAGES)) u_pe (
        .clk, .rst_n,
        .ifmap_in(h_data[r][c]), .ifmap_vld_in(h_vld[r][c]), .wsel_in(h_wsel[r][c]),
        .w_in(v_w[r][c]), .w_shift, .w_commit, .w_idx, .w_out(v_w[r+1][c]),
        .psum_in(v_psum[r][c]), .psum_vld_in(v_vld[r][c]),
        .psum_out(v_psum[r+1][c]), .psum_vld_out(v_vld[r+1][c]));
    end
  end

  // Column skew of the psum word, deskew of the result word.
  for (genvar c = 0; c < COLS; c++) begin : g_skew
    assign v_w[0][c] = w_in[c];
    if (c == 0) begin : g_in0
      assign v_psum[0][c] = psum_in[c];
      assign v_vld[0][c]  = psum_in_vld;
    end else begin : g_in
      logic [DATA_W:0] sk [c];
      always_ff @(posedge clk) begin
        sk[0] <= {psum_in_vld && rst_n, psum_in[c]};
        for (int i = 1; i < c; i++) sk[i] <= sk[i-1];
      end
      assign v_psum[0][c] = sk[c-1][DATA_W-1:0];
      assign v_vld[0][c]  = sk[c-1][DATA_W];
    end
    if (c == COLS-1) begin : g_out0
      assign out_data[c] = v_psum[ROWS][c];
      assign out_vld[c]  = v_vld[ROWS][c];
    end else begin : g_out
      localparam int D = COLS-1-c;
      logic [DATA_W:0] dk [D];
      always_ff @(posedge clk) begin
        dk[0] <= {v_vld[ROWS][c] && rst_n, v_psum[ROWS][c]};
        for (int i = 1; i < D; i++) dk[i] <= dk[i-1];
      end
      assign out_data[c] = dk[D-1][DATA_W-1:0];
      assign out_vld[c]  = dk[D-1][DATA_W];
    end
  end
endmodule
