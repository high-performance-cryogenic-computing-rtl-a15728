// Data alignment unit of the SuperNPU: ROWS DAU rows behind a splitter tree.
//
// The streamed ifmap chunk (ROWS channel lanes) is offered to every row; row
// r selects the pixels its weight needs and delays them so that they reach PE
// row r together with the partial sum from the row above (see snpu_dau_row).
// This removes the duplicated ifmap copies a plain row-per-weight buffer would
// need. Row configurations are written one at a time through `cfg_we`; reset
// disables all rows.
module snpu_dau
  import snpu_pkg::*;
#(
  parameter int ROWS    = 256,
  parameter int W       = 8,
  parameter int NREGS   = 8,
  parameter int STAGES  = 15,
  parameter int ADJ_MAX = 1535
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              cfg_we,
  input  logic [$clog2(ROWS)-1:0]           cfg_row,
  input  dau_row_cfg_t                      cfg_data,
  input  layer_cfg_t                        layer,
  input  logic [ROWS-1:0][W-1:0]            in_data,
  input  logic                              in_vld,
  input  logic [$clog2(NREGS)-1:0]          in_wsel,
  input  logic                              pix_adv,
  input  logic                              restart,
  output logic [ROWS-1:0][W-1:0]            row_data,
  output logic [ROWS-1:0]                   row_vld,
  output logic [ROWS-1:0][$clog2(NREGS)-1:0] row_wsel
);
  dau_row_cfg_t cfg [ROWS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) cfg[r] <= '0;
    end else if (cfg_we) begin
      cfg[cfg_row] <= cfg_data;
    end
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    snpu_dau_row #(.ROWS(ROWS), .W(W), .NREGS(NREGS), .STAGES(STAGES), .ROW(r), .ADJ_MAX(ADJ_MAX)) u_row (
      .clk, .rst_n, .in_data, .in_vld, .in_wsel, .pix_adv, .restart,
      .cfg(cfg[r]), .layer,
      .out_data(row_data[r]), .out_vld(row_vld[r]), .out_wsel(row_wsel[r]));
  end
endmodule
