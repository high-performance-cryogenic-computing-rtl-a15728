// One row of the SuperNPU's data alignment unit (DAU).
//
// All ifmap buffer lanes arrive through a splitter tree (`in_data`). The row
// serves the weight mapped on PE row ROW and works in two steps:
//  1. Data selection. The row's controller tracks the ifmap coordinate (y, x)
//     of the pixel being streamed and decides whether the row's weight, at
//     window position (ky, kx), needs it: y-ky and x-kx must be non-negative
//     multiples of the stride and fall inside the ofmap. A needed pixel is
//     taken from lane `chan` with valid 1; any other slot becomes a zero
//     bubble with valid 0, so the array never stalls.
//  2. Timing adjustment. Cascaded DFFs delay the row by `delay` cycles plus
//     the fixed systolic skew ROW*(STAGES-1); the DFFs not needed are
//     bypassed. The chain is modelled as a circular array with a
//     programmable tap, equivalent at the ports.
// Output latency is 1 + delay + ROW*(STAGES-1) cycles. `restart` clears the
// coordinate counters before a stream; `pix_adv` marks the last slot of a
// pixel (a pixel occupies one slot per weight register in use). Strides are
// powers of two. The selection rule and the delay bound ADJ_MAX are this
// implementation's reading of the unit; the two-step structure is published.
module snpu_dau_row
  import snpu_pkg::*;
#(
  parameter int ROWS    = 256,
  parameter int W       = 8,
  parameter int NREGS   = 8,
  parameter int STAGES  = 15,
  parameter int ROW     = 0,
  parameter int ADJ_MAX = 1535
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [ROWS-1:0][W-1:0]      in_data,
  input  logic                        in_vld,
  input  logic [$clog2(NREGS)-1:0]    in_wsel,
  input  logic                        pix_adv,
  input  logic                        restart,
  input  dau_row_cfg_t                cfg,
  input  layer_cfg_t                  layer,
  output logic [W-1:0]                out_data,
  output logic                        out_vld,
  output logic [$clog2(NREGS)-1:0]    out_wsel
);
  localparam int SW    = $clog2(NREGS);
  localparam int SKEW  = ROW * (STAGES - 1);
  localparam int DEPTH = ADJ_MAX + SKEW + 1;
  localparam int AW    = $clog2(DEPTH);
  localparam int EW    = W + 1 + SW;

  // ---- controller: ifmap coordinate of the streamed pixel ----
  logic [COORD_W-1:0] x, y;
  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      x <= '0;
      y <= '0;
    end else if (in_vld && pix_adv) begin
      if (x == layer.width - 1'b1) begin
        x <= '0;
        y <= y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  logic need;
  always_comb begin
    logic [COORD_W-1:0] dy, dx, smask;
    dy    = y - COORD_W'(cfg.ky);
    dx    = x - COORD_W'(cfg.kx);
    smask = (COORD_W'(1) << layer.stride_log2) - 1'b1;
    need  = cfg.en && in_vld
         && (y >= COORD_W'(cfg.ky)) && (x >= COORD_W'(cfg.kx))
         && ((dy & smask) == '0) && ((dx & smask) == '0)
         && ((dy >> layer.stride_log2) < layer.oh)
         && ((dx >> layer.stride_log2) < layer.ow);
  end

  // ---- selector ----
  logic [EW-1:0] sel;
  assign sel = {need ? in_data[cfg.chan[$clog2(ROWS > 1 ? ROWS : 2)-1:0]] : W'(0), need, in_wsel};

  // ---- timing adjustment: delay line with programmable length ----
  logic [EW-1:0] line [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   filled;           // entries written since reset (saturating)
  int unsigned   total;
  always_comb begin
    total = int'(cfg.delay) + SKEW;
    rp    = AW'((int'(wp) + DEPTH - int'(total)) % DEPTH);
  end

  always_ff @(posedge clk) begin
    line[wp] <= sel;
    if (!rst_n) begin
      wp      <= '0;
      filled  <= '0;
      out_vld <= 1'b0;
    end else begin
      wp <= (int'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (int'(filled) < DEPTH) filled <= filled + 1'b1;
      if (total == 0) begin
        out_vld <= sel[SW];
      end else begin
        out_vld <= line[rp][SW] && (int'(filled) >= int'(total));
      end
    end
    if (total == 0) begin
      out_data <= sel[EW-1 -: W];
      out_wsel <= sel[SW-1:0];
    end else begin
      out_data <= line[rp][EW-1 -: W];
      out_wsel <= line[rp][SW-1:0];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cfg.en |-> int'(cfg.delay) <= ADJ_MAX)
    else $error("DAU row %0d: delay beyond ADJ_MAX", ROW);
  assert property (@(posedge clk) disable iff (!rst_n) cfg.en |-> int'(cfg.chan) < ROWS)
    else $error("DAU row %0d: channel out of range", ROW);
endmodule
