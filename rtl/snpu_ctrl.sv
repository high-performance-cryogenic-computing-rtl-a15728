// Mapping sequencer of the SuperNPU.
//
// Runs one weight mapping at a time, in four phases:
//   WLOAD   for each weight register k < nk: shift ROWS weights from the
//           weight buffer down every PE column (ROWS cycles), then commit
//           them to register k (1 cycle);
//   REWIND  turn the ifmap chunk, the psum chunk (if used), the ofmap chunk
//           and the weight buffer until each has entry 0 at its port: the
//           cost of sequential shift-register memories, one chunk long at most;
//   STREAM  stream npix ifmap entries into the DAU, each for nk slots
//           (wsel = 0..nk-1), advancing the chunk after the last slot;
//   DRAIN   wait until the last result has left the array, turning the
//           ifmap chunk back to entry 0 meanwhile so the host can refill it
//           from the start (the drain is longer than one chunk).
// `done` pulses for one cycle at the end. Results are written to the ofmap
// chunk and psums read from the psum chunk by the datapath as they flow
// (snpu_top). The sequencer itself is this implementation's own; the phases
// follow the published description of one weight mapping.
module snpu_ctrl
  import snpu_pkg::*;
#(
  parameter int ROWS    = 256,
  parameter int COLS    = 64,
  parameter int NREGS   = 8,
  parameter int STAGES  = 15,
  parameter int ADJ_MAX = 1535
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  mapping_t                   map_in,
  output mapping_t                   map,
  input  logic                       if_at_origin,
  input  logic                       ps_at_origin,
  input  logic                       of_at_origin,
  input  logic                       wb_at_origin,
  output logic                       wb_shift,
  output logic                       w_shift,
  output logic                       w_commit,
  output logic [$clog2(NREGS)-1:0]   w_idx,
  output logic                       if_rot,
  output logic                       ps_rot,
  output logic                       of_rot,
  output logic                       dau_vld,
  output logic [$clog2(NREGS)-1:0]   dau_wsel,
  output logic                       dau_pix_adv,
  output logic                       dau_restart,
  output logic [2:0]                 phase,
  output logic                       busy,
  output logic                       done
);
  localparam int SW = $clog2(NREGS);
  localparam int ARRAY_LAT = (ROWS-1)*(STAGES-1) + STAGES + COLS - 1;
  localparam int DRAIN = 1 + ADJ_MAX + (ROWS-1)*(STAGES-1) + ARRAY_LAT + 4;

  typedef enum logic [2:0] {P_IDLE, P_WLOAD, P_REWIND, P_STREAM, P_DRAIN} phase_e;
  phase_e st;
  logic [$clog2(ROWS+1)-1:0] wi;
  logic [SW-1:0]             k;
  logic [LEN_W-1:0]          pix;
  logic [31:0]               dcnt;

  wire last_k = (int'(k) == int'(map.nk) - 1);
  wire all_home = if_at_origin && (ps_at_origin || !map.use_psum) && of_at_origin && wb_at_origin;

  always_comb begin
    phase       = st;
    busy        = (st != P_IDLE);
    wb_shift    = (st == P_WLOAD && int'(wi) < ROWS) || (st == P_REWIND && !wb_at_origin);
    w_shift     = (st == P_WLOAD && int'(wi) < ROWS);
    w_commit    = (st == P_WLOAD && int'(wi) == ROWS);
    w_idx       = k;
    if_rot      = (st == P_REWIND && !if_at_origin) || (st == P_STREAM && last_k)
               || (st == P_DRAIN && !if_at_origin);
    ps_rot      = (st == P_REWIND && map.use_psum && !ps_at_origin);
    of_rot      = (st == P_REWIND && !of_at_origin);
    dau_vld     = (st == P_STREAM);
    dau_wsel    = k;
    dau_pix_adv = (st == P_STREAM && last_k);
    dau_restart = (st == P_REWIND && all_home);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= P_IDLE;
      done <= 1'b0;
      wi   <= '0;
      k    <= '0;
      pix  <= '0;
      dcnt <= '0;
      map  <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        P_IDLE: if (start) begin
          map <= map_in;
          st  <= P_WLOAD;
          wi  <= '0;
          k   <= '0;
        end
        P_WLOAD: begin
          if (int'(wi) == ROWS) begin
            wi <= '0;
            if (last_k) begin
              k  <= '0;
              st <= P_REWIND;
            end else begin
              k <= k + 1'b1;
            end
          end else begin
            wi <= wi + 1'b1;
          end
        end
        P_REWIND: if (all_home) begin
          st  <= P_STREAM;
          pix <= '0;
          k   <= '0;
        end
        P_STREAM: begin
          if (last_k) begin
            k <= '0;
            if (pix == map.npix - 1'b1) begin
              st   <= P_DRAIN;
              dcnt <= '0;
            end else begin
              pix <= pix + 1'b1;
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        P_DRAIN: begin
          dcnt <= dcnt + 1;
          if (int'(dcnt) == DRAIN - 1) begin
            st   <= P_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   start && st == P_IDLE |-> map_in.nk >= 1 && int'(map_in.nk) <= NREGS && map_in.npix >= 1)
    else $error("bad mapping command");
endmodule
