// Shared types and field widths of the SuperNPU.
//
// The configuration records are this implementation's own: the data alignment
// unit needs, per PE row, the ifmap channel and the weight position of the
// weight mapped on that row, and per layer the ifmap width, stride and ofmap
// size. Field widths are generous fixed sizes so one record fits every array
// size the RTL is parameterised for.
package snpu_pkg;
  localparam int CH_W    = 12;  // ifmap channel (buffer lane) index
  localparam int K_W     = 4;   // weight (filter) position within the window
  localparam int COORD_W = 10;  // ifmap / ofmap coordinate
  localparam int DLY_W   = 13;  // alignment delay in cycles
  localparam int LEN_W   = 16;  // stream length in buffer entries

  typedef struct packed {
    logic               en;     // row has a weight mapped
    logic [CH_W-1:0]    chan;   // ifmap channel feeding this row
    logic [K_W-1:0]     ky;     // weight row index in the filter window
    logic [K_W-1:0]     kx;     // weight column index in the filter window
    logic [DLY_W-1:0]   delay;  // alignment delay (DFFs not bypassed)
  } dau_row_cfg_t;

  typedef struct packed {
    logic [COORD_W-1:0] width;   // ifmap width in pixels
    logic [1:0]         stride_log2;
    logic [COORD_W-1:0] oh;      // ofmap height
    logic [COORD_W-1:0] ow;      // ofmap width
  } layer_cfg_t;

  // One weight mapping: what the sequencer streams.
  typedef struct packed {
    logic [15:0]      if_chunk;  // ifmap buffer chunk to stream
    logic [15:0]      ps_chunk;  // output-buffer chunk acting as psum buffer
    logic             use_psum;  // accumulate onto ps_chunk (else start from 0)
    logic [15:0]      of_chunk;  // output-buffer chunk acting as ofmap buffer
    logic [LEN_W-1:0] npix;      // ifmap entries to stream
    logic [3:0]       nk;        // weight registers in use (1..NREGS)
  } mapping_t;
endpackage
