// Per-thread data memory of the SIMT prototype processor.
//
// WORDS words of DW bits per thread (16 bits for the default 4 x 4), kept in a
// loop-shaped shift register whose entries are the threads' memories, rotated
// in step with the register file so that the issuing thread's memory is at the
// port. Reads (`addr` -> `q`) are combinational; a write replaces one word of
// the entry at the port. Before execution the memory is filled at low speed
// with `load_en`: each load replaces the whole entry at the port and rotates.
// The contents are not reset; reset puts thread 0 at the port.
module sfqp_dmem #(
  parameter int THREADS = 12,
  parameter int WORDS   = 4,
  parameter int DW      = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       rotate,
  input  logic [$clog2(WORDS)-1:0]   addr,
  output logic [DW-1:0]              q,
  input  logic                       we,
  input  logic [$clog2(WORDS)-1:0]   wa,
  input  logic [DW-1:0]              wd,
  input  logic                       load_en,
  input  logic [WORDS*DW-1:0]        load_data,
  output logic [WORDS*DW-1:0]        entry,
  output logic [$clog2(THREADS)-1:0] head
);
  logic [WORDS-1:0][DW-1:0] mem [THREADS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head <= '0;
    end else begin
      if (load_en)      mem[head] <= load_data;
      else if (we)      mem[head][wa] <= wd;
      if (rotate || load_en) head <= (int'(head) == THREADS-1) ? '0 : head + 1'b1;
    end
  end

  assign q     = mem[head][addr];
  assign entry = mem[head];
endmodule
