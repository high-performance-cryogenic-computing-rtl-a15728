// Circular shift-register register file for fine-grained multithreading.
//
// Each of the THREADS entries holds one thread's architectural registers
// (r0..r3, DW bits each). The entries circulate through a loop; only the entry
// at the access port can be read (two read addresses) and written. `rotate`
// brings the next thread's entry to the port; the processor rotates once per
// issue, so the port always holds the issuing thread. A write lands on the
// entry at the port: the processor writes back exactly one loop turn after
// issue, when the same thread is at the port again. Reads are combinational
// and see the value before a write in the same cycle. `head` is the thread
// number at the port. Reset clears all registers and puts thread 0 at the port.
// The loop is an array with a rotating port index, equivalent at the ports.
module sfqp_regfile #(
  parameter int THREADS = 12,
  parameter int NREG    = 4,
  parameter int DW      = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       rotate,
  input  logic [$clog2(NREG)-1:0]    ra,
  input  logic [$clog2(NREG)-1:0]    rb,
  output logic [DW-1:0]              qa,
  output logic [DW-1:0]              qb,
  input  logic                       we,
  input  logic [$clog2(NREG)-1:0]    wa,
  input  logic [DW-1:0]              wd,
  output logic [NREG*DW-1:0]         entry,
  output logic [$clog2(THREADS)-1:0] head
);
  logic [NREG-1:0][DW-1:0] mem [THREADS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head <= '0;
      for (int t = 0; t < THREADS; t++) mem[t] <= '0;
    end else begin
      if (we) mem[head][wa] <= wd;
      if (rotate) head <= (int'(head) == THREADS-1) ? '0 : head + 1'b1;
    end
  end

  assign qa    = mem[head][ra];
  assign qb    = mem[head][rb];
  assign entry = mem[head];
endmodule
