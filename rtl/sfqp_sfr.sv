// Sign flag register: one flag bit per thread in a loop-shaped shift register.
//
// The read tap (`q`) holds the flag of the thread at the port, rotated in step
// with the register file. The write tap sits LAG entries behind the read tap:
// the sign produced by the ALU reaches it LAG rotations after issue, so the
// flag is back long before the same thread issues its next instruction (unlike
// register results, which need the whole pipeline). That lets a conditional
// instruction directly follow the instruction that sets the flag, as the
// processor's test program does. Reset clears all flags.
module sfqp_sfr #(
  parameter int THREADS = 12,
  parameter int LAG     = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rotate,
  output logic q,
  input  logic we,
  input  logic wd,
  output logic [THREADS-1:0] flags
);
  localparam int TW = $clog2(THREADS);
  logic [TW-1:0] head, wpos;

  always_comb begin
    int s;
    s    = (int'(head) + THREADS - LAG) % THREADS;
    wpos = TW'(s);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head  <= '0;
      flags <= '0;
    end else begin
      if (we) flags[wpos] <= wd;
      if (rotate) head <= (int'(head) == THREADS-1) ? '0 : head + 1'b1;
    end
  end

  assign q = flags[head];
endmodule
