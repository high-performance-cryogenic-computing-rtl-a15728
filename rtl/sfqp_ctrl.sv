// Controller of the SIMT prototype processor.
//
// Execution is single-instruction multiple-thread: every instruction is
// executed by all THREADS threads, one thread per issue, and a thread is issued
// every ISSUE_GAP cycles (every second cycle by default, an issue rate of 0.5
// operations per cycle). An instruction slot therefore lasts
// THREADS*ISSUE_GAP cycles (24), equal to the pipeline depth, so a thread's
// next instruction is issued exactly when its previous result is written back.
//
// After `start` (the trigger) the controller spends one cycle loading the
// instruction register, then runs slots: `issue` on even cycles of the slot
// with `thread` = slot cycle / 2; `im_advance` near the end of the slot turns
// the instruction memory to the next instruction; `ir_load` in the last cycle
// captures it. HLT is never issued: it moves the controller to the halted state.
// The conditional skip reads thread 0's sign flag when the slot starts; if it
// is 0 the instruction after the delay slot is `offset` entries further on.
// The ring rotation (`rotate`) continues while halted so that results still in
// the pipeline are written to the right threads. Which thread's flag decides a
// skip is this implementation's choice.
module sfqp_ctrl
  import sfqp_pkg::*;
#(
  parameter int THREADS   = 12,
  parameter int ISSUE_GAP = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  dec_t dec,
  input  logic flag0,
  output logic issue,
  output logic rotate,
  output logic [$clog2(THREADS)-1:0] thread,
  output logic ir_load,
  output logic im_advance,
  output logic [3:0] im_skip,
  output logic running,
  output logic halted,
  output logic [31:0] issued_ops
);
  localparam int SLOT = THREADS * ISSUE_GAP;
  typedef enum logic [1:0] {S_IDLE, S_PRIME, S_RUN, S_HALT} state_e;
  state_e state;
  logic [$clog2(SLOT)-1:0] cnt;
  logic       skip_here;      // skip taken in the current slot
  logic [3:0] skip_pending;   // applied at the end of the delay slot

  wire issue_phase = (int'(cnt) % ISSUE_GAP) == 0;

  always_comb begin
    issue      = (state == S_RUN) && issue_phase && !dec.halt;
    rotate     = ((state == S_RUN) || (state == S_HALT)) && issue_phase;
    thread     = $bits(thread)'(int'(cnt) / ISSUE_GAP);
    ir_load    = (state == S_PRIME) || ((state == S_RUN) && int'(cnt) == SLOT-1);
    im_advance = (state == S_RUN) && int'(cnt) == SLOT-2;
    im_skip    = skip_pending;
    running    = (state == S_RUN);
    halted     = (state == S_HALT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      skip_here    <= 1'b0;
      skip_pending <= '0;
      issued_ops   <= '0;
    end else begin
      if (issue) issued_ops <= issued_ops + 1;
      case (state)
        S_IDLE:  if (start) state <= S_PRIME;
        S_PRIME: begin state <= S_RUN; cnt <= '0; end
        S_RUN, S_HALT: begin
          cnt <= (int'(cnt) == SLOT-1) ? '0 : cnt + 1'b1;
          if (state == S_RUN && cnt == 0) begin
            if (dec.halt) state <= S_HALT;
            skip_here <= dec.skip && !flag0;
          end
          if (state == S_RUN && int'(cnt) == SLOT-2)
            skip_pending <= skip_here ? dec.offset : 4'd0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
