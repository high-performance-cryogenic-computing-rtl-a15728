// Test of the issue controller of the SIMT processor. The decoded
// instruction of each slot is supplied here from a short script (NOP, taken
// skip by 5, delay slot, not-taken skip, NOP, HLT). Checked per cycle: one
// thread issued every second cycle in thread order 0..11 (24-cycle slot, 0.5
// operations per cycle), the instruction register loaded in the last cycle of
// each slot, the instruction memory advanced the cycle before with the skip
// offset applied only after the delay slot following a taken skip, HLT not
// issued and the halt state entered, with the loops still turning.
module tb_sfqp_ctrl;
  import sfqp_pkg::*;
  localparam int T = 12, SLOT = 24, NS = 6;
  logic clk = 0, rst_n = 0, start = 0, flag0 = 0;
  dec_t dec;
  logic issue, rotate, ir_load, im_advance, running, halted;
  logic [3:0] thread, im_skip;
  logic [31:0] issued_ops;
  int checks = 0, failures = 0;
  int si = -1, cyc = 0, n_skip_applied = 0;
  dec_t script [NS];
  logic f0 [NS];
  int exp_skip [NS];
  sfqp_ctrl dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    foreach (script[i]) begin script[i] = '0; f0[i] = 1'b1; exp_skip[i] = 0; end
    script[1].skip = 1; script[1].offset = 4'd5; f0[1] = 1'b0;   // taken
    script[3].skip = 1; script[3].offset = 4'd3; f0[3] = 1'b1;   // not taken
    script[5].halt = 1;
    exp_skip[2] = 5;                                            // applied after the delay slot
  end
  always_comb begin
    dec = (si >= 0 && si < NS) ? script[si] : '0;
    flag0 = (si >= 0 && si < NS) ? f0[si] : 1'b1;
  end
  always @(posedge clk) if (rst_n && ir_load) si <= si + 1;

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    chk("idle before start", int'(running || halted || issue), 0);
    start = 1; @(posedge clk); #1; start = 0;
    chk("prime loads the instruction register", int'(ir_load), 1);
    @(posedge clk); #1;
    for (int s = 0; s < NS; s++)
      for (int c = 0; c < SLOT; c++) begin
        chk($sformatf("slot %0d cycle %0d issue", s, c), int'(issue), int'(c % 2 == 0 && s != NS-1));
        chk($sformatf("slot %0d cycle %0d rotate", s, c), int'(rotate), int'(c % 2 == 0));
        if (s < NS-1 || c == 0) begin
          if (c % 2 == 0) chk("thread order", int'(thread), c / 2);
          chk("running", int'(running), 1);
          chk("ir_load", int'(ir_load), int'(c == SLOT-1));
          chk("im_advance", int'(im_advance), int'(c == SLOT-2));
          if (c == SLOT-2) begin
            chk($sformatf("slot %0d skip offset", s), int'(im_skip), exp_skip[s]);
            if (im_skip != 0) n_skip_applied++;
          end
        end else begin
          chk("halted", int'(halted), 1);
          chk("no ir load when halted", int'(ir_load), 0);
        end
        @(posedge clk); #1;
      end
    chk("issued operations", int'(issued_ops), (NS-1) * T);
    chk("mechanism: skip applied", n_skip_applied, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
