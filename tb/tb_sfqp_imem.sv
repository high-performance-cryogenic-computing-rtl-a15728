// Test of the 24-entry instruction memory of the SIMT processor: loads
// random words (the port walks round the loop while loading), then advances
// with random skip offsets; the word at the port and its position must match
// a model of the loop (position + 1 + skip, modulo 24).
module tb_sfqp_imem;
  localparam int N = 24;
  logic clk = 0, rst_n = 0, load_en = 0, advance = 0;
  logic [9:0] load_data = '0, instr;
  logic [3:0] skip = '0;
  logic [4:0] pos;
  logic [9:0] model [N];
  int p = 0, checks = 0, failures = 0;
  sfqp_imem dut (.*);
  always #5 clk = ~clk;
  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < N; i++) begin
      model[i] = 10'($urandom); load_data = model[i]; load_en = 1; @(posedge clk); #1;
    end
    load_en = 0;
    chk("back at entry 0 after loading", int'(pos), 0);
    for (int i = 0; i < 300; i++) begin
      chk("instr", int'(instr), int'(model[p]));
      chk("pos", int'(pos), p);
      advance = $urandom_range(1); skip = ($urandom_range(3) == 0) ? 4'($urandom) : 4'd0;
      @(posedge clk); #1;
      if (advance) p = (p + 1 + int'(skip)) % N;
    end
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
