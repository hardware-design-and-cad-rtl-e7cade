// tb_hep_program_counter: drives the increment once every 9 clocks, as the
// control unit does, and checks reset to 0, the count sequence, the number
// of clocks per step, the wrap after last_step with its pulse, the full
// 0..127 revolution, and reset in mid-count.
module tb_hep_program_counter;
  import hep_pkg::*;
  logic  clk = 1'b0, rst, inc, wrap;
  step_t last_step, pc;
  int checks = 0, failures = 0;
  int cyc = 0;

  hep_program_counter dut (.clk(clk), .rst(rst), .inc(inc), .last_step(last_step),
                           .pc(pc), .wrap(wrap));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // one instruction cycle: 8 clocks idle, then one with inc
  task automatic instr_cycle();
    repeat (8) @(posedge clk);
    #1 inc = 1'b1;
    @(posedge clk); #1 inc = 1'b0;
  endtask

  initial begin
    int exp_pc, start_cyc, wraps;
    rst = 1'b1; inc = 1'b0; last_step = 7'd4;
    repeat (2) @(posedge clk);
    #1 check(pc, 0, "reset");
    rst = 1'b0;
    // short emulation cycle of 5 steps
    exp_pc = 0; wraps = 0;
    start_cyc = cyc;
    for (int i = 0; i < 12; i++) begin
      repeat (8) @(posedge clk);
      #1 inc = 1'b1; #0;
      check(wrap, exp_pc == 4, "wrap pulse");
      if (wrap) wraps++;
      @(posedge clk); #1 inc = 1'b0; #1;
      exp_pc = (exp_pc == 4) ? 0 : exp_pc + 1;
      check(pc, exp_pc, "count");
      check(wrap, 0, "no wrap without inc");
    end
    check(cyc - start_cyc, 12 * 9, "clocks for 12 steps");
    check(wraps, 2, "wraps in 12 steps");
    // full 128-step revolution
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0; last_step = 7'd127;
    for (int i = 1; i <= 128; i++) begin
      instr_cycle();
      check(pc, i % 128, "full revolution");
    end
    // reset in mid-count
    instr_cycle(); instr_cycle();
    check(pc, 2, "before reset");
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    check(pc, 0, "mid-count reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
