// tb_hep_target_io: checks the target-system I/O interface at its default
// size (64 processors, 16 inputs each, input word 127).
//
// Random target inputs, trap values and control pulses are applied for
// several thousand clocks. A model in the testbench predicts the outputs
// from the rules alone:
//   * The input words are written exactly in the clocks where dl_done is
//     high, or cycle_done is high while running.
//   * The write address is the input word.
//   * Processor i's right word is its 16 inputs, zero-extended.
//   * target_out takes trap_q one clock after each cycle end and holds it
//     otherwise.
//   * Reset clears target_out.
// Every clock is checked. The test counts writes at download end, writes at
// cycle ends, output updates, and cycle ends ignored while not running.
module tb_hep_target_io;
  import hep_pkg::*;
  localparam int NP = 64;
  localparam int IW = 16;
  logic          clk = 1'b0, rst, running, dl_done, cycle_done, io_we;
  logic [IW-1:0] target_in [NP];
  logic [NP-1:0] target_out, trap_q, exp_out;
  step_t         io_addr;
  right_word_t   io_right [NP];
  logic          exp_update;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_dl_write = 0, n_cycle_write = 0, n_update = 0, n_ignored = 0;

  hep_target_io dut (
    .clk(clk), .rst(rst), .running(running), .dl_done(dl_done), .cycle_done(cycle_done),
    .target_in(target_in), .target_out(target_out), .trap_q(trap_q),
    .io_we(io_we), .io_addr(io_addr), .io_right(io_right));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at clock %0d: got=%0h exp=%0h", what, cyc, got, exp);
    end
  endtask

  task automatic count(int n, string what);
    checks++;
    $display("%-36s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    logic exp_we;
    rst = 1'b1; running = 1'b0; dl_done = 1'b0; cycle_done = 1'b0; trap_q = '0;
    for (int i = 0; i < NP; i++) target_in[i] = '0;
    exp_out = '0; exp_update = 1'b0;
    repeat (2) @(posedge clk);
    #1 check(64'(target_out), 64'(0), "reset clears target_out");
    rst = 1'b0;
    for (int t = 0; t < 4000; t++) begin
      // drive new inputs between clock edges
      @(negedge clk);
      running    = ($urandom_range(7) != 0);
      dl_done    = ($urandom_range(15) == 0);
      cycle_done = ($urandom_range(5) == 0);
      trap_q     = {$urandom(), $urandom()};
      for (int i = 0; i < NP; i++) target_in[i] = IW'($urandom());
      #1;
      exp_we = dl_done || (cycle_done && running);
      check(64'(io_we), 64'(exp_we), "write enable");
      check(64'(io_addr), 64'(127), "input word address");
      for (int i = 0; i < NP; i++) check(64'(io_right[i]), 64'(target_in[i]), "input word data");
      if (dl_done) n_dl_write++;
      if (cycle_done && running) n_cycle_write++;
      if (cycle_done && !running && !dl_done) n_ignored++;
      @(posedge clk);
      if (exp_update) begin
        exp_out = trap_q;
        n_update++;
      end
      exp_update = cycle_done && running;
      #1 check(64'(target_out), 64'(exp_out), "target_out");
    end
    count(n_dl_write,    "input writes at download end");
    count(n_cycle_write, "input writes at cycle end");
    count(n_update,      "target_out updates");
    count(n_ignored,     "cycle ends ignored while not running");
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
