// tb_hep_processor: one HEP processor on a 64-bit interconnect bus whose
// other 63 bits the testbench drives with fresh random values every
// instruction cycle. A random program (all four instruction types, random
// fields) is loaded through the control-memory write port and run for three
// emulation cycles of 128 steps, then for cycles of 10 steps; after every
// instruction the node bit-out is compared with the instruction-level
// reference model. Also checked: the output changes only in the 8th clock of
// an instruction, the program counter advances every 9 clocks, and
// cycle_done pulses once per emulation cycle.
module tb_hep_processor;
  import hep_pkg::*;
  import hep_tb_pkg::*;
  logic        clk = 1'b0, rst, dl_we, nbo, sample, cycle_done;
  step_t       dl_addr, last_step, pc;
  left_word_t  dl_left;
  right_word_t dl_right;
  logic [63:0] bus;
  int checks = 0, failures = 0;
  int cyc = 0;
  hep_ref_model m;

  hep_processor dut (
    .clk(clk), .rst(rst), .dl_we(dl_we), .dl_addr(dl_addr), .dl_left(dl_left),
    .dl_right(dl_right), .last_step(last_step), .bus(bus), .node_bit_out(nbo), .pc(pc),
    .sample(sample), .cycle_done(cycle_done));

  assign bus[0] = nbo;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at pc=%0d: got=%0d exp=%0d ", what, pc, got, exp);
    end
  endtask

  task automatic run(int unsigned n_steps);
    logic  prev;
    int    dones;
    step_t s;
    dones = 0;
    for (int i = 0; i < n_steps; i++) begin
      s = pc;
      // new values from the other processors, held for the whole instruction
      for (int p = 1; p < 64; p++) m.out[p] = 1'($urandom());
      for (int p = 1; p < 64; p++) bus[p] = m.out[p];
      m.step(s);
      for (int k = 0; k < 9; k++) begin
        prev = nbo;
        check(32'(sample), 32'(k == 8), "sample timing");
        check(32'(pc), 32'(s), "pc steady within instruction");
        if (cycle_done) dones++;
        @(posedge clk); #1;
        if (k != 7) check(32'(nbo), 32'(prev), "output stable outside OUT state");
      end
      check(32'(nbo), 32'(m.out[0]), "node bit-out");
      check(32'(pc), (s == last_step) ? 0 : 32'(s) + 1, "pc advance");
    end
    check(dones, n_steps / (32'(last_step) + 1), "emulation cycles");
  endtask

  initial begin
    m = new(64);
    m.randomize_program(64);
    for (int p = 1; p < 64; p++)
      for (int s = 0; s < 128; s++) m.lmem[p][s] = l_nop();
    // a few directed words at the start: ROMREF, RAMREF of IDR, LUTOP mixing LDR and IDR
    m.lmem[0][0] = l_romref(7'd100, 4'd5);
    m.lmem[0][1] = l_lutop(16'h6996);
    m.rmem[0][1] = r_word(6'd7, 4'b1010, 7'd0, 7'd0, 7'd1, 7'd0);
    m.lmem[0][2] = l_ramref();
    m.rmem[0][2] = r_word(6'd0, 4'b0001, 7'd0, 7'd0, 7'd0, 7'd1);
    rst = 1'b1; dl_we = 1'b0; dl_addr = '0; dl_left = '0; dl_right = '0;
    last_step = 7'd127;
    for (int p = 1; p < 64; p++) bus[p] = 1'b0;
    for (int s = 0; s < 128; s++) begin
      @(negedge clk);
      dl_we = 1'b1; dl_addr = 7'(s); dl_left = m.lmem[0][s]; dl_right = m.rmem[0][s];
    end
    @(negedge clk) dl_we = 1'b0;
    @(negedge clk) rst = 1'b0;
    m.reset();
    for (int p = 1; p < 64; p++) m.out[p] = 1'b0;
    run(3 * 128);
    // restart with a 10-step emulation cycle
    rst = 1'b1; repeat (2) @(negedge clk);
    rst = 1'b0;
    m.reset();
    last_step = 7'd9;
    run(50);
    $display("instructions: LUTOP %0d RAMREF %0d ROMREF %0d NOP %0d",
             m.n_lutop, m.n_ramref, m.n_romref, m.n_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
