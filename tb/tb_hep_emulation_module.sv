// tb_hep_emulation_module: eight processors on the interconnect (reduced
// from 64 to keep the run short) with random programs whose node addresses
// cover all eight processors and some empty bus positions. After every
// instruction cycle the whole bus is compared with the instruction-level
// reference model of all processors, over three 128-step emulation cycles
// and then 5-step cycles. Also checked: all program counters stay equal.
// The target-input write port is held idle here; the engine tests drive it.
module tb_hep_emulation_module;
  import hep_pkg::*;
  import hep_tb_pkg::*;
  localparam int NP = 8;
  logic          clk = 1'b0, rst, cycle_done;
  logic [NP-1:0] dl_we, node_bits, sample;
  step_t         dl_addr, last_step;
  step_t         pc [NP];
  left_word_t    dl_left;
  right_word_t   dl_right;
  right_word_t   io_right [NP];   // the input-word writer is idle in this test
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_cycles = 0;
  hep_ref_model m;

  hep_emulation_module #(.N_PROC(NP)) dut (
    .clk(clk), .rst(rst), .dl_we(dl_we), .dl_addr(dl_addr), .dl_left(dl_left),
    .dl_right(dl_right), .io_we(1'b0), .io_addr(step_t'(0)), .io_right(io_right),
    .last_step(last_step), .node_bits(node_bits), .pc(pc),
    .sample(sample), .cycle_done(cycle_done));

  always #5 clk = ~clk;
  always_comb for (int i = 0; i < NP; i++) io_right[i] = '0;
  always @(posedge clk) begin
    cyc++;
    if (cycle_done) n_cycles++;
  end

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at pc=%0d: got=%0h exp=%0h", what, pc[0], got, exp);
    end
  endtask

  task automatic run(int unsigned n_steps);
    step_t s;
    for (int i = 0; i < n_steps; i++) begin
      s = pc[0];
      m.step(s);
      repeat (9) @(posedge clk);
      #1;
      check(64'(node_bits), m.out_vec(), "bus");
      for (int p = 1; p < NP; p++) check(64'(pc[p]), 64'(pc[0]), "lock-step");
    end
  endtask

  initial begin
    m = new(NP);
    m.randomize_program(NP + 2);
    rst = 1'b1; dl_we = '0; dl_addr = '0; dl_left = '0; dl_right = '0; last_step = 7'd127;
    for (int p = 0; p < NP; p++)
      for (int s = 0; s < 128; s++) begin
        @(negedge clk);
        dl_we = '0; dl_we[p] = 1'b1; dl_addr = 7'(s);
        dl_left = m.lmem[p][s]; dl_right = m.rmem[p][s];
      end
    @(negedge clk) dl_we = '0;
    @(negedge clk) rst = 1'b0;
    run(3 * 128);
    check(64'(n_cycles), 3, "emulation cycles");
    rst = 1'b1; repeat (2) @(negedge clk);
    rst = 1'b0;
    m.reset();
    last_step = 7'd4;
    run(40);
    $display("instructions: LUTOP %0d RAMREF %0d ROMREF %0d NOP %0d, remote bit-ins %0d",
             m.n_lutop, m.n_ramref, m.n_romref, m.n_nop, m.n_remote_in);
    checks++;
    if (m.n_remote_in == 0) failures++;
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
