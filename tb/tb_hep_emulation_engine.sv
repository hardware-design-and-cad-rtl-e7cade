// tb_hep_emulation_engine: end-to-end test of the whole engine at its
// default size (64 processors, 128-step programs), parameters untouched.
//
// Part 1: a random program for all 64 processors is streamed through the
// download manager (with gaps in the stream), the engine runs three 128-step
// emulation cycles, and after every instruction cycle the whole 64-bit
// interconnect bus is compared with the instruction-level reference model;
// at every emulation-cycle end each processor's signal trap must hold the
// value its processor produced at the trap's reference step.
// Part 2: while the engine runs, a new download loads a small emulated
// design, a 4-bit binary counter with its state in processor 0's LDR, whose
// bits are sent over the interconnect to processor 1, which computes their
// parity, plus a ROMREF constant (processor 2) and a RAMREF copy of the
// received low bit (processor 3). With 6-step emulation cycles it is run for
// 20 emulated clocks; the traps must show count = k mod 16, its parity, the
// constant and the low bit after each emulated clock k.
// Part 1 also drives the target inputs. Every processor has ROMREFs of input
// word 127, and step 127 itself is the input word. The inputs are changed
// after the first emulation cycle. The model takes the new word one cycle
// later, because the interface writes the inputs at the end of each cycle.
// target_out must show the traps of the previous cycle.
// Every mechanism is counted and must occur: stream gaps, download, reload
// while running, each instruction type, bit-ins from other processors,
// flip-flop reads (data written in the previous emulation cycle), wraps of
// both cycle lengths, trap captures, input writes and target_out updates.
// The length of every emulation cycle is checked: 9 x (last_step + 1) system
// clocks, 1152 for a full 128-step program.
module tb_hep_emulation_engine;
  import hep_pkg::*;
  import hep_tb_pkg::*;
  localparam int NP = 64;
  logic          clk = 1'b0, rst, dl_start, prog_valid, prog_ready, dl_done, loading, running, cycle_done;
  left_word_t    prog_left;
  right_word_t   prog_right;
  step_t         last_step, step;
  step_t         trap_ref [NP];
  logic [NP-1:0] trap_q, trap_hit, node_bits;
  logic [NP-1:0] exp_trap, exp_out, target_out;
  logic [15:0]   target_in [NP];
  bit            out_valid;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_io_write = 0, n_out_check = 0, n_period = 0;
  int last_cd = -1;
  int n_gap = 0, n_download = 0, n_reload = 0, n_wrap_long = 0, n_wrap_short = 0, n_trap_hits = 0;
  hep_ref_model m;

  hep_emulation_engine dut (
    .clk(clk), .rst(rst), .dl_start(dl_start), .prog_valid(prog_valid), .prog_ready(prog_ready),
    .prog_left(prog_left), .prog_right(prog_right), .dl_done(dl_done), .loading(loading),
    .last_step(last_step), .trap_ref(trap_ref), .trap_q(trap_q), .trap_hit(trap_hit),
    .node_bits(node_bits), .step(step), .running(running), .cycle_done(cycle_done),
    .target_in(target_in), .target_out(target_out));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (prog_ready && !prog_valid) n_gap++;
    if (dl_done) n_download++;
    if (cycle_done) begin
      if (last_step == 7'd127) n_wrap_long++;
      else n_wrap_short++;
    end
    n_trap_hits += $countones(trap_hit);
    if (dut.u_io.io_we) n_io_write++;
    // an emulation cycle lasts 9 x (last_step + 1) system clocks
    if (dl_done) last_cd = -1;
    if (cycle_done) begin
      if (last_cd >= 0) begin
        checks++;
        n_period++;
        if (cyc - last_cd != 9 * (int'(last_step) + 1)) begin
          failures++;
          $display("FAIL emulation cycle of %0d clocks, last_step %0d", cyc - last_cd, last_step);
        end
      end
      last_cd = cyc;
    end
  end

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at step=%0d: got=%0h exp=%0h", what, step, got, exp);
    end
  endtask

  task automatic count(int n, string what);
    checks++;
    $display("%-32s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  // Stream the model's program into the engine
  task automatic download(bit gaps);
    int p, s;
    @(negedge clk) dl_start = 1'b1;
    @(negedge clk) dl_start = 1'b0;
    p = 0; s = 0;
    while (p < NP) begin
      prog_left  = m.lmem[p][s];
      prog_right = m.rmem[p][s];
      prog_valid = gaps ? 1'($urandom_range(7) != 0) : 1'b1;
      @(posedge clk);
      if (prog_valid && prog_ready) begin
        s++;
        if (s == 128) begin s = 0; p++; end
      end
      #1;
    end
    prog_valid = 1'b0;
    while (!running) begin
      @(posedge clk); #1;
    end
    m.reset();
    out_valid = 1'b0;
  endtask

  // Model's copy of the input word: a NOP left word, the inputs in the right word
  task automatic sync_inputs();
    for (int p = 0; p < NP; p++) begin
      m.lmem[p][127] = l_nop();
      m.rmem[p][127] = 38'(target_in[p]);
    end
  endtask

  // Run n instruction cycles from the start of an instruction, checking the bus
  task automatic run(int unsigned n_steps);
    step_t s;
    for (int i = 0; i < n_steps; i++) begin
      s = step;
      m.step(s);
      for (int p = 0; p < NP; p++)
        if (trap_ref[p] == s) exp_trap[p] = m.out[p];
      repeat (9) @(posedge clk);
      #1;
      check(64'(node_bits), m.out_vec(), "interconnect bus");
      if (s == 0 && out_valid) begin
        check(64'(target_out), 64'(exp_out), "target outputs");
        n_out_check++;
      end
      if (s == last_step) begin
        check(64'(trap_q), 64'(exp_trap), "signal traps");
        exp_out   = exp_trap;
        out_valid = 1'b1;
      end
    end
  endtask

  function automatic logic [15:0] table_of(int unsigned fn);
    logic [15:0] t;
    logic a, b, c, d;
    for (int i = 0; i < 16; i++) begin
      {d, c, b, a} = 4'(i);
      case (fn)
        0: t[i] = a ^ (b & c & d);
        1: t[i] = a ^ (b & c);
        2: t[i] = a ^ b;
        3: t[i] = !a;
        default: t[i] = a ^ b ^ c ^ d;
      endcase
    end
    return t;
  endfunction

  initial begin
    logic [3:0] cnt;
    m = new(NP);
    rst = 1'b1; dl_start = 1'b0; prog_valid = 1'b0; prog_left = '0; prog_right = '0;
    for (int p = 0; p < NP; p++) target_in[p] = 16'($urandom());
    last_step = 7'd127; exp_trap = '0;
    for (int p = 0; p < NP; p++) trap_ref[p] = 7'($urandom());
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // ---- Part 1: random program, full size ----
    m.randomize_program(NP);
    for (int p = 0; p < NP; p++) m.lmem[p][7] = l_romref(7'd127, 4'(p));
    sync_inputs();
    download(1'b1);
    run(128);
    for (int p = 0; p < NP; p++) target_in[p] = ~target_in[p];
    run(128);              // still the old inputs: the new ones are written at its end
    sync_inputs();
    run(128);
    $display("random program: LUTOP %0d RAMREF %0d ROMREF %0d NOP %0d",
             m.n_lutop, m.n_ramref, m.n_romref, m.n_nop);

    // ---- Part 2: emulated 4-bit counter, reloaded while running ----
    for (int p = 0; p < NP; p++)
      for (int s = 0; s < 128; s++) begin
        m.lmem[p][s] = l_nop();
        m.rmem[p][s] = r_word(6'd0, 4'b0, 7'd0, 7'd0, 7'd0, 7'd0);
      end
    sync_inputs();
    // processor 0: q3..q0 kept at steps 0..3 of its LDR
    m.lmem[0][0] = l_lutop(table_of(0)); m.rmem[0][0] = r_word(6'd0, 4'b0000, 7'd3, 7'd2, 7'd1, 7'd0);
    m.lmem[0][1] = l_lutop(table_of(1)); m.rmem[0][1] = r_word(6'd0, 4'b0000, 7'd3, 7'd3, 7'd2, 7'd1);
    m.lmem[0][2] = l_lutop(table_of(2)); m.rmem[0][2] = r_word(6'd0, 4'b0000, 7'd3, 7'd3, 7'd3, 7'd2);
    m.lmem[0][3] = l_lutop(table_of(3)); m.rmem[0][3] = r_word(6'd0, 4'b0000, 7'd3, 7'd3, 7'd3, 7'd3);
    // processor 1: receive q3..q0 at steps 1..4, parity at step 5
    for (int s = 1; s <= 4; s++) m.rmem[1][s] = r_word(6'd0, 4'b0, 7'd0, 7'd0, 7'd0, 7'd0);
    m.lmem[1][5] = l_lutop(table_of(4)); m.rmem[1][5] = r_word(6'd0, 4'b1111, 7'd4, 7'd3, 7'd2, 7'd1);
    // processor 2: constant 1 from bit 3 of right word 100
    m.lmem[2][0] = l_romref(7'd100, 4'd3); m.rmem[2][100] = 38'h8;
    // processor 3: receive q0 at step 4, RAMREF it from IDR at step 5
    m.lmem[3][5] = l_ramref(); m.rmem[3][5] = r_word(6'd0, 4'b0001, 7'd0, 7'd0, 7'd0, 7'd4);
    trap_ref[0] = 7'd3; trap_ref[1] = 7'd5; trap_ref[2] = 7'd0; trap_ref[3] = 7'd5;
    for (int p = 4; p < NP; p++) trap_ref[p] = 7'd5;
    if (running) n_reload++;
    last_step = 7'd5;
    download(1'b0);
    for (int k = 1; k <= 20; k++) begin
      run(6);
      cnt = 4'(k);
      check(64'(trap_q[0]), 64'(cnt[0]), "counter low bit");
      check(64'(trap_q[1]), 64'(^cnt), "counter parity");
      check(64'(trap_q[2]), 64'(1), "ROMREF constant");
      check(64'(trap_q[3]), 64'(cnt[0]), "RAMREF copy");
      check(64'(dut.u_module.g_proc[0].u_hep.u_ldr.mem[3:0]), 64'({cnt[0], cnt[1], cnt[2], cnt[3]}),
            "counter state in LDR");
    end

    count(n_gap,         "download stream gaps");
    count(n_download,    "downloads");
    count(n_reload,      "reloads while running");
    count(m.n_lutop,     "LUTOP executed");
    count(m.n_ramref,    "RAMREF executed");
    count(m.n_romref,    "ROMREF executed");
    count(m.n_nop,       "NOP executed");
    count(m.n_remote_in, "bit-ins from other processors");
    count(m.n_state_read,"reads of previous-cycle data");
    count(n_wrap_long,   "128-step emulation cycles");
    count(n_wrap_short,  "6-step emulation cycles");
    count(n_trap_hits,   "trap captures");
    count(n_io_write,    "target input writes");
    count(n_period,      "emulation cycle lengths checked");
    count(n_out_check,   "target output updates checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 300000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
