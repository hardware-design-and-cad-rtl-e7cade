// tb_hep_workload_multiplier: runs a 4x4-bit sequential binary multiplier,
// as an emulated design, on the full-size engine (64 processors, 128-step
// programs, parameters untouched).
//
// The emulated design has the interface of a sequential multiplier: a 4-bit
// multiplicand, a 4-bit multiplier, Start, the clock, and an 8-bit product.
// Its insides are a plain shift-and-add circuit. Start with idle state loads
// A = multiplicand and P = {0000, multiplier}. Four busy clocks then each
// compute {carry, P[7:4]} = P[7:4] + (P[0] ? A : 0) and shift P right by
// one. After that, done is set and P holds the product. done stays set while
// Start is high and clears when Start is low, which allows the next start.
// The state is 16 flip-flops: A[3:0], P[7:0], cnt[1:0], busy and done.
//
// The testbench holds this circuit as a netlist of 4-input LUT nodes, plus
// 9 constant nodes for the primary inputs. It compiles the netlist into HEP
// programs with a small list scheduler of its own:
//   * Steps 0..15 re-emit last clock's flip-flop values. The owner of
//     flip-flop f does a RAMREF of the LDR word where the flip-flop's
//     next-state LUT left it. Every processor picks the bit up into
//     IDR[f+1] in step f+1.
//   * From step 17 on, nodes are placed in topological order on the
//     processor and step where they can run earliest. An operand on the same
//     processor is read from LDR. An operand from another processor is
//     picked up in the step right after it is produced (one pickup per
//     processor per step) and read from IDR.
//   * Primary inputs are ROMREF bits of control word 127. The engine's
//     target I/O interface writes the target inputs there at the start of
//     every emulated clock.
// The scheduler only serves this test. The engine does not depend on it.
//
// The program is downloaded once. The testbench then acts as the target
// system: it holds Start low for a few emulated clocks, and the multiplier
// must stay idle. Then, for each operand pair, it raises Start with the
// operands for 8 emulated clocks and lowers it for 3. Inputs changed after an
// emulated clock reach the design one clock later, because they are written
// at the end of each emulation cycle. The models follow that.
// Checks:
//   * every bus value, after every instruction, against the instruction-level
//     reference model;
//   * every flip-flop value re-emitted at the start of each emulated clock,
//     against a behavioural model of the multiplier;
//   * the signal traps, which watch product bits, and target_out;
//   * each product, against the arithmetic product.
module tb_hep_workload_multiplier;
  import hep_pkg::*;
  import hep_tb_pkg::*;
  localparam int NP        = 64;
  localparam int MAXN      = 64;    // netlist capacity
  localparam int NF        = 16;    // flip-flops of the multiplier
  localparam int SB        = NF + 1;// first computation step
  localparam int DATA_ADDR = 127;   // control word holding the primary inputs
  localparam int FF_REF    = 1000;  // input reference to flip-flop f is FF_REF + f
  // flip-flop numbering
  localparam int FF_A = 0, FF_P = 4, FF_C0 = 12, FF_C1 = 13, FF_BUSY = 14, FF_DONE = 15;
  // primary-input bit positions in the data word
  localparam int IN_MC = 0, IN_MP = 4, IN_START = 8;

  typedef enum int {F_ROM, F_LOAD, F_SUM0, F_CARRY0, F_SUM, F_CARRY, F_MUX,
                    F_PLOAD, F_CNT0, F_CNT1, F_BUSY, F_LAST, F_DONE} fn_e;

  logic          clk = 1'b0, rst, dl_start, prog_valid, prog_ready, dl_done, loading, running, cycle_done;
  left_word_t    prog_left;
  right_word_t   prog_right;
  step_t         last_step, step;
  step_t         trap_ref [NP];
  logic [NP-1:0] trap_q, trap_hit, node_bits, target_out;
  logic [15:0]   target_in [NP];
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_trap_hits = 0, n_products = 0, n_idle_runs = 0, n_pickups = 0;
  hep_ref_model rm;

  // netlist and its placement
  int  n_nodes;
  fn_e fn      [MAXN];
  int  ins     [MAXN][4];
  int  rom_bit [MAXN];
  int  d_node  [NF];
  int  node_p  [MAXN];
  int  node_s  [MAXN];
  bit  occ     [NP][128];
  int  pick    [NP][128];
  int  last;
  int  trap_ff [NP];

  hep_emulation_engine dut (
    .clk(clk), .rst(rst), .dl_start(dl_start), .prog_valid(prog_valid), .prog_ready(prog_ready),
    .prog_left(prog_left), .prog_right(prog_right), .dl_done(dl_done), .loading(loading),
    .last_step(last_step), .trap_ref(trap_ref), .trap_q(trap_q), .trap_hit(trap_hit),
    .node_bits(node_bits), .step(step), .running(running), .cycle_done(cycle_done),
    .target_in(target_in), .target_out(target_out));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    n_trap_hits += $countones(trap_hit);
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
    $display("%-36s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  function automatic int ff(int f);
    return FF_REF + f;
  endfunction

  function automatic int add(fn_e f, int a = -1, int b = -1, int c = -1, int d = -1);
    int id;
    id = n_nodes;
    n_nodes++;
    fn[id] = f;
    ins[id][0] = a; ins[id][1] = b; ins[id][2] = c; ins[id][3] = d;
    rom_bit[id] = 0;
    return id;
  endfunction

  // LUT node functions, inputs in the order given to add()
  function automatic logic eval(fn_e f, logic a, logic b, logic c, logic d);
    case (f)
      F_LOAD:   return a & !b & !c;                       // start & !busy & !done
      F_SUM0:   return a ^ (b & c);                       // P[4] + A[0]&P[0]
      F_CARRY0: return a & b & c;
      F_SUM:    return a ^ (b & c) ^ d;                   // with carry in d
      F_CARRY:  return (a & b & c) | (a & d) | (b & c & d);
      F_MUX:    return a ? b : c;
      F_PLOAD:  return !a & (b ? c : d);                  // load clears, busy takes c, else hold d
      F_CNT0:   return !a & (b ? !c : c);
      F_CNT1:   return !a & (b ? (d ^ c) : d);
      F_BUSY:   return a | (b & !(c & d));                // load, or busy until cnt == 3
      F_LAST:   return a & b & c;                         // busy and cnt == 3
      F_DONE:   return a | (b & c);                       // set on the last busy clock, kept while start
      default:  return 1'b0;
    endcase
  endfunction

  function automatic logic [15:0] table_of(fn_e f);
    logic [15:0] t;
    logic a, b, c, d;
    for (int i = 0; i < 16; i++) begin
      {d, c, b, a} = 4'(i);
      t[i] = eval(f, a, b, c, d);
    end
    return t;
  endfunction

  task automatic build_netlist();
    int mc [4];
    int mp [4];
    int s  [4];
    int c  [5];
    int h  [4];
    int start, ld, lst;
    n_nodes = 0;
    for (int i = 0; i < 4; i++) begin
      mc[i] = add(F_ROM); rom_bit[mc[i]] = IN_MC + i;
      mp[i] = add(F_ROM); rom_bit[mp[i]] = IN_MP + i;
    end
    start = add(F_ROM); rom_bit[start] = IN_START;
    ld    = add(F_LOAD, start, ff(FF_BUSY), ff(FF_DONE));
    // adder P[7:4] + (P[0] ? A : 0)
    s[0] = add(F_SUM0,   ff(FF_P + 4), ff(FF_A), ff(FF_P));
    c[1] = add(F_CARRY0, ff(FF_P + 4), ff(FF_A), ff(FF_P));
    for (int i = 1; i < 4; i++) begin
      s[i]   = add(F_SUM,   ff(FF_P + 4 + i), ff(FF_A + i), ff(FF_P), c[i]);
      c[i+1] = add(F_CARRY, ff(FF_P + 4 + i), ff(FF_A + i), ff(FF_P), c[i]);
    end
    // next-state logic
    for (int i = 0; i < 4; i++) d_node[FF_A + i] = add(F_MUX, ld, mc[i], ff(FF_A + i));
    for (int j = 0; j < 3; j++) h[j] = add(F_MUX, ff(FF_BUSY), ff(FF_P + j + 1), ff(FF_P + j));
    h[3] = add(F_MUX, ff(FF_BUSY), s[0], ff(FF_P + 3));
    for (int j = 0; j < 4; j++) d_node[FF_P + j] = add(F_MUX, ld, mp[j], h[j]);
    for (int i = 1; i < 4; i++)
      d_node[FF_P + 3 + i] = add(F_PLOAD, ld, ff(FF_BUSY), s[i], ff(FF_P + 3 + i));
    d_node[FF_P + 7]  = add(F_PLOAD, ld, ff(FF_BUSY), c[4], ff(FF_P + 7));
    d_node[FF_C0]     = add(F_CNT0, ld, ff(FF_BUSY), ff(FF_C0));
    d_node[FF_C1]     = add(F_CNT1, ld, ff(FF_BUSY), ff(FF_C0), ff(FF_C1));
    d_node[FF_BUSY]   = add(F_BUSY, ld, ff(FF_BUSY), ff(FF_C0), ff(FF_C1));
    lst               = add(F_LAST, ff(FF_BUSY), ff(FF_C0), ff(FF_C1));
    d_node[FF_DONE]   = add(F_DONE, lst, ff(FF_DONE), start);
  endtask

  // Greedy placement: earliest step, then fewest new pickups, then lowest processor
  task automatic schedule();
    int best_p, best_s, best_nc, s, smin, u, m, pm, nc, ncl;
    int cu [4];
    int cp [4];
    bit ok;
    for (int p = 0; p < NP; p++)
      for (int t = 0; t < 128; t++) begin
        occ[p][t]  = 1'b0;
        pick[p][t] = -1;
      end
    last = SB;
    for (int n = 0; n < n_nodes; n++) begin
      best_p = -1; best_s = 1000; best_nc = 99;
      for (int p = 0; p < NP; p++) begin
        ok = 1'b1; smin = SB; nc = 0; ncl = 0;
        for (int k = 0; k < 4; k++) begin
          m = ins[n][k];
          if (m >= 0 && m < FF_REF) begin
            if (node_p[m] == p) begin
              if (node_s[m] + 1 > smin) smin = node_s[m] + 1;
            end else begin
              u  = node_s[m] + 1;
              pm = node_p[m];
              if (pick[p][u] != -1 && pick[p][u] != pm) ok = 1'b0;
              for (int j = 0; j < ncl; j++)
                if (cu[j] == u && cp[j] != pm) ok = 1'b0;
              if (pick[p][u] == -1) nc++;
              cu[ncl] = u; cp[ncl] = pm;
              ncl++;
              if (u + 1 > smin) smin = u + 1;
            end
          end
        end
        if (ok) begin
          s = smin;
          while (s < DATA_ADDR && occ[p][s]) s++;
          if (s < DATA_ADDR && (s < best_s || (s == best_s && nc < best_nc))) begin
            best_p = p; best_s = s; best_nc = nc;
          end
        end
      end
      if (best_p < 0) begin
        failures++;
        $display("FAIL node %0d cannot be placed", n);
      end else begin
        for (int k = 0; k < 4; k++) begin
          m = ins[n][k];
          if (m >= 0 && m < FF_REF && node_p[m] != best_p) begin
            if (pick[best_p][node_s[m] + 1] == -1) n_pickups++;
            pick[best_p][node_s[m] + 1] = node_p[m];
          end
        end
        occ[best_p][best_s] = 1'b1;
        node_p[n] = best_p;
        node_s[n] = best_s;
        if (best_s > last) last = best_s;
      end
    end
  endtask

  // Instruction words for one operand pair
  task automatic make_program();
    int p, s, m;
    logic [3:0] src;
    logic [6:0] adr [4];
    for (int q = 0; q < NP; q++)
      for (int t = 0; t < 128; t++) begin
        rm.lmem[q][t] = l_nop();
        rm.rmem[q][t] = '0;
        if (t >= 1 && t <= NF) rm.rmem[q][t][R_NODE_LSB +: NODE_W] = 6'(node_p[d_node[t-1]]);
        else if (pick[q][t] >= 0) rm.rmem[q][t][R_NODE_LSB +: NODE_W] = 6'(pick[q][t]);
      end
    // flip-flop re-emission: RAMREF of the next-state LUT's LDR word
    for (int f = 0; f < NF; f++) begin
      p = node_p[d_node[f]];
      rm.lmem[p][f] = l_ramref();
      rm.rmem[p][f][STEP_W-1:0] = 7'(node_s[d_node[f]]);
      rm.rmem[p][f][R_SRC_LSB]  = 1'b0;
    end
    for (int n = 0; n < n_nodes; n++) begin
      p = node_p[n];
      s = node_s[n];
      if (fn[n] == F_ROM) rm.lmem[p][s] = l_romref(7'(DATA_ADDR), 4'(rom_bit[n]));
      else begin
        rm.lmem[p][s] = l_lutop(table_of(fn[n]));
        for (int k = 0; k < 4; k++) begin
          m = ins[n][k];
          if (m < 0)                 begin src[k] = 1'b0; adr[k] = 7'd0; end
          else if (m >= FF_REF)      begin src[k] = 1'b1; adr[k] = 7'(m - FF_REF + 1); end
          else if (node_p[m] == p)   begin src[k] = 1'b0; adr[k] = 7'(node_s[m]); end
          else                       begin src[k] = 1'b1; adr[k] = 7'(node_s[m] + 1); end
        end
        rm.rmem[p][s][27:0]               = {adr[3], adr[2], adr[1], adr[0]};
        rm.rmem[p][s][R_SRC_LSB +: 4]     = src;
      end
    end
    sync_inputs();
  endtask

  // The model's copy of the input word, as the I/O interface writes it
  task automatic sync_inputs();
    for (int q = 0; q < NP; q++) begin
      rm.lmem[q][DATA_ADDR] = l_nop();
      rm.rmem[q][DATA_ADDR] = 38'(target_in[q]);
    end
  endtask

  task automatic set_inputs(logic [3:0] mc, logic [3:0] mp, logic start);
    for (int q = 0; q < NP; q++) target_in[q] = 16'({start, mp, mc});
  endtask

  task automatic download();
    int p, s;
    @(negedge clk) dl_start = 1'b1;
    @(negedge clk) dl_start = 1'b0;
    p = 0; s = 0;
    while (p < NP) begin
      prog_left  = rm.lmem[p][s];
      prog_right = rm.rmem[p][s];
      prog_valid = 1'b1;
      @(posedge clk);
      if (prog_ready) begin
        s++;
        if (s == 128) begin s = 0; p++; end
      end
      #1;
    end
    prog_valid = 1'b0;
    while (!running) begin
      @(posedge clk); #1;
    end
    rm.reset();
  endtask

  // One emulated clock: every step, the bus against the reference model;
  // the re-emitted flip-flop values are collected in seen.
  task automatic run_cycle(output logic [NF-1:0] seen);
    step_t s;
    seen = '0;
    for (int i = 0; i <= last; i++) begin
      s = step;
      check(64'(s), 64'(i), "step sequence");
      rm.step(s);
      repeat (9) @(posedge clk);
      #1;
      check(64'(node_bits), rm.out_vec(), "interconnect bus");
      if (int'(s) < NF) seen[s] = node_bits[node_p[d_node[s]]];
    end
  endtask

  // Behavioural multiplier: state {done, busy, cnt[1:0], P[7:0], A[3:0]}
  function automatic logic [NF-1:0] mult_next(logic [NF-1:0] st, logic [3:0] mc, logic [3:0] mp,
                                              logic start);
    logic [3:0] a;
    logic [7:0] p;
    logic [1:0] cnt;
    logic busy, done;
    logic [4:0] sum;
    {done, busy, cnt, p, a} = st;
    if (start && !busy && !done) begin
      a = mc; p = {4'b0, mp}; cnt = 2'd0; busy = 1'b1;
    end else if (busy) begin
      sum = {1'b0, p[7:4]} + (p[0] ? {1'b0, a} : 5'd0);
      p   = {sum, p[3:1]};
      if (cnt == 2'd3) begin busy = 1'b0; done = 1'b1; end
      cnt = cnt + 2'd1;
    end else if (!start) done = 1'b0;
    return {done, busy, cnt, p, a};
  endfunction

  // n emulated clocks. st is the expected state at the start of the next
  // clock; in_mem is the input word the engine holds.
  task automatic emulate(int n, inout logic [NF-1:0] st, inout logic [8:0] in_mem,
                         output logic [NF-1:0] seen);
    for (int k = 0; k < n; k++) begin
      run_cycle(seen);
      check(64'(seen), 64'(st), "emulated flip-flops");
      for (int p = 0; p < NP; p++)
        if (trap_ff[p] >= 0) check(64'(trap_q[p]), 64'(st[trap_ff[p]]), "product bit trap");
      st = mult_next(st, in_mem[3:0], in_mem[7:4], in_mem[8]);
      // the interface has just written the current target inputs
      in_mem = target_in[0][8:0];
      sync_inputs();
    end
  endtask

  initial begin
    logic [NF-1:0] st, seen;
    logic [8:0] in_mem;
    logic [3:0] mc, mp;
    int n_lut, n_used;
    rm = new(NP);
    rst = 1'b1; dl_start = 1'b0; prog_valid = 1'b0; prog_left = '0; prog_right = '0;
    build_netlist();
    schedule();
    last_step = 7'(last);
    n_lut = 0;
    for (int n = 0; n < n_nodes; n++) if (fn[n] != F_ROM) n_lut++;
    n_used = 0;
    for (int p = 0; p < NP; p++) begin
      trap_ff[p]  = -1;
      trap_ref[p] = 7'd127;
      for (int t = 0; t < 128; t++) if (occ[p][t]) begin n_used++; break; end
    end
    // each processor's trap watches the lowest product bit it re-emits
    for (int f = FF_P + 7; f >= FF_P; f--) begin
      trap_ff[node_p[d_node[f]]]  = f;
      trap_ref[node_p[d_node[f]]] = 7'(f);
    end
    $display("multiplier: %0d LUT nodes, %0d input bits, %0d processors, %0d steps per emulated clock",
             n_lut, n_nodes - n_lut, n_used, last + 1);
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    set_inputs(4'd0, 4'd0, 1'b0);
    make_program();
    download();
    in_mem = target_in[0][8:0];
    st = '0;
    emulate(4, st, in_mem, seen);
    check(64'(seen), 64'(0), "idle while Start is low");
    n_idle_runs++;
    for (int t = 0; t < 8; t++) begin
      case (t)
        0:       begin mc = 4'd15; mp = 4'd15; end
        1:       begin mc = 4'd0;  mp = 4'd9;  end
        2:       begin mc = 4'd1;  mp = 4'd1;  end
        3:       begin mc = 4'd13; mp = 4'd11; end
        default: begin mc = 4'($urandom()); mp = 4'($urandom()); end
      endcase
      set_inputs(mc, mp, 1'b1);
      emulate(8, st, in_mem, seen);
      check(64'(seen[FF_P +: 8]), 64'(mc * mp), "product");
      check(64'(seen[FF_DONE]), 64'(1), "done");
      $display("%0d x %0d: product %0d done %0d", mc, mp, seen[FF_P +: 8], seen[FF_DONE]);
      n_products++;
      set_inputs(mc, mp, 1'b0);
      emulate(3, st, in_mem, seen);
      check(64'(seen[FF_DONE]), 64'(0), "done cleared after Start falls");
    end

    count(n_products,     "multiplications checked");
    count(n_idle_runs,    "runs with Start low");
    count(n_pickups,      "scheduled bit-ins from other processors");
    count(rm.n_remote_in, "bit-ins from other processors");
    count(rm.n_lutop,     "LUTOP executed");
    count(rm.n_romref,    "ROMREF executed");
    count(rm.n_ramref,    "RAMREF executed");
    count(rm.n_state_read,"reads of previous-cycle data");
    count(n_trap_hits,    "trap captures");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
