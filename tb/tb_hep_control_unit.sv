// tb_hep_control_unit: runs the control unit against memory models held in
// the testbench (left/right control memories, LDR, IDR) and a random
// interconnect bus, with 600 random instructions of all four types.
// For every clock of every instruction cycle it checks the one-hot state
// (FETCH first, DONE ninth), that IDR is written only in the 6th clock with
// the bus bit of the node address, that LDR is written only in the 8th clock
// and only for LUTOP and ROMREF, that the program counter is advanced only
// in the 9th clock, and that the node bit-out equals the result computed by
// the testbench from the instruction fields (and is kept by NOP).
module tb_hep_control_unit;
  import hep_pkg::*;
  logic        clk = 1'b0, rst;
  step_t       pc, rcm_raddr, dr_raddr;
  left_word_t  lm [128];
  right_word_t rm [128];
  logic        ldr [128], idr [128];
  left_word_t  lcm_rdata;
  right_word_t rcm_rdata;
  logic        ldr_rdata, idr_rdata, ldr_we, idr_we, ldr_wdata, idr_wdata, nbo, pc_inc, sample;
  logic [63:0] bus;
  state_e      state;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_op [4];

  hep_control_unit dut (
    .clk(clk), .rst(rst), .pc(pc), .lcm_rdata(lcm_rdata), .rcm_raddr(rcm_raddr),
    .rcm_rdata(rcm_rdata), .dr_raddr(dr_raddr), .ldr_rdata(ldr_rdata), .idr_rdata(idr_rdata),
    .ldr_we(ldr_we), .idr_we(idr_we), .ldr_wdata(ldr_wdata), .idr_wdata(idr_wdata), .bus(bus),
    .node_bit_out(nbo), .pc_inc(pc_inc), .sample(sample), .state(state));

  assign lcm_rdata = lm[pc];
  assign rcm_rdata = rm[rcm_raddr];
  assign ldr_rdata = ldr[dr_raddr];
  assign idr_rdata = idr[dr_raddr];

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (ldr_we) ldr[pc] <= ldr_wdata;
      if (idr_we) idr[pc] <= idr_wdata;
      if (pc_inc) pc <= pc + 1'b1;
    end
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s at pc=%0d: got=%0h exp=%0h", what, pc, got, exp);
    end
  endtask

  initial begin
    logic        exp_out, res;
    logic [3:0]  idx;
    left_word_t  lw;
    right_word_t rw;
    logic [1:0]  op;
    int          node;
    for (int a = 0; a < 128; a++) begin
      lm[a]  = 18'($urandom());
      rm[a]  = 38'({$urandom(), $urandom()});
      ldr[a] = 1'($urandom());
      idr[a] = 1'($urandom());
    end
    pc = '0; bus = '0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    exp_out = 1'b0;
    check(32'(nbo), 0, "output after reset");
    for (int i = 0; i < 600; i++) begin
      // expected result, from the memories as they are before this instruction
      lw = lm[pc]; rw = rm[pc]; op = lw[17:16];
      node = int'(rw[37:32]);
      bus = {$urandom(), $urandom()};
      for (int k = 0; k < 4; k++) begin
        logic [6:0] a;
        a = rw[7*k +: 7];
        idx[k] = rw[28 + k] ? idr[a] : ldr[a];
      end
      case (op)
        2'b01:   res = lw[idx];
        2'b11:   res = rw[28] ? idr[rw[6:0]] : ldr[rw[6:0]];
        2'b10:   res = rm[lw[6:0]][lw[10:7]];
        default: res = exp_out;
      endcase
      n_op[op]++;
      for (int k = 0; k < 9; k++) begin
        check(32'(state), 32'(1) << k, "one-hot state");
        check(32'(idr_we), 32'(k == 5), "IDR write clock");
        if (idr_we) check(32'(idr_wdata), 32'(bus[node]), "node bit-in");
        check(32'(ldr_we), 32'(k == 7 && (op == 2'b01 || op == 2'b10)), "LDR write clock");
        if (ldr_we) check(32'(ldr_wdata), 32'(res), "LDR data");
        check(32'(pc_inc), 32'(k == 8), "pc advance clock");
        check(32'(sample), 32'(k == 8), "sample clock");
        check(32'(nbo), 32'((k == 8) ? res : exp_out), "node bit-out timing");
        @(posedge clk); #1;
      end
      exp_out = res;
      check(32'(nbo), 32'(exp_out), "node bit-out");
    end
    $display("instructions: NOP %0d LUTOP %0d ROMREF %0d RAMREF %0d", n_op[0], n_op[1], n_op[2], n_op[3]);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_op[k] == 0) failures++;
    end
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
