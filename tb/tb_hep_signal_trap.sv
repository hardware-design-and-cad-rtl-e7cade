// tb_hep_signal_trap: drives a program counter through several emulation
// cycles with a random node bit-out at every step and checks that the trap
// holds the value the output had at the reference step, sampled only on the
// last clock of the instruction cycle, and that hit pulses exactly there.
module tb_hep_signal_trap;
  import hep_pkg::*;
  logic  clk = 1'b0, rst, sample, nbo, q, hit;
  step_t pc, ref_step;
  int checks = 0, failures = 0;
  int cyc = 0;

  hep_signal_trap dut (.clk(clk), .rst(rst), .pc(pc), .ref_step(ref_step), .sample(sample),
                       .node_bit_out(nbo), .q(q), .hit(hit));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: pc=%0d ref=%0d got=%b exp=%b", what, pc, ref_step, got, exp);
    end
  endtask

  initial begin
    logic exp_q;
    int   hits;
    rst = 1'b1; sample = 1'b0; nbo = 1'b0; pc = '0; ref_step = 7'd5;
    @(posedge clk); #1 rst = 1'b0;
    check(q, 1'b0, "reset");
    exp_q = 1'b0; hits = 0;
    for (int e = 0; e < 6; e++) begin
      ref_step = 7'($urandom_range(15));
      for (int s = 0; s < 16; s++) begin
        pc = 7'(s);
        for (int k = 0; k < 9; k++) begin
          nbo    = 1'($urandom());   // changes also outside the sample clock
          sample = (k == 8);
          #1 check(hit, sample && (s == ref_step), "hit");
          if (hit) begin
            exp_q = nbo;
            hits++;
          end
          @(posedge clk); #1;
          check(q, exp_q, "trapped value");
        end
      end
    end
    checks++;
    if (hits != 6) begin
      failures++;
      $display("FAIL hits=%0d", hits);
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
