// tb_hep_data_ram: checks the 128x1 data memory against an array model:
// clear on reset, random writes with reads at random addresses, the
// asynchronous read (a written bit readable on the next cycle), and that
// we low leaves the memory unchanged.
module tb_hep_data_ram;
  logic       clk = 1'b0, rst, we, wdata, rdata;
  logic [6:0] waddr, raddr;
  logic       model [128];
  int checks = 0, failures = 0;
  int cyc = 0;

  hep_data_ram dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
                    .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(logic exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: raddr=%0d rdata=%b exp=%b", what, raddr, rdata, exp);
    end
  endtask

  initial begin
    rst = 1'b1; we = 1'b0; wdata = 1'b0; waddr = '0; raddr = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int a = 0; a < 128; a++) begin
      model[a] = 1'b0;
      raddr = 7'(a); #1 check(1'b0, "cleared");
    end
    for (int t = 0; t < 2000; t++) begin
      we    = 1'($urandom());
      waddr = 7'($urandom());
      wdata = 1'($urandom());
      raddr = 7'($urandom());
      #1 check(model[raddr], "read");
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      raddr = waddr;
      #1 check(model[raddr], "read after write");
    end
    // reset clears again
    rst = 1'b1; we = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    for (int a = 0; a < 128; a++) begin
      raddr = 7'(a); #1 check(1'b0, "cleared again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
