// tb_hep_control_mem: checks the control memory in its right-memory width
// (38 bits) with the download and read sequence of the design's waveform
// (words 2AAAAAAAAA, 3FFFFFFFFF, 0071E0E000 at steps 0..2), then fills all
// 128 words with random data and reads them back in random order, and checks
// the 18-bit left-memory width with the left waveform words.
module tb_hep_control_mem;
  logic        clk = 1'b0, we, wel;
  logic [6:0]  waddr, raddr;
  logic [37:0] wdata, rdata;
  logic [17:0] wdatal, rdatal;
  logic [37:0] model [128];
  int checks = 0, failures = 0;
  int cyc = 0;

  hep_control_mem #(.WIDTH(38)) dut  (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                      .raddr(raddr), .rdata(rdata));
  hep_control_mem #(.WIDTH(18)) dutl (.clk(clk), .we(wel), .waddr(waddr), .wdata(wdatal),
                                      .raddr(raddr), .rdata(rdatal));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(logic [37:0] got, logic [37:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: raddr=%0d got=%h exp=%h", what, raddr, got, exp);
    end
  endtask

  task automatic wr(logic [6:0] a, logic [37:0] d, logic [17:0] dl);
    waddr = a; wdata = d; wdatal = dl; we = 1'b1; wel = 1'b1;
    @(posedge clk); #1 we = 1'b0; wel = 1'b0;
  endtask

  initial begin
    we = 1'b0; wel = 1'b0; raddr = '0;
    wr(7'd0, 38'h2AAAAAAAAA, 18'h2AAAA);
    wr(7'd1, 38'h3FFFFFFFFF, 18'h3FFFF);
    wr(7'd2, 38'h0071E0E000, 18'h00000);
    raddr = 7'd0; #1 check(rdata, 38'h2AAAAAAAAA, "wave 0"); check(38'(rdatal), 38'h2AAAA, "left 0");
    raddr = 7'd1; #1 check(rdata, 38'h3FFFFFFFFF, "wave 1"); check(38'(rdatal), 38'h3FFFF, "left 1");
    raddr = 7'd2; #1 check(rdata, 38'h0071E0E000, "wave 2"); check(38'(rdatal), 38'h00000, "left 2");
    for (int a = 0; a < 128; a++) begin
      model[a] = {$urandom(), $urandom()};
      wr(7'(a), model[a], model[a][17:0]);
    end
    for (int t = 0; t < 1000; t++) begin
      raddr = 7'($urandom());
      // a write with we low must change nothing
      waddr = raddr; wdata = ~model[raddr];
      @(posedge clk); #1;
      check(rdata, model[raddr], "random read");
      check(38'(rdatal), 38'(model[raddr][17:0]), "left read");
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
