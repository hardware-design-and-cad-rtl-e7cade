// tb_hep_download_manager: streams a random program for all 64 processors
// into the download manager and records every control-memory write it makes.
// Checks: each processor's memories receive exactly the words of the stream
// at the right steps; the processors stay in reset during the download and
// leave it after done; a download with the stream always valid takes three
// clocks per word pair (24576 clocks for 64 x 128); a stream with gaps is
// still written correctly; a second dl_start reloads from running.
module tb_hep_download_manager;
  import hep_pkg::*;
  localparam int NP = 64;
  logic        clk = 1'b0, rst, dl_start, prog_valid, prog_ready, proc_rst, loading, running, done;
  left_word_t  prog_left, dl_left;
  right_word_t prog_right, dl_right;
  logic [NP-1:0] dl_we;
  step_t       dl_addr;
  left_word_t  exp_l [NP][128], got_l [NP][128];
  right_word_t exp_r [NP][128], got_r [NP][128];
  int          n_writes;
  int checks = 0, failures = 0;
  int cyc = 0;

  hep_download_manager dut (
    .clk(clk), .rst(rst), .dl_start(dl_start), .prog_valid(prog_valid), .prog_ready(prog_ready),
    .prog_left(prog_left), .prog_right(prog_right), .dl_we(dl_we), .dl_addr(dl_addr),
    .dl_left(dl_left), .dl_right(dl_right), .proc_rst(proc_rst), .loading(loading),
    .running(running), .done(done));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got=%h exp=%h", what, got, exp);
    end
  endtask

  // write recorder
  always @(posedge clk) begin
    if (dl_we != '0) begin
      n_writes <= n_writes + 1;
      if (!$onehot(dl_we)) begin
        failures++;
        $display("FAIL write enable not one-hot: %h", dl_we);
      end
      for (int p = 0; p < NP; p++)
        if (dl_we[p]) begin
          got_l[p][dl_addr] <= dl_left;
          got_r[p][dl_addr] <= dl_right;
        end
      if (!proc_rst) begin
        failures++;
        $display("FAIL write while processors run");
      end
    end
  end

  task automatic download(bit gaps, output int clocks);
    int p, s, t0;
    for (p = 0; p < NP; p++)
      for (s = 0; s < 128; s++) begin
        exp_l[p][s] = 18'($urandom());
        exp_r[p][s] = 38'({$urandom(), $urandom()});
      end
    n_writes = 0;
    @(negedge clk) dl_start = 1'b1;
    @(posedge clk);
    #1 dl_start = 1'b0;
    t0 = cyc;
    p = 0; s = 0;
    while (p < NP) begin
      prog_left  = exp_l[p][s];
      prog_right = exp_r[p][s];
      prog_valid = gaps ? 1'($urandom_range(3) != 0) : 1'b1;
      @(posedge clk);
      if (prog_valid && prog_ready) begin
        s++;
        if (s == 128) begin s = 0; p++; end
      end
      #1;
    end
    prog_valid = 1'b0;
    while (!done) begin
      check(proc_rst, 1'b1, "reset held during download");
      @(posedge clk); #1;
    end
    clocks = cyc - t0;
    @(posedge clk); #1;
    check(proc_rst, 1'b0, "processors released");
    check(running, 1'b1, "running");
    check(n_writes, NP * 128, "number of writes");
    for (p = 0; p < NP; p++)
      for (s = 0; s < 128; s++) begin
        check(64'(got_l[p][s]), 64'(exp_l[p][s]), "left word");
        check(64'(got_r[p][s]), 64'(exp_r[p][s]), "right word");
      end
  endtask

  initial begin
    int clocks;
    rst = 1'b1; dl_start = 1'b0; prog_valid = 1'b0; prog_left = '0; prog_right = '0;
    repeat (2) @(posedge clk);
    #1 check(proc_rst, 1'b1, "reset before download");
    rst = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(proc_rst, 1'b1, "halted while idle");
    download(1'b1, clocks);
    repeat (5) @(posedge clk);
    download(1'b0, clocks);
    check(clocks, 3 * NP * 128, "download clocks, 3 per word pair");
    $display("download of %0d word pairs took %0d clocks", NP * 128, clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
