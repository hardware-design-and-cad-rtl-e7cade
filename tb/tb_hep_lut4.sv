// tb_hep_lut4: checks the 4-input LUT against a function table evaluated
// independently: the two example functions of the design (the
// F = A'B' + AB + CD function and the two LUTOP values of the LUT
// waveform) and random tables with all 16 input combinations.
module tb_hep_lut4;
  logic [15:0] tbl;
  logic [3:0]  sel;
  logic        f;
  int checks = 0, failures = 0;

  hep_lut4 dut (.table_bits(tbl), .sel(sel), .f(f));

  task automatic check(logic exp, string what);
    checks++;
    if (f !== exp) begin
      failures++;
      $display("FAIL %s: table=%h sel=%b f=%b exp=%b", what, tbl, sel, f, exp);
    end
  endtask

  initial begin
    logic a, b, c, d;
    // F = A'B' + AB + CD, table built from the formula with A as index bit 0
    for (int i = 0; i < 16; i++) begin
      {d, c, b, a} = 4'(i);
      tbl[i] = (!a && !b) || (a && b) || (c && d);
    end
    for (int i = 0; i < 16; i++) begin
      sel = 4'(i);
      {d, c, b, a} = 4'(i);
      #1 check((!a && !b) || (a && b) || (c && d), "figure function");
    end
    // LUT waveform: 1010101010101010 with inputs 0..3 = 1,0,0,1 gives 1;
    // 0001001000110100 with 1,0,1,0 gives 1 and with 0,1,1,0 gives 0
    tbl = 16'b1010101010101010; sel = 4'b1001; #1 check(1'b1, "wave 1");
    tbl = 16'b0001001000110100; sel = 4'b0101; #1 check(1'b1, "wave 2");
    sel = 4'b0110; #1 check(1'b0, "wave 3");
    // random tables
    for (int t = 0; t < 200; t++) begin
      tbl = 16'($urandom());
      for (int i = 0; i < 16; i++) begin
        sel = 4'(i);
        #1 check(((tbl >> i) & 16'h1) != 0, "random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
