// tb_hep_input_switch: checks the 64-to-1 node bit-in multiplexer with the
// bus values and addresses of the design's switch waveform and with random
// buses at every address, then a reduced 8-input switch whose addresses
// beyond the last processor must read 0.
module tb_hep_input_switch;
  logic [63:0] bus;
  logic [5:0]  addr;
  logic        bit_in;
  logic [7:0]  bus8;
  logic        bit_in8;
  int checks = 0, failures = 0;

  hep_input_switch dut (.bus(bus), .node_addr(addr), .bit_in(bit_in));
  hep_input_switch #(.N_IN(8)) dut8 (.bus(bus8), .node_addr(addr), .bit_in(bit_in8));

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: bus=%h addr=%0d got=%b exp=%b", what, bus, addr, got, exp);
    end
  endtask

  initial begin
    bus8 = '0;
    // switch waveform values
    bus = 64'hAAAAAAAAAAAAAAAA;
    addr = 6'b110001; #1 check(bit_in, 1'b1, "wave 49");
    addr = 6'b010100; #1 check(bit_in, 1'b0, "wave 20");
    bus = 64'h764B00056120FFFD;
    addr = 6'b000111; #1 check(bit_in, 1'b1, "wave 7");
    addr = 6'b000001; #1 check(bit_in, 1'b0, "wave 1");
    // one-hot and random buses
    for (int t = 0; t < 64; t++) begin
      bus = 64'h1 << t;
      for (int a = 0; a < 64; a++) begin
        addr = 6'(a); #1 check(bit_in, a == t, "one-hot");
      end
    end
    for (int t = 0; t < 50; t++) begin
      bus  = {$urandom(), $urandom()};
      bus8 = 8'($urandom());
      for (int a = 0; a < 64; a++) begin
        addr = 6'(a);
        #1 check(bit_in, bus[a], "random");
        check(bit_in8, (a < 8) ? bus8[a] : 1'b0, "8-input");
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
