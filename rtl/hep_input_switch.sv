// hep_input_switch: the reconfigurable multiplexer in front of each HEP
// processor (its share of the non-blocking interconnect).
//
// The node bit-out of every processor of the emulation module arrives on a
// bus, bit i from processor i (a processor also sees its own output). The
// 6-bit node address of the current instruction selects one bus bit as the
// processor's node bit-in. With fewer than 64 processors, addresses beyond
// the last processor read 0 (a choice of this design). Combinational.
module hep_input_switch #(
  parameter int unsigned N_IN = 64   // processors on the bus
) (
  input  logic [N_IN-1:0] bus,       // node bit-outs of all processors
  input  logic [5:0]      node_addr, // selected processor
  output logic            bit_in     // node bit-in
);
  always_comb begin
    if (32'(node_addr) < N_IN) bit_in = bus[node_addr];
    else                       bit_in = 1'b0;
  end
endmodule
