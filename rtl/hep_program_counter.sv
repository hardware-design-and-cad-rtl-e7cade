// hep_program_counter: the program counter register of an HEP processor, a
// local copy of the engine's global sequencer.
//
// Every processor keeps its own 7-bit counter instead of receiving a shared
// one over a 64-way fan-out; since all are reset together and advanced by the
// same instruction-cycle timing, all copies hold the same step value. Reset
// sets the count to 0. When inc is high (once every 9 system clocks, from the
// control unit) the count advances by one; after last_step it returns to 0,
// closing one emulation cycle (one clock cycle of the emulated design), and
// wrap pulses on that clock. last_step is the predetermined maximum step
// (at most 127); how it is supplied is this design's choice (an input).
module hep_program_counter
  import hep_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  inc,
  input  step_t last_step,
  output step_t pc,
  output logic  wrap      // inc at last_step: the emulation cycle ends
);
  assign wrap = inc && (pc == last_step);

  always_ff @(posedge clk) begin
    if (rst)       pc <= '0;
    else if (wrap) pc <= '0;
    else if (inc)  pc <= pc + 1'b1;
  end
endmodule
