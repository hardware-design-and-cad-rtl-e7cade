// hep_signal_trap: signal trap attached to one HEP processor.
//
// A 7-bit comparator compares the processor's program counter with a
// user-set reference step. When they are equal, the processor's node bit-out
// is captured in a flip-flop, so the value one emulated signal takes at a
// chosen step can be read later. The structure (comparator plus D flip-flop)
// follows the design; instead of clocking the flip-flop with the comparator
// output, this version uses the system clock with an enable, and samples only
// in the last clock of the instruction cycle (sample high), when node_bit_out
// already holds the result of the step the counter still shows. hit pulses
// when a capture happens. Reset clears the flip-flop.
module hep_signal_trap
  import hep_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  step_t pc,           // processor program counter
  input  step_t ref_step,     // reference value set by the user
  input  logic  sample,       // last clock of the instruction cycle
  input  logic  node_bit_out, // processor output
  output logic  q,            // trapped value
  output logic  hit           // capture on this clock
);
  assign hit = sample && (pc == ref_step);

  always_ff @(posedge clk) begin
    if (rst)      q <= 1'b0;
    else if (hit) q <= node_bit_out;
  end
endmodule
