// hep_target_io: target-system I/O interface of the emulation engine. It
// connects the emulated design to the system the design will later sit in.
//
// Inputs. Each processor gets IN_W input bits from the target system. They
// are written as the low bits of the right control word at IO_ADDR, with a
// NOP left word, through the control memories' download write port. An
// emulated design reads an input with a ROMREF of that word and bit. A write
// happens:
//   * on the clock where the download manager releases the processors
//     (dl_done), so the first emulated clock already sees the inputs;
//   * in the last system clock of every emulation cycle (cycle_done while
//     running), so every emulated clock sees the inputs sampled at its
//     start, and they stay constant for the whole cycle.
// No instruction reads the control memories in that clock, so the write
// cannot tear a read. A program must leave step IO_ADDR unused or end
// before it. If it is executed, it is a NOP.
//
// Outputs. target_out holds the signal-trap values, registered one clock
// after the end of each emulation cycle. That is after the last step's trap
// capture, so all outputs change together, once per emulated clock.
//
// The document gives this block's task: take samples from the target system
// and hand them to the processors in the right emulation cycles. It does not
// give how. Using ROMREF data words, the write port and the cycle-boundary
// timing are this design's choices, as is the output register.
//
// Most output bits are plain wiring by design. io_right is target_in placed in
// a control word with the unused upper bits zero, and io_addr is the constant
// IO_ADDR. The block's logic is the write timing and the output register.
module hep_target_io
  import hep_pkg::*;
#(
  parameter int unsigned N_PROC  = 64,   // processors
  parameter int unsigned IN_W    = 16,   // input bits per processor (ROMREF data width)
  parameter int unsigned IO_ADDR = 127   // control word reserved for inputs
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              running,
  input  logic              dl_done,     // processors released after a download
  input  logic              cycle_done,  // last clock of an emulation cycle
  // target system side
  input  logic [IN_W-1:0]   target_in  [N_PROC],
  output logic [N_PROC-1:0] target_out,
  // engine side
  input  logic [N_PROC-1:0] trap_q,
  output logic              io_we,       // write all processors' input word
  output step_t             io_addr,
  output right_word_t       io_right [N_PROC]
);
  logic cycle_end_q;

  assign io_we   = dl_done || (cycle_done && running);
  assign io_addr = step_t'(IO_ADDR);

  for (genvar i = 0; i < N_PROC; i++) begin : g_word
    assign io_right[i] = right_word_t'(target_in[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cycle_end_q <= 1'b0;
      target_out  <= '0;
    end else begin
      cycle_end_q <= cycle_done && running;
      if (cycle_end_q) target_out <= trap_q;
    end
  end
endmodule
