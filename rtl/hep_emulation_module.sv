// hep_emulation_module: an emulation module, N_PROC (64) HEP processors and
// the interconnect network between them.
//
// The node bit-out of processor i drives bit i of a shared bus, and every
// processor's own 64-input switch picks its node bit-in from that bus, so the
// network is non-blocking: any processor can take any processor's output in
// every instruction cycle, including its own. All processors are reset
// together and then execute their programs in lock-step, their local program
// counters always equal. A write to the control memories goes to the
// processors whose bit in dl_we is set, at step dl_addr (program download).
// A second writer, the target I/O interface, writes every processor at once
// (io_we): a NOP left word and processor i's own right word io_right[i] at
// step io_addr. The two writers are never active in the same clock, because
// downloads happen with the processors held in reset and input writes only
// when they are released or running. Sharing one write port per memory pair
// this way is this design's choice.
module hep_emulation_module
  import hep_pkg::*;
#(
  parameter int unsigned N_PROC = 64
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [N_PROC-1:0] dl_we,
  input  step_t             dl_addr,
  input  left_word_t        dl_left,
  input  right_word_t       dl_right,
  input  logic              io_we,
  input  step_t             io_addr,
  input  right_word_t       io_right [N_PROC],
  input  step_t             last_step,
  output logic [N_PROC-1:0] node_bits,   // the interconnect bus
  output step_t             pc [N_PROC],
  output logic [N_PROC-1:0] sample,
  output logic              cycle_done   // from processor 0
);
  logic [N_PROC-1:0] wrap;

  for (genvar i = 0; i < N_PROC; i++) begin : g_proc
    logic        we;
    step_t       wa;
    left_word_t  wl;
    right_word_t wr;
    assign we = dl_we[i] || io_we;
    assign wa = dl_we[i] ? dl_addr  : io_addr;
    assign wl = dl_we[i] ? dl_left  : left_word_t'(0);
    assign wr = dl_we[i] ? dl_right : io_right[i];

    hep_processor #(.N_PROC(N_PROC)) u_hep (
      .clk          (clk),
      .rst          (rst),
      .dl_we        (we),
      .dl_addr      (wa),
      .dl_left      (wl),
      .dl_right     (wr),
      .last_step    (last_step),
      .bus          (node_bits),
      .node_bit_out (node_bits[i]),
      .pc           (pc[i]),
      .sample       (sample[i]),
      .cycle_done   (wrap[i])
    );
  end

  assign cycle_done = wrap[0];

  // All processors step in synchronism
  a_lockstep: assert property (@(posedge clk) disable iff (rst) (wrap == '0) || (&wrap));
  // Download and input writes never collide
  a_one_writer: assert property (@(posedge clk) !(io_we && (dl_we != '0)));
endmodule
