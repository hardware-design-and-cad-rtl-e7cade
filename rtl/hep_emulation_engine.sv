// hep_emulation_engine: top level of the HEP-based logic emulation engine.
//
// A processor-based emulator: the design under test is compiled into up to
// 128 four-input LUT operations per processor, and N_PROC (64) processors
// execute them in lock-step, exchanging one bit per processor per
// instruction over a non-blocking interconnect. One pass of the program
// counter from 0 to last_step emulates one clock cycle of the design; bits
// kept in the data memories from one pass to the next are its flip-flops.
//
// Contents: the download manager, which streams the program into all control
// memories and then starts the processors; one emulation module (processors
// plus interconnect); one signal trap per processor, capturing that
// processor's output at a user-chosen step (trap_ref); and the target-system
// I/O interface. That interface writes IN_W input bits per processor
// (target_in) into control word IO_ADDR of each processor at the start of
// every emulated clock, for ROMREF to read. It also drives target_out, the
// trapped values, once per emulated clock. Reading trapped values back to a
// user is outside this top: the traps' values and the whole interconnect
// bus are brought out as ports.
//
// Timing: a download takes 3 clocks per word pair; after it, done pulses and
// the processors run, one instruction per 9 clocks, so one emulation cycle
// takes 9 x (last_step + 1) clocks. step and cycle_done come from
// processor 0 (all program counters are equal).
module hep_emulation_engine
  import hep_pkg::*;
#(
  parameter int unsigned N_PROC  = 64,
  parameter int unsigned IN_W    = 16,   // target inputs per processor
  parameter int unsigned IO_ADDR = 127   // control word that holds them
) (
  input  logic              clk,
  input  logic              rst,
  // program download
  input  logic              dl_start,
  input  logic              prog_valid,
  output logic              prog_ready,
  input  left_word_t        prog_left,
  input  right_word_t       prog_right,
  output logic              dl_done,
  output logic              loading,
  // emulation
  input  step_t             last_step,
  input  step_t             trap_ref [N_PROC],
  output logic [N_PROC-1:0] trap_q,
  output logic [N_PROC-1:0] trap_hit,
  output logic [N_PROC-1:0] node_bits,
  output step_t             step,
  output logic              running,
  output logic              cycle_done,
  // target system
  input  logic [IN_W-1:0]   target_in [N_PROC],
  output logic [N_PROC-1:0] target_out
);
  logic [N_PROC-1:0] dl_we;
  step_t             dl_addr;
  left_word_t        dl_left;
  right_word_t       dl_right;
  logic              proc_rst;
  step_t             pc [N_PROC];
  logic [N_PROC-1:0] sample;
  logic              io_we;
  step_t             io_addr;
  right_word_t       io_right [N_PROC];

  hep_download_manager #(.N_PROC(N_PROC)) u_dmm (
    .clk        (clk),
    .rst        (rst),
    .dl_start   (dl_start),
    .prog_valid (prog_valid),
    .prog_ready (prog_ready),
    .prog_left  (prog_left),
    .prog_right (prog_right),
    .dl_we      (dl_we),
    .dl_addr    (dl_addr),
    .dl_left    (dl_left),
    .dl_right   (dl_right),
    .proc_rst   (proc_rst),
    .loading    (loading),
    .running    (running),
    .done       (dl_done)
  );

  hep_emulation_module #(.N_PROC(N_PROC)) u_module (
    .clk        (clk),
    .rst        (proc_rst),
    .dl_we      (dl_we),
    .dl_addr    (dl_addr),
    .dl_left    (dl_left),
    .dl_right   (dl_right),
    .io_we      (io_we),
    .io_addr    (io_addr),
    .io_right   (io_right),
    .last_step  (last_step),
    .node_bits  (node_bits),
    .pc         (pc),
    .sample     (sample),
    .cycle_done (cycle_done)
  );

  for (genvar i = 0; i < N_PROC; i++) begin : g_trap
    hep_signal_trap u_trap (
      .clk          (clk),
      .rst          (rst),
      .pc           (pc[i]),
      .ref_step     (trap_ref[i]),
      .sample       (sample[i] & running),
      .node_bit_out (node_bits[i]),
      .q            (trap_q[i]),
      .hit          (trap_hit[i])
    );
  end

  hep_target_io #(.N_PROC(N_PROC), .IN_W(IN_W), .IO_ADDR(IO_ADDR)) u_io (
    .clk        (clk),
    .rst        (rst),
    .running    (running),
    .dl_done    (dl_done),
    .cycle_done (cycle_done),
    .target_in  (target_in),
    .target_out (target_out),
    .trap_q     (trap_q),
    .io_we      (io_we),
    .io_addr    (io_addr),
    .io_right   (io_right)
  );

  assign step = pc[0];
endmodule
