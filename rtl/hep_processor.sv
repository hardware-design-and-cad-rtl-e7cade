// hep_processor: hybrid emulation processor (HEP), the building block of the
// emulation engine.
//
// Each processor holds its own emulation program, one instruction per step,
// split over a left (18-bit) and a right (38-bit) control memory, and
// executes one instruction every nine system clocks: a 4-input LUT function
// of bits from its two data memories (LUTOP), a read of one data-memory bit
// (RAMREF), a read of one static bit from the right control memory (ROMREF),
// or nothing (NOP). Each instruction produces one node bit-out, a copy of
// which goes to the Local Data RAM (LDR) at the current step, and takes in one
// node bit-in from any processor on the interconnect bus, which goes to the
// Input Data RAM (IDR) at the current step. There are no jumps: the program
// counter steps from 0 to last_step and starts over, one pass per clock
// cycle of the emulated design.
//
// Interface: the control-memory write ports (dl_*) are driven by the download
// manager while the processor is held in reset. rst restarts the program at
// step 0 and clears both data memories. node_bit_out changes only in the
// OUT state (8th clock) of an instruction cycle. sample marks the last clock
// of each instruction cycle, when pc still shows the step whose result is on
// node_bit_out. cycle_done pulses on the last clock of an emulation cycle.
// The split into program counter, control memories, data memories and a
// control unit holding the LUT and input switch follows the design's module
// hierarchy.
module hep_processor
  import hep_pkg::*;
#(
  parameter int unsigned N_PROC = 64
) (
  input  logic              clk,
  input  logic              rst,
  // program download
  input  logic              dl_we,
  input  step_t             dl_addr,
  input  left_word_t        dl_left,
  input  right_word_t       dl_right,
  // emulation
  input  step_t             last_step,
  input  logic [N_PROC-1:0] bus,
  output logic              node_bit_out,
  output step_t             pc,
  output logic              sample,
  output logic              cycle_done
);
  left_word_t  lcm_rdata;
  right_word_t rcm_rdata;
  step_t       rcm_raddr, dr_raddr;
  logic        ldr_rdata, idr_rdata, ldr_we, idr_we, ldr_wdata, idr_wdata;
  logic        pc_inc;
  state_e      state;

  hep_program_counter u_pc (
    .clk       (clk),
    .rst       (rst),
    .inc       (pc_inc),
    .last_step (last_step),
    .pc        (pc),
    .wrap      (cycle_done)
  );

  hep_control_mem #(.WIDTH(LEFT_W), .DEPTH(DEPTH)) u_left_mem (
    .clk   (clk),
    .we    (dl_we),
    .waddr (dl_addr),
    .wdata (dl_left),
    .raddr (pc),
    .rdata (lcm_rdata)
  );

  hep_control_mem #(.WIDTH(RIGHT_W), .DEPTH(DEPTH)) u_right_mem (
    .clk   (clk),
    .we    (dl_we),
    .waddr (dl_addr),
    .wdata (dl_right),
    .raddr (rcm_raddr),
    .rdata (rcm_rdata)
  );

  hep_data_ram #(.DEPTH(DEPTH)) u_ldr (
    .clk   (clk),
    .rst   (rst),
    .we    (ldr_we),
    .waddr (pc),
    .wdata (ldr_wdata),
    .raddr (dr_raddr),
    .rdata (ldr_rdata)
  );

  hep_data_ram #(.DEPTH(DEPTH)) u_idr (
    .clk   (clk),
    .rst   (rst),
    .we    (idr_we),
    .waddr (pc),
    .wdata (idr_wdata),
    .raddr (dr_raddr),
    .rdata (idr_rdata)
  );

  hep_control_unit #(.N_PROC(N_PROC)) u_cu (
    .clk          (clk),
    .rst          (rst),
    .pc           (pc),
    .lcm_rdata    (lcm_rdata),
    .rcm_raddr    (rcm_raddr),
    .rcm_rdata    (rcm_rdata),
    .dr_raddr     (dr_raddr),
    .ldr_rdata    (ldr_rdata),
    .idr_rdata    (idr_rdata),
    .ldr_we       (ldr_we),
    .idr_we       (idr_we),
    .ldr_wdata    (ldr_wdata),
    .idr_wdata    (idr_wdata),
    .bus          (bus),
    .node_bit_out (node_bit_out),
    .pc_inc       (pc_inc),
    .sample       (sample),
    .state        (state)
  );
endmodule
