// hep_download_manager: download manager module (DMM) of the emulation
// engine.
//
// Before emulation, the DMM writes the emulation program into the left and
// right control memories of every processor, then releases the processors
// from reset so that they all start at step 0 together. Processors are held
// in reset (halted) from power-up and for the whole download.
//
// The program arrives as a stream of instruction word pairs (left, right)
// with a valid/ready handshake, processor 0 steps 0..127 first, then
// processor 1, and so on. Each word pair takes three clocks: accept
// (prog_ready high), write (the processor's write enable high), and hold,
// during which the address advances. A full download of 64 x 128 pairs thus
// takes 24576 clocks, 127 us at 193 MHz, the upload time reported for the
// design; the three-clock write also matches its simulated control-memory
// write waveforms. The stream format and handshake are this design's own.
// A start pulse (dl_start) begins a download from any state. done pulses on
// the clock the processors leave reset.
module hep_download_manager
  import hep_pkg::*;
#(
  parameter int unsigned N_PROC = 64
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              dl_start,
  input  logic              prog_valid,
  output logic              prog_ready,
  input  left_word_t        prog_left,
  input  right_word_t       prog_right,
  // control-memory write bus to the processors
  output logic [N_PROC-1:0] dl_we,
  output step_t             dl_addr,
  output left_word_t        dl_left,
  output right_word_t       dl_right,
  // processor control
  output logic              proc_rst,
  output logic              loading,
  output logic              running,
  output logic              done
);
  typedef enum logic [2:0] {
    D_IDLE, D_ACCEPT, D_WRITE, D_HOLD, D_START, D_RUN
  } dmm_state_e;

  localparam int unsigned PW = (N_PROC > 1) ? $clog2(N_PROC) : 1;

  dmm_state_e       st;
  logic [PW-1:0]    proc_idx;
  logic             last_word;

  assign last_word  = (32'(proc_idx) == N_PROC - 1) && (dl_addr == step_t'(DEPTH - 1));
  assign prog_ready = (st == D_ACCEPT);
  assign loading    = (st == D_ACCEPT) || (st == D_WRITE) || (st == D_HOLD);
  assign running    = (st == D_RUN);
  assign proc_rst   = rst || (st != D_RUN);
  assign done       = (st == D_START);

  always_comb begin
    dl_we = '0;
    if (st == D_WRITE) dl_we[proc_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= D_IDLE;
      proc_idx <= '0;
      dl_addr  <= '0;
      dl_left  <= '0;
      dl_right <= '0;
    end else if (dl_start) begin
      st       <= D_ACCEPT;
      proc_idx <= '0;
      dl_addr  <= '0;
    end else begin
      unique case (st)
        D_ACCEPT: if (prog_valid) begin
          dl_left  <= prog_left;
          dl_right <= prog_right;
          st       <= D_WRITE;
        end
        D_WRITE: st <= D_HOLD;
        D_HOLD: begin
          if (last_word) begin
            st <= D_START;
          end else begin
            st <= D_ACCEPT;
            if (dl_addr == step_t'(DEPTH - 1)) begin
              dl_addr  <= '0;
              proc_idx <= proc_idx + 1'b1;
            end else begin
              dl_addr <= dl_addr + 1'b1;
            end
          end
        end
        D_START: st <= D_RUN;
        default: ;  // D_IDLE, D_RUN: wait for dl_start
      endcase
    end
  end
endmodule
