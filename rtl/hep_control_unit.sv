// hep_control_unit: central control unit and datapath of an HEP processor.
//
// One instruction cycle is nine system clocks, one per state of a one-hot
// state machine (hep_pkg::state_e). Every instruction walks through all nine
// states, so all processors of the engine advance their program counters on
// the same clock whatever they execute; an instruction whose own sequence is
// shorter simply does nothing in the states it does not use. The nine states
// are those of the LUTOP sequence, the longest one; the shorter RAMREF,
// ROMREF and NOP sequences are placed on the same slots:
//
//   state   LUTOP               RAMREF              ROMREF               NOP
//   FETCH   read left/right control words at the program counter into the
//           left and right control registers (all instructions)
//   OPA     table <= left[15:0] bit <= LDR/IDR      table <= right memory
//           operand A            at field A          word at left[6:0]
//   OPB     operand B            -                   bit <= table[left[10:7]]
//   OPC     operand C            -                   -                    -
//   OPD     operand D            -                   -                    -
//   EVAL    bit <= LUT output; node bit-in written into IDR at the program
//           counter (all instructions)
//   XFER    -
//   OUT     node_bit_out <= bit  node_bit_out <= bit node_bit_out <= bit  -
//           LDR[pc] <= bit                           LDR[pc] <= bit
//   DONE    program counter advances (inc high)
//
// Operands are read from LDR or IDR over one shared read address, chosen per
// operand by the source bits of the right word. Because IDR is written in
// EVAL and node bit-outs change only in OUT, a processor always takes in the
// bit-out that the selected processor produced in the previous instruction
// cycle. A NOP leaves node_bit_out unchanged. Which instruction does what
// follows the instruction set and state descriptions of the design; the
// placement of RAMREF/ROMREF/NOP actions on the nine slots, and advancing the
// counter in the last state for every instruction, are this design's choices.
// The LUT and the input switch are instantiated here.
module hep_control_unit
  import hep_pkg::*;
#(
  parameter int unsigned N_PROC = 64     // processors on the interconnect bus
) (
  input  logic              clk,
  input  logic              rst,
  input  step_t             pc,
  // control memories (read ports)
  input  left_word_t        lcm_rdata,   // left memory, addressed by pc
  output step_t             rcm_raddr,   // right memory address
  input  right_word_t       rcm_rdata,
  // data memories: one read address for both, write address is pc
  output step_t             dr_raddr,
  input  logic              ldr_rdata,
  input  logic              idr_rdata,
  output logic              ldr_we,
  output logic              idr_we,
  output logic              ldr_wdata,
  output logic              idr_wdata,
  // interconnect
  input  logic [N_PROC-1:0] bus,
  output logic              node_bit_out,
  // sequencing
  output logic              pc_inc,      // advance the program counter
  output logic              sample,      // last clock of the instruction cycle
  output state_e            state
);
  left_word_t  lcw;        // left control register
  right_word_t rcw;        // right control register
  logic [15:0] lut_table;  // logic function table of the LUT
  logic [3:0]  opnd;       // operands {D, C, B, A}
  logic        tmp_bit;    // temporary buffer for the result
  logic        bit_in;
  logic        lut_out;
  logic [3:0]  lut_sel;
  logic        data_bit;
  opcode_e     op;
  int unsigned opnd_idx;

  assign op = op_of(lcw);

  // State sequence: one state per clock, FETCH after DONE
  always_ff @(posedge clk) begin
    if (rst) state <= ST_FETCH;
    else     state <= (state == ST_DONE) ? ST_FETCH : state_e'({state[CYCLE_CLKS-2:0], 1'b0});
  end

  // Which operand field addresses the data memories in this state
  always_comb begin
    unique case (state)
      ST_OPB:  opnd_idx = 1;
      ST_OPC:  opnd_idx = 2;
      ST_OPD:  opnd_idx = 3;
      default: opnd_idx = 0;
    endcase
  end

  assign dr_raddr = operand_addr(rcw, opnd_idx);
  assign data_bit = operand_src(rcw, opnd_idx) ? idr_rdata : ldr_rdata;

  // The right memory is addressed by the program counter, except when a
  // ROMREF fetches its static data word.
  assign rcm_raddr = (state == ST_OPA && op == OP_ROMREF) ? lcw[STEP_W-1:0] : pc;

  // LUT: operands for LUTOP, bit address for ROMREF
  assign lut_sel = (op == OP_ROMREF) ? lcw[L_BITADR_LSB +: 4] : opnd;

  hep_lut4 u_lut (
    .table_bits (lut_table),
    .sel        (lut_sel),
    .f          (lut_out)
  );

  hep_input_switch #(.N_IN(N_PROC)) u_switch (
    .bus       (bus),
    .node_addr (node_of(rcw)),
    .bit_in    (bit_in)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      lcw          <= '0;
      rcw          <= '0;
      lut_table    <= '0;
      opnd         <= '0;
      tmp_bit      <= 1'b0;
      node_bit_out <= 1'b0;
    end else begin
      unique case (state)
        ST_FETCH: begin
          lcw <= lcm_rdata;
          rcw <= rcm_rdata;
        end
        ST_OPA: begin
          if (op == OP_LUTOP) begin
            lut_table <= lcw[15:0];
            opnd[0]   <= data_bit;
          end
          if (op == OP_RAMREF) tmp_bit   <= data_bit;
          if (op == OP_ROMREF) lut_table <= rcm_rdata[15:0];
        end
        ST_OPB: begin
          if (op == OP_LUTOP)  opnd[1] <= data_bit;
          if (op == OP_ROMREF) tmp_bit <= lut_out;
        end
        ST_OPC: if (op == OP_LUTOP) opnd[2] <= data_bit;
        ST_OPD: if (op == OP_LUTOP) opnd[3] <= data_bit;
        ST_EVAL: if (op == OP_LUTOP) tmp_bit <= lut_out;
        ST_OUT: if (op != OP_NOP) node_bit_out <= tmp_bit;
        default: ;
      endcase
    end
  end

  // Data memory writes: IDR takes the node bit-in every instruction, LDR
  // keeps the output of LUTOP and ROMREF (not RAMREF, and NOP has none).
  assign idr_we    = (state == ST_EVAL);
  assign idr_wdata = bit_in;
  assign ldr_we    = (state == ST_OUT) && (op == OP_LUTOP || op == OP_ROMREF);
  assign ldr_wdata = tmp_bit;

  assign pc_inc = (state == ST_DONE);
  assign sample = (state == ST_DONE);

  // The state register is one-hot at all times
  a_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(state));
endmodule
