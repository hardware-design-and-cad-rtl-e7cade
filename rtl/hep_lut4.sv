// hep_lut4: reconfigurable 4-input look-up table of the HEP processor.
//
// A 16x1 logic function table is read by a 16-to-1 multiplexer whose four
// select lines are the operands A..D, so any of the 65536 functions of four
// inputs can be produced. Select line 0 (operand A) is the least significant
// bit of the table index: f = table[{D,C,B,A}], and table bit 15 is the
// leftmost bit of the 16-bit value. This ordering matches the simulated LUT
// waveform of the design (table 0001001000110100 with inputs 0..3 = 1,0,1,0
// gives 1). The table register itself lives in the control unit, which loads
// it from the left control word (LUTOP) or from a right control word (ROMREF).
// Purely combinational.
module hep_lut4 (
  input  logic [15:0] table_bits,  // logic function table
  input  logic [3:0]  sel,         // {D, C, B, A}
  output logic        f            // function bit-out
);
  always_comb f = table_bits[sel];
endmodule
