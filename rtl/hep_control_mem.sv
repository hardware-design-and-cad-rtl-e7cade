// hep_control_mem: one control (program) memory of an HEP processor, 128
// words deep. The processor has two: the left memory with 18-bit words and
// the right memory with 38-bit words; WIDTH selects which.
//
// The write port is used only by the download manager before emulation
// starts: when we is high, wdata is stored at waddr on the rising clock edge.
// The read port is asynchronous: rdata follows raddr in the same cycle, as
// in the read waveforms of the design, where read data change with the read
// address. The processor registers what it reads. Contents are not reset:
// they persist for the whole emulation run.
module hep_control_mem #(
  parameter int unsigned WIDTH = 38,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
