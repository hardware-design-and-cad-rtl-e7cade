// hep_data_ram: 128x1 data memory of an HEP processor. Each processor has two
// of them: the Local Data RAM (LDR), holding a copy of every bit the processor
// produced, and the Input Data RAM (IDR), holding every bit it received from
// the interconnect.
//
// Writes are synchronous: when we is high, wdata is stored at waddr on the
// rising clock edge (the processor drives waddr from its program counter).
// Reads are asynchronous (distributed-RAM style): rdata follows raddr in the
// same cycle, so a write becomes visible on the cycle after it. A bit stored
// at step s stays until step s of the next emulation cycle overwrites it,
// which is how the engine holds the state of emulated flip-flops.
// While rst is high the whole memory is cleared, so emulated state starts at
// 0 after a download; the clear is this design's choice.
module hep_data_ram #(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,    // synchronous clear of all bits
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic [AW-1:0] raddr,
  output logic          rdata
);
  logic [DEPTH-1:0] mem;

  always_ff @(posedge clk) begin
    if (rst)     mem <= '0;
    else if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
