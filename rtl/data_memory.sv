// data_memory: the 64-bit-wide data memory behind the DATA LARs.
//
// DEPTH lines of 64 bits (16 in the processor), one line per 8-byte address;
// a byte address selects line addr[3 +: AW], so the line index is the low bits
// of a LAR tag. One combinational read port serves load misses in the memory
// stage; one synchronous write port takes lines drained from the write buffer
// (or initial contents). A second read port is for observation only.
// Read-during-write returns the old line. The size
// follows the processor description; the port arrangement is this design's.
module data_memory #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [63:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [63:0]   rdata,
  input  logic [AW-1:0] dbg_addr,
  output logic [63:0]   dbg_data
);
  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata    = mem[raddr];
  assign dbg_data = mem[dbg_addr];
endmodule
