// inst_reg_file: the instruction register file that feeds the pipeline.
//
// The processor has no instruction memory; a file of DEPTH 32-bit registers
// supplies one instruction per cycle, read combinationally at the PC. A write
// port loads the program (used while the core is held in reset). DEPTH = 32
// follows the processor description; the write port is this design's choice.
module inst_reg_file #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
