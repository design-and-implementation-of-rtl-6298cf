// mask_shift_scalar_unit: operand isolation for scalar instructions.
//
// With `sv` high (scalar), only the element the LAR's word offset points at
// passes: it is masked out of the 64-bit line and shifted down to bit 0, and
// every other bit is zero. The word offset is a byte offset, so the element
// index is woff >> WDSZ (a word at byte offset 4 is word 1). With `sv` low
// (vector) the line passes unchanged. Combinational.
module mask_shift_scalar_unit (
  input  logic [63:0] din,
  input  logic [1:0]  wdsz,
  input  logic [2:0]  woff,
  input  logic        sv,
  output logic [63:0] dout
);
  logic [63:0] mask;
  logic [5:0]  shamt;

  always_comb begin
    // element start bit = (woff rounded down to the element size) * 8
    shamt = {(woff >> wdsz) << wdsz, 3'b000};
    case (wdsz)
      2'b00:   mask = 64'h0000_0000_0000_00FF;
      2'b01:   mask = 64'h0000_0000_0000_FFFF;
      2'b10:   mask = 64'h0000_0000_FFFF_FFFF;
      default: mask = '1;
    endcase
    dout = sv ? ((din >> shamt) & mask) : din;
  end
endmodule
