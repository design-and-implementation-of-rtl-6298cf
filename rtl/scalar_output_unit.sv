// scalar_output_unit: puts a scalar result back into its destination line.
//
// For a scalar instruction (`sv` high) the ALU result element sits at bit 0.
// This unit shifts it to the element the destination LAR's word offset points
// at (index woff >> WDSZ) and merges it into the destination's old data, so
// only that element changes. For a vector instruction the ALU result is the
// new line. Combinational; sits in the memory stage.
module scalar_output_unit (
  input  logic [63:0] old_data,
  input  logic [63:0] result,
  input  logic [1:0]  wdsz,
  input  logic [2:0]  woff,
  input  logic        sv,
  output logic [63:0] dout
);
  logic [63:0] mask;
  logic [5:0]  shamt;

  always_comb begin
    shamt = {(woff >> wdsz) << wdsz, 3'b000};
    case (wdsz)
      2'b00:   mask = 64'h0000_0000_0000_00FF;
      2'b01:   mask = 64'h0000_0000_0000_FFFF;
      2'b10:   mask = 64'h0000_0000_FFFF_FFFF;
      default: mask = '1;
    endcase
    dout = sv ? ((old_data & ~(mask << shamt)) | ((result & mask) << shamt))
              : result;
  end
endmodule
