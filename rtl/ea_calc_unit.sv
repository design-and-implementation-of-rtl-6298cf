// ea_calc_unit: first half of the effective-address calculation.
//
// LOAD, STORE and LOADDUMMY form EA = SRC1.address + SRC2.data + imm. This
// unit, in the conversion stage, adds the 64-bit SRC1 address (tag and word
// offset) to the sign-extended 12-bit immediate; the execute-stage ALU adds
// SRC2's data afterwards. Purely combinational.
module ea_calc_unit (
  input  logic [63:0] addr,
  input  logic [11:0] imm,
  output logic [63:0] ea_part
);
  assign ea_part = addr + {{52{imm[11]}}, imm};
endmodule
