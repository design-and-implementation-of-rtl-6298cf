// datapath_controller: opcode decoder of the decode stage.
//
// Turns the 5-bit opcode (and the scalar/vector bit) into the control word
// lars_pkg::ctrl_t that travels with the instruction. LOADxx and STORExx carry
// their type tag in the opcode: for LOAD, WDSZ = (op-1)[1:0] and TYP =
// (op-1)[2]; for STORE the same with op-9 (tables of the instruction set).
// LOADDUMMY (1F) is an address-class instruction like STORE; its type tag is
// taken later from the SRC1 LAR. NO-OP, the reserved MUL opcode and every
// unassigned opcode decode to an invalid (bubble) control word.
// Combinational.
module datapath_controller
  import lars_pkg::*;
(
  input  logic [4:0] op,
  input  logic       sv,
  output ctrl_t      ctrl
);
  logic [4:0] ld_code, st_code;
  assign ld_code = op - 5'd1;
  assign st_code = op - 5'd9;

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = ALU_ADD;
    if (op >= OP_LOADUB && op <= OP_LOADSDW) begin
      ctrl.valid    = 1'b1;
      ctrl.is_addr  = 1'b1;
      ctrl.is_load  = 1'b1;
      ctrl.alu_op   = ALU_ADD64;
      ctrl.new_wdsz = ld_code[1:0];
      ctrl.new_typ  = ld_code[2];
    end else if (op >= OP_STOREUB && op <= OP_STORESDW) begin
      ctrl.valid    = 1'b1;
      ctrl.is_addr  = 1'b1;
      ctrl.alu_op   = ALU_ADD64;
      ctrl.new_wdsz = st_code[1:0];
      ctrl.new_typ  = st_code[2];
    end else if (op == OP_LOADDUMMY) begin
      ctrl.valid    = 1'b1;
      ctrl.is_addr  = 1'b1;
      ctrl.is_dummy = 1'b1;
      ctrl.alu_op   = ALU_ADD64;
    end else begin
      ctrl.sv = sv;
      unique case (op)
        OP_ADD:  begin ctrl.valid = 1'b1; ctrl.is_alu = 1'b1; ctrl.alu_op = ALU_ADD; end
        OP_SUB:  begin ctrl.valid = 1'b1; ctrl.is_alu = 1'b1; ctrl.alu_op = ALU_SUB; end
        OP_AND:  begin ctrl.valid = 1'b1; ctrl.is_alu = 1'b1; ctrl.alu_op = ALU_AND; end
        OP_OR:   begin ctrl.valid = 1'b1; ctrl.is_alu = 1'b1; ctrl.alu_op = ALU_OR;  end
        OP_EXOR: begin ctrl.valid = 1'b1; ctrl.is_alu = 1'b1; ctrl.alu_op = ALU_XOR; end
        default: ctrl = '0;
      endcase
    end
  end
endmodule
