// tb_datapath_controller: decodes all 32 opcodes with both SV values and checks
// the instruction class and the type tag each LOAD/STORE carries against the
// opcode table (LOADUB=01 .. LOADSDW=08, STOREUB=09 .. STORESDW=10, ADD=12,
// SUB=13, MUL=14 reserved, AND=15, OR=16, EXOR=17, LOADDUMMY=1F).
module tb_datapath_controller;
  import lars_pkg::*;
  logic [4:0] op;
  logic sv;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  datapath_controller dut (.op, .sv, .ctrl);
  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("op=%h sv=%b: %s", op, sv, what); end
  endtask
  initial begin
    for (int o = 0; o < 32; o++) begin
      for (int s = 0; s < 2; s++) begin
        op = 5'(o); sv = 1'(s); #1;
        if (o >= 1 && o <= 8) begin
          chk(ctrl.valid && ctrl.is_addr && ctrl.is_load && !ctrl.is_alu && !ctrl.is_dummy, "load class");
          chk(ctrl.new_wdsz == 2'((o - 1) % 4) && ctrl.new_typ == (o >= 5), "load type");
          chk(ctrl.alu_op == ALU_ADD64, "load ea op");
        end else if (o >= 9 && o <= 16) begin
          chk(ctrl.valid && ctrl.is_addr && !ctrl.is_load && !ctrl.is_alu, "store class");
          chk(ctrl.new_wdsz == 2'((o - 9) % 4) && ctrl.new_typ == (o >= 13), "store type");
        end else if (o == 31) begin
          chk(ctrl.valid && ctrl.is_addr && ctrl.is_dummy && !ctrl.is_load, "dummy");
        end else if (o == 18 || o == 19 || o == 21 || o == 22 || o == 23) begin
          chk(ctrl.valid && ctrl.is_alu && !ctrl.is_addr && ctrl.sv == sv, "alu class");
          case (o)
            18: chk(ctrl.alu_op == ALU_ADD, "add");
            19: chk(ctrl.alu_op == ALU_SUB, "sub");
            21: chk(ctrl.alu_op == ALU_AND, "and");
            22: chk(ctrl.alu_op == ALU_OR,  "or");
            default: chk(ctrl.alu_op == ALU_XOR, "exor");
          endcase
        end else begin
          chk(!ctrl.valid && !ctrl.is_alu && !ctrl.is_addr, "no-op");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // watchdog: the checks above finish long before this
  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
