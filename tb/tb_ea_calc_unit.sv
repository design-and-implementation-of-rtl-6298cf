// tb_ea_calc_unit: checks address + sign-extended 12-bit immediate, including
// the load example (address 0, immediate 5) and negative immediates.
module tb_ea_calc_unit;
  logic [63:0] addr, ea_part;
  logic [11:0] imm;
  int checks = 0, failures = 0;
  longint signed si;
  ea_calc_unit dut (.addr, .imm, .ea_part);
  initial begin
    addr = 0; imm = 12'd5; #1;
    checks++; if (ea_part !== 64'd5) failures++;
    addr = 64'h44; imm = 12'hFFF; #1;
    checks++; if (ea_part !== 64'h43) failures++;
    for (int i = 0; i < 500; i++) begin
      addr = {$urandom, $urandom}; imm = 12'($urandom); #1;
      si = longint'(signed'(imm));
      checks++;
      if (ea_part !== 64'(addr + si)) begin failures++; $display("%h + %h -> %h", addr, imm, ea_part); end
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
