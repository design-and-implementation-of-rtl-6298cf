// tb_alu: packed ADD/SUB wrap-around per element size, logic ops and the
// 64-bit EA add. Directed: FFFFh + AAAAh = AAA9h in half-words, and the
// packed-word add DDDDDDDD.. + BBBBBBBB.. = 99999998_99999998.
module tb_alu;
  import lars_pkg::*;
  import lars_ref_pkg::*;
  logic [63:0] a, b, y, exp;
  alu_op_e op;
  logic [1:0] wdsz;
  int checks = 0, failures = 0;
  alu dut (.a, .b, .op, .wdsz, .y);
  initial begin
    a = 64'h0000_FFFF; b = 64'h0000_AAAA; op = ALU_ADD; wdsz = 1; #1;
    checks++; if (y !== 64'hAAA9) begin failures++; $display("ffff+aaaa=%h", y); end
    a = 64'hDDDD_DDDD_DDDD_DDDD; b = 64'hBBBB_BBBB_BBBB_BBBB; wdsz = 2; #1;
    checks++; if (y !== 64'h9999_9998_9999_9998) begin failures++; $display("word add %h", y); end
    wdsz = 0; #1;
    checks++; if (y !== 64'h9898_9898_9898_9898) begin failures++; $display("byte add %h", y); end
    op = ALU_ADD64; a = 64'h3F; b = 64'h5; wdsz = 0; #1;
    checks++; if (y !== 64'h44) begin failures++; $display("ea %h", y); end
    for (int i = 0; i < 3000; i++) begin
      automatic int o = $urandom_range(0, 5);
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; wdsz = 2'($urandom);
      op = alu_op_e'(o); #1;
      exp = (o == 5) ? a + b : alu_ref(a, b, o, wdsz);
      checks++;
      if (y !== exp) begin failures++; if (failures < 10) $display("op%0d w%0d %h %h got %h exp %h", o, wdsz, a, b, y, exp); end
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
