// tb_pc_unit: checks that the PC resets to 0, counts by one when enabled,
// holds when disabled and wraps at the end of the instruction file.
module tb_pc_unit;
  logic clk = 0, rst_n = 0, en = 0;
  logic [4:0] pc;
  int checks = 0, failures = 0;
  int unsigned model;
  pc_unit #(.AW(5)) dut (.clk, .rst_n, .en, .pc);
  always #5 clk = ~clk;
  initial begin
    #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    checks++; if (pc !== 5'd0) begin failures++; $display("reset pc=%0d", pc); end
    rst_n = 1; model = 0;
    for (int i = 0; i < 200; i++) begin
      en = $urandom_range(0, 3) != 0;
      @(posedge clk); #1;
      if (en) model = (model + 1) % 32;
      checks++;
      if (pc !== 5'(model)) begin failures++; $display("cycle %0d pc=%0d exp=%0d", i, pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
