// tb_pipe_reg: random enable/bubble sequences against a reference register:
// load on enable, hold otherwise, zero on bubble and on reset.
module tb_pipe_reg;
  logic clk = 0, rst_n = 0, en = 0, bubble = 0;
  logic [39:0] d = 0, q, model;
  int checks = 0, failures = 0;
  pipe_reg #(.T(logic [39:0])) dut (.clk, .rst_n, .en, .bubble, .d, .q);
  always #5 clk = ~clk;
  initial begin
    #50000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); #1;
    checks++; if (q !== '0) failures++;
    rst_n = 1; model = '0;
    for (int i = 0; i < 400; i++) begin
      en = $urandom_range(0, 1); bubble = ($urandom_range(0, 5) == 0); d = {8'($urandom), $urandom};
      @(posedge clk); #1;
      if (bubble) model = '0; else if (en) model = d;
      checks++;
      if (q !== model) begin failures++; $display("i=%0d q=%h exp=%h", i, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
