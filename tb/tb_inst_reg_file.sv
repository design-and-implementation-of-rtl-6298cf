// tb_inst_reg_file: writes all 32 instruction registers with random words and
// reads every one back through the combinational read port.
module tb_inst_reg_file;
  logic clk = 0, we = 0;
  logic [4:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  inst_reg_file #(.DEPTH(32)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;
  initial begin
    #50000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 32; i++) begin
        if (r == 0 || $urandom_range(0, 1)) begin
          we = 1; waddr = 5'(i); wdata = $urandom; model[i] = wdata;
          @(posedge clk); #1;
        end
      end
      we = 0;
      for (int i = 0; i < 32; i++) begin
        raddr = 5'(i); #1;
        checks++;
        if (rdata !== model[i]) begin failures++; $display("addr %0d got %h exp %h", i, rdata, model[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
