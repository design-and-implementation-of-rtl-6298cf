// tb_data_memory: random writes and reads of the 16 x 64-bit data memory on
// both read ports, including read-during-write (old data expected).
module tb_data_memory;
  logic clk = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0, dbg_addr = 0;
  logic [63:0] wdata = 0, rdata, dbg_data;
  logic [63:0] model [16];
  int checks = 0, failures = 0;
  data_memory #(.DEPTH(16)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata, .dbg_addr, .dbg_data);
  always #5 clk = ~clk;
  initial begin
    #50000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) begin
      we = 1; waddr = 4'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
      @(posedge clk); #1;
    end
    for (int n = 0; n < 300; n++) begin
      we = $urandom_range(0, 1); waddr = 4'($urandom); wdata = {$urandom, $urandom};
      raddr = 4'($urandom); dbg_addr = 4'($urandom);
      #1;
      checks += 2;
      if (rdata !== model[raddr]) begin failures++; $display("r %0d got %h exp %h", raddr, rdata, model[raddr]); end
      if (dbg_data !== model[dbg_addr]) begin failures++; $display("dbg %0d", dbg_addr); end
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
    end
    we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
