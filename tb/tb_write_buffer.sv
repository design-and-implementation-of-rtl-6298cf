// tb_write_buffer: random pushes and drain opportunities against a queue
// model: FIFO order, the full flag at 2 entries, no push accepted while full,
// and the tag lookup returning the newest waiting line.
module tb_write_buffer;
  logic clk = 0, rst_n = 0;
  logic push = 0, drain_ok = 0, full, empty, drain_valid, lk_hit;
  logic [60:0] push_tag = 0, drain_tag, lk_tag = 0;
  logic [63:0] push_data = 0, drain_data, lk_data;
  int checks = 0, failures = 0, drains = 0, fulls = 0;
  logic [124:0] q [$];
  logic exp_hit, dv;
  logic [63:0] exp_data;
  write_buffer #(.DEPTH(2)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      push_tag = 61'($urandom_range(0, 5)); push_data = {$urandom, $urandom};
      drain_ok = $urandom_range(0, 2) == 0;
      push = !full && $urandom_range(0, 1);
      lk_tag = 61'($urandom_range(0, 5));
      #1;
      checks += 3;
      if (full !== (q.size() == 2)) begin failures++; $display("full flag"); end
      if (empty !== (q.size() == 0)) begin failures++; $display("empty flag"); end
      if (drain_valid !== (drain_ok && q.size() > 0)) begin failures++; $display("drain_valid"); end
      if (drain_valid) begin
        checks++;
        if ({drain_tag, drain_data} !== q[0]) begin failures++; $display("drain order"); end
      end
      exp_hit = 0; exp_data = 0;
      foreach (q[k]) if (q[k][124:64] == lk_tag) begin exp_hit = 1; exp_data = q[k][63:0]; end
      checks++;
      if (lk_hit !== exp_hit || (exp_hit && lk_data !== exp_data)) begin failures++; $display("lookup"); end
      if (full) fulls++;
      dv = drain_valid;
      @(posedge clk); #1;
      if (dv) begin void'(q.pop_front()); drains++; end
      if (push) q.push_back({push_tag, push_data});
    end
    checks++; if (drains == 0 || fulls == 0) begin failures++; $display("coverage drains=%0d fulls=%0d", drains, fulls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
