// tb_controller_for_loads: a LOAD entering the memory stage must raise the
// stall for exactly one cycle (the search), then report the captured hit and
// line and index in the next cycle; a miss must not cancel; the controller must rearm
// for back-to-back loads and hold its result while the stage is frozen.
module tb_controller_for_loads;
  logic clk = 0, rst_n = 0;
  logic mem_is_load = 0, mem_adv = 1, s_hit = 0;
  logic [63:0] s_data = 0, hit_data;
  logic [2:0] s_idx = 0, hit_idx;
  logic ld_stall, searching, cancel;
  int checks = 0, failures = 0;
  controller_for_loads dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; $display("%0t %s", $time, s); end
  endtask
  initial begin
    #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); #1 rst_n = 1;
    chk(!ld_stall && !cancel, "idle");
    for (int n = 0; n < 40; n++) begin
      automatic logic h = 1'($urandom);
      automatic logic [63:0] dd = {$urandom, $urandom};
      automatic int frz = $urandom_range(0, 2);
      automatic logic [2:0] ii = 3'($urandom);
      mem_is_load = 1; s_hit = h; s_data = dd; s_idx = ii; mem_adv = 0; #1;
      chk(ld_stall, "search stall");
      @(posedge clk); #1;
      s_hit = !h; s_data = ~dd; s_idx = ~ii;                 // later search results must be ignored
      mem_adv = 0;
      for (int f = 0; f < frz; f++) begin       // frozen by another stall
        #1 chk(!ld_stall && cancel == h, "held");
        @(posedge clk); #1;
      end
      mem_adv = 1; #1;
      chk(!ld_stall, "one stall only");
      chk(cancel == h, "cancel");
      if (h) chk(hit_data == dd && hit_idx == ii, "hit data and index");
      @(posedge clk); #1;
      if ($urandom_range(0, 1)) begin
        mem_is_load = 0; #1 chk(!ld_stall && !cancel, "back to idle");
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
