// tb_scalar_output_unit: the scalar ADD example (result 04h into byte 4 of
// d1 = 00_05_00_01_00_03_00_04 gives 00_05_00_04_00_03_00_04) and random
// merges for every size and offset; vector results pass unchanged.
module tb_scalar_output_unit;
  import lars_ref_pkg::*;
  logic [63:0] old_data, result, dout;
  logic [1:0] wdsz;
  logic [2:0] woff;
  logic sv;
  int checks = 0, failures = 0;
  scalar_output_unit dut (.old_data, .result, .wdsz, .woff, .sv, .dout);
  initial begin
    old_data = 64'h0005_0001_0003_0004; result = 64'h04; wdsz = 0; woff = 4; sv = 1; #1;
    checks++; if (dout !== 64'h0005_0004_0003_0004) begin failures++; $display("example %h", dout); end
    for (int i = 0; i < 1000; i++) begin
      old_data = {$urandom, $urandom}; result = {$urandom, $urandom};
      wdsz = 2'($urandom); woff = 3'($urandom); sv = 1'($urandom); #1;
      checks++;
      if (dout !== (sv ? merge(old_data, result, wdsz, woff) : result)) begin
        failures++; $display("w%0d off%0d got %h", wdsz, woff, dout);
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
