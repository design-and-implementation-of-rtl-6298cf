// tb_anding_unit: random lane carry-outs for every element size and both
// carry-in values, checked against a ripple model in which a carry crosses
// a lane boundary only inside an element.
module tb_anding_unit;
  logic [7:0] co0, co1, cin, cout;
  logic [1:0] wdsz;
  logic cin0;
  int checks = 0, failures = 0;
  logic [7:0] ecin, ecout;
  logic c;
  anding_unit dut (.co0, .co1, .wdsz, .cin0, .cin, .cout);
  initial begin
    for (int i = 0; i < 2000; i++) begin
      co0 = 8'($urandom); co1 = 8'($urandom) | co0; wdsz = 2'($urandom); cin0 = 1'($urandom); #1;
      for (int l = 0; l < 8; l++) begin
        if (l % (1 << wdsz) == 0) c = cin0;
        ecin[l] = c;
        c = c ? co1[l] : co0[l];
        ecout[l] = c;
      end
      checks++;
      if (cin !== ecin || cout !== ecout) begin failures++; $display("w%0d cin %b exp %b", wdsz, cin, ecin); end
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
