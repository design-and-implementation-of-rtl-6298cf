// tb_mask_shift_scalar_unit: scalar element extraction for every size and
// offset, vector pass-through, and the scalar example (byte at offset 2 of
// d4 = ..05_00_04 gives 05h; word at offset 4 of d5 gives FFFFh).
module tb_mask_shift_scalar_unit;
  import lars_ref_pkg::*;
  logic [63:0] din, dout;
  logic [1:0] wdsz;
  logic [2:0] woff;
  logic sv;
  int checks = 0, failures = 0;
  mask_shift_scalar_unit dut (.din, .wdsz, .woff, .sv, .dout);
  initial begin
    din = 64'h0000_0000_0005_0004; wdsz = 0; woff = 2; sv = 1; #1;
    checks++; if (dout !== 64'h05) begin failures++; $display("ex1 %h", dout); end
    din = 64'h0000_FFFF_0000_000F; wdsz = 2; woff = 4; sv = 1; #1;
    checks++; if (dout !== 64'hFFFF) begin failures++; $display("ex2 %h", dout); end
    for (int i = 0; i < 1000; i++) begin
      din = {$urandom, $urandom}; wdsz = 2'($urandom); woff = 3'($urandom); sv = 1'($urandom); #1;
      checks++;
      if (dout !== (sv ? extract(din, wdsz, woff) : din)) begin
        failures++; $display("din=%h w=%0d off=%0d sv=%b got %h", din, wdsz, woff, sv, dout);
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
