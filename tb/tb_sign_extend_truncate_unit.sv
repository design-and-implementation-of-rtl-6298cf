// tb_sign_extend_truncate_unit: the conversion rules. Directed cases from the
// conversion rules (bytes to words at offset 0 and 1, unsigned and signed;
// words to bytes with unsigned and signed saturation; the scalar example where
// word FFFFh becomes byte FFh) plus random lines for all 16 size pairs.
module tb_sign_extend_truncate_unit;
  import lars_ref_pkg::*;
  logic [63:0] din, dout;
  logic [1:0] src_wdsz, dst_wdsz;
  logic src_typ, sv;
  logic [2:0] off;
  int checks = 0, failures = 0;
  sign_extend_truncate_unit dut (.din, .src_wdsz, .src_typ, .dst_wdsz, .off, .sv, .dout);
  task automatic dir(input logic [63:0] d, input logic [1:0] sw, input logic st, input logic [1:0] dw,
                     input logic [2:0] o, input logic s, input logic [63:0] exp);
    din = d; src_wdsz = sw; src_typ = st; dst_wdsz = dw; off = o; sv = s; #1;
    checks++;
    if (dout !== exp) begin failures++; $display("dir %h sw%0d st%0d dw%0d off%0d -> %h exp %h", d, sw, st, dw, o, dout, exp); end
  endtask
  initial begin
    // bytes -> words, offset 0: bytes 0,1 ; offset 1: bytes 2,3
    dir(64'h8877_6655_4433_2211, 0, 0, 2, 0, 0, 64'h0000_0022_0000_0011);
    dir(64'h8877_6655_4433_2211, 0, 0, 2, 1, 0, 64'h0000_0044_0000_0033);
    dir(64'h0000_0000_0000_80F0, 0, 1, 2, 0, 0, 64'hFFFF_FF80_FFFF_FFF0);
    // words -> bytes: unsigned saturation, offset 0 and 1
    dir(64'h0000_0100_0000_0042, 2, 0, 0, 0, 0, 64'h0000_0000_0000_FF42);
    dir(64'h0000_0100_0000_0042, 2, 0, 0, 1, 0, 64'h0000_0000_FF42_0000);
    // signed saturation: +300 -> 7F, -300 -> 80, -5 -> FB
    dir(64'hFFFF_FED4_0000_012C, 2, 1, 0, 0, 0, 64'h0000_0000_0000_807F);
    dir(64'h0000_0000_FFFF_FFFB, 2, 1, 0, 0, 0, 64'h0000_0000_0000_00FB);
    // scalar: FFFFh (unsigned word) -> FFh
    dir(64'h0000_0000_0000_FFFF, 2, 0, 0, 5, 1, 64'h0000_0000_0000_00FF);
    for (int i = 0; i < 3000; i++) begin
      din = {$urandom, $urandom};
      if ($urandom_range(0, 1)) din = din >> (8 * $urandom_range(0, 7));
      src_wdsz = 2'($urandom); dst_wdsz = 2'($urandom); src_typ = 1'($urandom);
      off = 3'($urandom); sv = ($urandom_range(0, 3) == 0); #1;
      checks++;
      if (dout !== conv(din, src_wdsz, src_typ, dst_wdsz, off, sv)) begin
        failures++;
        if (failures < 10) $display("din=%h sw%0d st%0d dw%0d off%0d sv%0d got %h exp %h", din, src_wdsz,
          src_typ, dst_wdsz, off, sv, dout, conv(din, src_wdsz, src_typ, dst_wdsz, off, sv));
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
