// tb_master_controller: all 8 combinations of the three stall interrupts.
// A load-search or write-buffer stall must freeze every stage; a hazard
// stall alone must hold PC and IF/ID and insert one bubble.
module tb_master_controller;
  logic ld_stall, wb_stall, hz_stall;
  logic pc_en, ifid_en, idconv_en, idconv_bubble, convex_en, exmem_en, memwb_en, wb_en, mem_adv;
  int checks = 0, failures = 0;
  logic [8:0] got, exp;
  master_controller dut (.*);
  initial begin
    for (int i = 0; i < 8; i++) begin
      {ld_stall, wb_stall, hz_stall} = 3'(i); #1;
      got = {pc_en, ifid_en, idconv_en, idconv_bubble, convex_en, exmem_en, memwb_en, wb_en, mem_adv};
      if (ld_stall || wb_stall) exp = 9'b0;
      else if (hz_stall)        exp = 9'b001111111;
      else                      exp = 9'b111011111;
      checks++;
      if (got !== exp) begin failures++; $display("in=%b got=%b exp=%b", i[2:0], got, exp); end
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
