// tb_forwarding_unit: index forwarding of whole records from MEM/WB and
// EX/MEM (EX/MEM wins), tag forwarding of data only for arithmetic producers
// and only into a valid LAR, and no forwarding when nothing matches; random
// against a reference.
module tb_forwarding_unit;
  import lars_pkg::*;
  logic [2:0] idx, em_dst, mw_dst;
  lar_t rd_in, em_lar, mw_lar, rd_out, exp;
  logic em_valid, mw_valid, mw_alu, rv_in;
  logic ev;
  logic [1:0] sel, esel;
  int checks = 0, failures = 0, n_em = 0, n_mw = 0, n_tag = 0;
  forwarding_unit dut (.*);
  function automatic lar_t rnd();
    lar_t l;
    l.data = {$urandom, $urandom}; l.tag = 61'($urandom_range(0, 3)); l.woff = 3'($urandom);
    l.wdsz = 2'($urandom); l.typ = 1'($urandom); l.dirty = 1'($urandom);
    return l;
  endfunction
  initial begin
    for (int i = 0; i < 3000; i++) begin
      idx = 3'($urandom_range(0, 3)); em_dst = 3'($urandom_range(0, 3)); mw_dst = 3'($urandom_range(0, 3));
      rd_in = rnd(); em_lar = rnd(); mw_lar = rnd();
      em_valid = 1'($urandom); mw_valid = 1'($urandom); mw_alu = 1'($urandom); rv_in = 1'($urandom);
      #1;
      exp = rd_in; esel = 0; ev = rv_in;
      if (mw_valid && mw_dst == idx) begin exp = mw_lar; esel = 1; ev = 1; end
      else if (mw_valid && mw_alu && ev && exp.tag == mw_lar.tag) begin exp.data = mw_lar.data; esel = 1; n_tag++; end
      if (em_valid && em_dst == idx) begin exp = em_lar; esel = 2; end
      else if (em_valid && ev && exp.tag == em_lar.tag) begin exp.data = em_lar.data; esel = 2; n_tag++; end
      if (esel == 2) n_em++;
      if (esel == 1) n_mw++;
      checks++;
      if (rd_out !== exp || sel !== esel) begin failures++; if (failures < 10) $display("i=%0d sel=%0d exp %0d", i, sel, esel); end
    end
    checks++; if (n_em == 0 || n_mw == 0 || n_tag == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // watchdog: the checks above finish long before this
  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
