// tb_hazard_detection_unit: the stall rules. Directed: LOAD then a reader
// (stall while the load is one and two ahead), ADD then a reader (stall only
// one ahead), a STORE reading its destination, alias by line tag (only for a
// valid LAR), and independent instructions (no stall). Random: against a
// reference of the same rules. The unit is combinational; the watchdog
// bounds the simulated time.
module tb_hazard_detection_unit;
  import lars_pkg::*;
  ctrl_t id_ctrl, cv_ctrl, ex_ctrl;
  logic [2:0] id_src1, id_src2, id_dst, cv_dst, ex_dst;
  logic [60:0] id_tag1, id_tag2, id_tagd, cv_dtag;
  logic id_v1, id_v2, id_vd;
  logic stall, exp;
  int checks = 0, failures = 0;
  hazard_detection_unit dut (.*);
  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic ctrl_t mk(input int k);   // 0 none, 1 alu, 2 load, 3 store
    ctrl_t c = '0;
    if (k == 1) begin c.valid = 1; c.is_alu = 1; end
    if (k == 2) begin c.valid = 1; c.is_addr = 1; c.is_load = 1; end
    if (k == 3) begin c.valid = 1; c.is_addr = 1; end
    return c;
  endfunction
  task automatic chk(input logic e, input string s);
    #1 checks++; if (stall !== e) begin failures++; $display("%s: stall=%b exp=%b", s, stall, e); end
  endtask
  initial begin
    id_tag1 = 1; id_tag2 = 2; id_tagd = 3; cv_dtag = 9; id_v1 = 1; id_v2 = 1; id_vd = 1;
    id_ctrl = mk(1); id_src1 = 2; id_src2 = 4; id_dst = 3;
    // LOAD d2 one ahead, then two ahead
    cv_ctrl = mk(2); cv_dst = 2; ex_ctrl = mk(0); ex_dst = 0; chk(1, "load 1 ahead");
    cv_ctrl = mk(0); ex_ctrl = mk(2); ex_dst = 2;             chk(1, "load 2 ahead");
    // ADD d2 one ahead, then two ahead
    cv_ctrl = mk(1); cv_dst = 2; ex_ctrl = mk(0);             chk(1, "alu 1 ahead");
    cv_ctrl = mk(0); ex_ctrl = mk(1); ex_dst = 2;             chk(0, "alu 2 ahead");
    // alias: ADD writes d7 holding line 2, reader's SRC2 holds line 2
    cv_ctrl = mk(1); cv_dst = 7; cv_dtag = 2; ex_ctrl = mk(0); chk(1, "alias");
    // the same, but the LAR read was never written: no alias
    id_v2 = 0;                                                chk(0, "alias, invalid LAR");
    id_v2 = 1;
    // destination read by an arithmetic reader
    cv_dtag = 9; cv_dst = 3;                                  chk(1, "dest read");
    // a STORE reads its destination (it keeps the data): ADD d3 one ahead
    id_ctrl = mk(3); cv_ctrl = mk(1); cv_dst = 3;             chk(1, "store dest read");
    id_ctrl = mk(2);                                          chk(0, "load dest not read");
    id_ctrl = mk(1);
    // independent
    cv_dst = 6; ex_ctrl = mk(2); ex_dst = 5;                  chk(0, "independent");
    // a bubble in decode never stalls
    id_ctrl = mk(0); cv_dst = 2;                              chk(0, "bubble");
    for (int i = 0; i < 2000; i++) begin
      automatic int ki = $urandom_range(0, 3), kc = $urandom_range(0, 3), ke = $urandom_range(0, 3);
      logic mcv, mtag, mex, used;
      id_ctrl = mk(ki); cv_ctrl = mk(kc); ex_ctrl = mk(ke);
      id_src1 = 3'($urandom); id_src2 = 3'($urandom); id_dst = 3'($urandom);
      cv_dst = 3'($urandom); ex_dst = 3'($urandom);
      id_tag1 = 61'($urandom_range(0, 3)); id_tag2 = 61'($urandom_range(0, 3));
      id_tagd = 61'($urandom_range(0, 3)); cv_dtag = 61'($urandom_range(0, 3));
      id_v1 = 1'($urandom); id_v2 = 1'($urandom); id_vd = 1'($urandom);
      used = (ki == 1) || (ki == 3);
      mcv  = id_src1 == cv_dst || id_src2 == cv_dst || (used && id_dst == cv_dst);
      mtag = (id_v1 && id_tag1 == cv_dtag) || (id_v2 && id_tag2 == cv_dtag) ||
             (used && id_vd && id_tagd == cv_dtag);
      mex  = id_src1 == ex_dst || id_src2 == ex_dst || (used && id_dst == ex_dst);
      exp  = (ki != 0) && ((kc == 1 && (mcv || mtag)) || (kc >= 2 && mcv) || (ke >= 2 && mex));
      chk(exp, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
