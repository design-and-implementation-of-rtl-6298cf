// tb_data_lars: random writes (plain and with associative update) against an
// array model; checks the three read ports (record and valid bit) with
// write-through bypass, the evicted-record port, the associative search
// (lowest matching index, one LAR optionally left out) and the alias flag. Also the reset state (all fields zero) and that a LAR never
// written since reset neither answers a search nor takes an alias update.
module tb_data_lars;
  import lars_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] ra [3];
  lar_t rd [3];
  logic rv [3];
  logic we = 0, alias_upd = 0, s_hit, w_aliased;
  logic [2:0] widx = 0, s_idx, dbg_idx = 0;
  lar_t wlar = '0, wold, s_lar, dbg_lar;
  logic [60:0] s_tag = 0;
  logic s_excl = 0;
  logic [2:0] s_excl_idx = 0;
  lar_t m [8];
  lar_t nm [8];
  logic [7:0] v, nv;
  int checks = 0, failures = 0, n_alias = 0, n_hit = 0;
  data_lars #(.NLARS(8)) dut (.*);
  always #5 clk = ~clk;
  task automatic chk(input bit c, input string s);
    checks++; if (!c) begin failures++; if (failures < 10) $display("%0t %s", $time, s); end
  endtask
  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    @(posedge clk); #1;
    for (int i = 0; i < 8; i++) begin dbg_idx = 3'(i); #1 chk(dbg_lar == '0, "reset"); end
    rst_n = 1;
    foreach (m[i]) m[i] = '0;
    v = '0;
    for (int n = 0; n < 1500; n++) begin
      we = 1'($urandom); widx = 3'($urandom); alias_upd = 1'($urandom);
      wlar = {{$urandom, $urandom}, 61'($urandom_range(0, 4)), 3'($urandom), 2'($urandom), 2'($urandom)};
      for (int p = 0; p < 3; p++) ra[p] = 3'($urandom);
      s_tag = 61'($urandom_range(0, 4)); dbg_idx = 3'($urandom);
      s_excl = 1'($urandom); s_excl_idx = 3'($urandom);
      #1;
      nm = m; nv = v;
      if (we) begin
        for (int i = 0; i < 8; i++)
          if (i == widx) begin nm[i] = wlar; nv[i] = 1; end
          else if (alias_upd && v[i] && m[i].tag == wlar.tag) begin nm[i].data = wlar.data; n_alias++; end
      end
      for (int p = 0; p < 3; p++) begin
        chk(rd[p] == nm[ra[p]], "read port");
        chk(rv[p] == nv[ra[p]], "read valid");
      end
      chk(wold == m[widx], "wold");
      chk(dbg_lar == m[dbg_idx], "dbg");
      begin
        int h;
        logic al;
        h = -1; al = 0;
        for (int i = 7; i >= 0; i--) if (v[i] && m[i].tag == s_tag && !(s_excl && i == s_excl_idx)) h = i;
        for (int i = 0; i < 8; i++) if (i != widx && v[i] && m[i].tag == wlar.tag) al = 1;
        chk(s_hit == (h >= 0), "hit");
        if (h >= 0) begin chk(s_idx == 3'(h) && s_lar == m[h], "hit idx"); n_hit++; end
        chk(w_aliased == al, "alias flag");
      end
      @(posedge clk); #1;
      m = nm; v = nv;
    end
    chk(n_alias > 0 && n_hit > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
