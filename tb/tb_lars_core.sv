// tb_lars_core: end-to-end test of the DATA LARs processor at its default
// size (8 LARs, 32 instructions, 16 memory lines, 2-entry write buffer).
//
// Each program is loaded into the instruction register file while the core is
// in reset, run until the PC wraps, and then the final state of every written
// LAR and of the data memory is compared with an instruction-by-instruction
// reference model (written here from the instruction-set rules, using the
// conversion and ALU models of lars_ref_pkg). The model also predicts the
// memory fetches, LOAD hits, evictions and write-buffer-full stalls.
//
// Programs:
//  1. pointer-alias example with j != k: 5 data-memory fetches expected;
//  2. the same with j == k: the LOAD of k hits the LAR holding j, 4 fetches;
//     then, with j != k again, the example run after five loads that make
//     its lines live: all five of its loads hit and none fetches;
//  3. lazy store: packed-byte adds into d6, reloads of d6 evict the dirty line
//     into the write buffer, the third eviction finds it full and stalls; a
//     later LOAD of an evicted line is served from the buffer;
//  4. scalar ADD example (byte 4 of d1 becomes 04h); then, continuing it,
//     type casts by STORE, an associative update of an aliased LAR,
//     SUB/OR/EXOR, widening and narrowing conversions;
//  5. hazard timing: LOAD then a reader costs 2 bubbles, ADD then a reader 1,
//     and every LOAD spends exactly one search cycle;
//  6. 40 random programs of 24 instructions mixing every instruction class,
//     random offsets and scalar/vector modes, checked against the model.
// Every mechanism is counted over all programs; one that never happened is a
// failure.
module tb_lars_core;
  import lars_pkg::*;
  import lars_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic prog_we = 0, dm_init_we = 0;
  logic [4:0] prog_addr = 0;
  logic [31:0] prog_data = 0;
  logic [3:0] dm_init_addr = 0, dbg_dm_addr = 0;
  logic [63:0] dm_init_data = 0, dbg_dm_data;
  logic [2:0] dbg_lar_idx = 0;
  lar_t dbg_lar;
  logic [4:0] pc;
  logic ev_retire, ev_hz_stall, ev_ld_search, ev_ld_hit, ev_mem_read, ev_wbuf_fwd,
        ev_evict, ev_wb_stall, ev_drain, ev_fwd_em, ev_fwd_mw, ev_alias_upd;

  lars_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- instruction encoding ----------------
  function automatic logic [31:0] ldst(input logic [4:0] op, input int d, input int s1, input int s2, input int imm);
    return {op, 5'(d), 5'(s1), 5'(s2), 12'(imm)};
  endfunction
  function automatic logic [31:0] arith(input logic [4:0] op, input int d, input int s1, input int s2,
                                        input bit sv, input int o1 = 0, input int o2 = 0);
    return {op, 5'(d), 5'(s1), 5'(s2), sv, 3'(o1), 3'(o2), 3'b000, 2'b00};
  endfunction

  function automatic string disasm(input logic [31:0] w);
    instr_t i = instr_t'(w);
    opcode_e o = opcode_e'(i.op);
    if (i.op inside {[OP_LOADUB:OP_STORESDW], OP_LOADDUMMY})
      return $sformatf("%-10s d%0d, d%0d, d%0d, %03hh", o.name(), i.dst[2:0], i.src1[2:0], i.src2[2:0], w[11:0]);
    if (i.op == OP_NOP) return "NOP";
    return $sformatf("%-10s d%0d, d%0d, d%0d  %s off1=%0d off2=%0d", o.name(), i.dst[2:0], i.src1[2:0],
                     i.src2[2:0], i.sv ? "scalar" : "vector", i.off1, i.off2);
  endfunction

  // ---------------- reference model ----------------
  lar_t        ml [8];
  logic [7:0]  mv;
  logic [63:0] mm [16];
  logic [124:0] mq [$];
  int m_reads, m_hits, m_evicts, m_full, m_bufhits, m_widen, m_narrow, m_scalar, m_alias, m_loads;

  function automatic int opsel(input logic [4:0] op);
    case (op)
      OP_ADD: return 0; OP_SUB: return 1; OP_AND: return 2; OP_OR: return 3; default: return 4;
    endcase
  endfunction

  task automatic model_exec(input logic [31:0] w);
    instr_t i = instr_t'(w);
    lar_t a = ml[i.src1[2:0]], b = ml[i.src2[2:0]], d = ml[i.dst[2:0]];
    int di = int'(i.dst[2:0]);
    if (i.op inside {[OP_ADD:OP_SUB], [OP_AND:OP_EXOR]}) begin
      logic [63:0] xa, xb, r;
      xa = i.sv ? extract(a.data, a.wdsz, a.woff) : a.data;
      xb = i.sv ? extract(b.data, b.wdsz, b.woff) : b.data;
      if (a.wdsz < d.wdsz || b.wdsz < d.wdsz) m_widen++;
      if (a.wdsz > d.wdsz || b.wdsz > d.wdsz) m_narrow++;
      if (i.sv) m_scalar++;
      xa = conv(xa, a.wdsz, a.typ, d.wdsz, i.off1, i.sv);
      xb = conv(xb, b.wdsz, b.typ, d.wdsz, i.off2, i.sv);
      r = alu_ref(xa, xb, opsel(i.op), d.wdsz);
      d.data  = i.sv ? merge(d.data, r, d.wdsz, d.woff) : r;
      d.dirty = 1;
      begin
        bit any = 0;
        for (int k = 0; k < 8; k++)
          if (k != di && mv[k] && ml[k].tag == d.tag) begin ml[k].data = d.data; any = 1; end
        m_alias += int'(any);
      end
      ml[di] = d; mv[di] = 1;
    end else if (i.op inside {[OP_LOADUB:OP_STORESDW], OP_LOADDUMMY}) begin
      logic [63:0] ea, line;
      logic [4:0] code;
      ea = {a.tag, a.woff} + b.data + 64'(signed'(w[11:0]));
      if (i.op <= OP_LOADSDW) begin
        int h = -1;
        m_loads++;
        for (int k = 7; k >= 0; k--) if (mv[k] && ml[k].tag == ea[63:3]) h = k;
        if (h >= 0) begin line = ml[h].data; m_hits++; end
        else begin
          int qb = -1;
          foreach (mq[k]) if (mq[k][124:64] == ea[63:3]) qb = k;
          if (qb >= 0) begin line = mq[qb][63:0]; m_bufhits++; end
          else begin line = mm[ea[6:3]]; m_reads++; end
        end
        code = i.op - 5'd1;
      end else begin
        line = d.data;
        code = i.op - 5'd9;
      end
      if (mv[di] && d.dirty) begin
        m_evicts++;
        if (mq.size() == 2) begin
          logic [124:0] e = mq.pop_front();
          mm[e[67:64]] = e[63:0];
          m_full++;
        end
        mq.push_back({d.tag, d.data});
      end
      d.data = line; d.tag = ea[63:3]; d.woff = ea[2:0]; d.dirty = 0;
      if (i.op == OP_LOADDUMMY) begin d.wdsz = a.wdsz; d.typ = a.typ; end
      else begin d.wdsz = code[1:0]; d.typ = code[2]; end
      ml[di] = d; mv[di] = 1;
    end
  endtask

  // Random instruction for program 6. d0 is never written, so it keeps
  // address 0 and data 0 and "LOAD dX, d0, d0, imm" reaches line imm[6:3];
  // the other LARs serve as sources and destinations of every class.
  function automatic logic [31:0] rand_instr();
    int unsigned k = $urandom_range(99);
    int d = $urandom_range(7, 1);
    int s1 = ($urandom_range(1) == 0) ? 0 : $urandom_range(7);
    int s2 = ($urandom_range(3) != 0) ? 0 : $urandom_range(7);
    logic [4:0] op;
    if (k < 40) begin
      op = 5'($urandom_range(8, 1));
      return ldst(op, d, s1, s2, int'($urandom_range(12'h7F)));
    end else if (k < 50) begin
      op = 5'($urandom_range(16, 9));
      return ldst(op, d, s1, s2, int'($urandom_range(12'hFFF)));
    end else if (k < 55) begin
      return ldst(OP_LOADDUMMY, d, $urandom_range(7), 0, int'($urandom_range(12'h7F)));
    end else if (k < 97) begin
      case ($urandom_range(4))
        0: op = OP_ADD; 1: op = OP_SUB; 2: op = OP_AND; 3: op = OP_OR; default: op = OP_EXOR;
      endcase
      return arith(op, d, $urandom_range(7), $urandom_range(7), $urandom_range(1),
                   $urandom_range(7), $urandom_range(7));
    end
    return 32'h0;
  endfunction

  // ---------------- event counters ----------------
  int c_hz, c_search, c_hit, c_read, c_buf, c_evict, c_wbst, c_drain, c_fem, c_fmw, c_alias, c_retire;
  always @(posedge clk) if (rst_n) begin
    c_hz     += int'(ev_hz_stall);
    c_search += int'(ev_ld_search);
    c_hit    += int'(ev_ld_hit);
    c_read   += int'(ev_mem_read);
    c_buf    += int'(ev_wbuf_fwd);
    c_evict  += int'(ev_evict);
    c_wbst   += int'(ev_wb_stall);
    c_drain  += int'(ev_drain);
    c_fem    += int'(ev_fwd_em);
    c_fmw    += int'(ev_fwd_mw);
    c_alias  += int'(ev_alias_upd);
    c_retire += int'(ev_retire);
  end

  // totals over all programs
  int t_hz, t_search, t_hit, t_read, t_buf, t_evict, t_wbst, t_fem, t_fmw, t_alias, t_widen, t_narrow, t_scalar;

  logic [31:0] prog [$];
  logic [63:0] mem_init [16];
  int p_bubbles, p_cycles;

  task automatic run_program(input string name);
    int f0 = failures;
    rst_n = 0;
    // load the program and the memory while in reset
    for (int k = 0; k < 32; k++) begin
      prog_we = 1; prog_addr = 5'(k); prog_data = (k < prog.size()) ? prog[k] : 32'h0;
      @(posedge clk); #1;
    end
    prog_we = 0;
    for (int k = 0; k < 16; k++) begin
      dm_init_we = 1; dm_init_addr = 4'(k); dm_init_data = mem_init[k];
      @(posedge clk); #1;
    end
    dm_init_we = 0;
    // model
    foreach (ml[k]) ml[k] = '0;
    mv = '0;
    foreach (mm[k]) mm[k] = mem_init[k];
    mq.delete();
    {m_reads, m_hits, m_evicts, m_full, m_bufhits, m_widen, m_narrow, m_scalar, m_alias, m_loads} = '0;
    foreach (prog[k]) model_exec(prog[k]);
    {c_hz, c_search, c_hit, c_read, c_buf, c_evict, c_wbst, c_drain, c_fem, c_fmw, c_alias, c_retire} = '0;
    // run until the PC wraps back to 0
    @(negedge clk) rst_n = 1;
    p_cycles = 0;
    do begin @(posedge clk); #1; p_cycles++; end while (!(pc == 5'd0 && p_cycles > 2) && p_cycles < 400);
    chk(p_cycles < 400, {name, ": PC wrapped"});
    p_bubbles = c_hz;
    // compare state
    for (int k = 0; k < 8; k++) begin
      dbg_lar_idx = 3'(k); #1;
      if (mv[k]) chk(dbg_lar == ml[k], $sformatf("%s: d%0d = %h/%h exp %h/%h", name, k, dbg_lar.data,
                     {dbg_lar.tag, dbg_lar.woff}, ml[k].data, {ml[k].tag, ml[k].woff}));
    end
    for (int k = 0; k < 16; k++) begin
      dbg_dm_addr = 4'(k); #1;
      chk(dbg_dm_data == mm[k], $sformatf("%s: mem[%0d] = %h exp %h", name, k, dbg_dm_data, mm[k]));
    end
    chk(c_read  == m_reads,  $sformatf("%s: memory fetches %0d exp %0d", name, c_read, m_reads));
    chk(c_hit   == m_hits,   $sformatf("%s: LOAD hits %0d exp %0d", name, c_hit, m_hits));
    chk(c_buf   == m_bufhits,$sformatf("%s: write-buffer hits %0d exp %0d", name, c_buf, m_bufhits));
    chk(c_evict == m_evicts, $sformatf("%s: evictions %0d exp %0d", name, c_evict, m_evicts));
    chk(c_wbst  == m_full,   $sformatf("%s: full stalls %0d exp %0d", name, c_wbst, m_full));
    chk(c_drain == m_full,   $sformatf("%s: drains %0d exp %0d", name, c_drain, m_full));
    chk(c_search == m_loads, $sformatf("%s: search cycles %0d exp %0d (one per LOAD)", name, c_search, m_loads));
    chk(c_alias == m_alias,  $sformatf("%s: alias updates %0d exp %0d", name, c_alias, m_alias));
    if (failures != f0) begin
      $display("%s: program", name);
      foreach (prog[k]) $display("  %2d: %s", k, disasm(prog[k]));
    end
    t_hz += c_hz; t_search += c_search; t_hit += c_hit; t_read += c_read; t_buf += c_buf;
    t_evict += c_evict; t_wbst += c_wbst; t_fem += c_fem; t_fmw += c_fmw; t_alias += c_alias;
    t_widen += m_widen; t_narrow += m_narrow; t_scalar += m_scalar;
    $display("%s: %0d cycles, fetches %0d, hits %0d, bubbles %0d, evictions %0d, full stalls %0d",
             name, p_cycles, c_read, c_hit, c_hz, c_evict, c_wbst);
  endtask

  initial begin
    // ---- 1. alias example, j != k ----
    foreach (mem_init[k]) mem_init[k] = {$urandom, $urandom};
    mem_init[0] = 64'h28;                  // address of i
    mem_init[1] = 64'h18;                  // address of j
    mem_init[2] = 64'h20;                  // address of k
    mem_init[3] = 64'hDDDD_DDDD_DDDD_DDDD; // j
    mem_init[4] = 64'hBBBB_BBBB_BBBB_BBBB; // k
    prog = '{ldst(OP_LOADUDW, 1, 0, 0, 0), ldst(OP_LOADUDW, 2, 0, 0, 8), ldst(OP_LOADUDW, 3, 0, 0, 'h10),
             ldst(OP_LOADDUMMY, 6, 0, 1, 0), ldst(OP_LOADSW, 4, 0, 2, 0), ldst(OP_LOADSW, 5, 0, 3, 0),
             arith(OP_ADD, 6, 4, 5, 0), arith(OP_AND, 5, 6, 5, 0)};
    run_program("alias j!=k");
    chk(c_read == 5, "alias j!=k: five memory fetches");
    chk(c_hit == 0, "alias j!=k: no LOAD hit");
    // ---- 2. alias example, j == k ----
    mem_init[2] = 64'h18;
    run_program("alias j==k");
    chk(c_read == 4, "alias j==k: four memory fetches");
    chk(c_hit == 1, "alias j==k: the LOAD of k is cancelled");
    // ---- 2b. alias example with every line already live ----
    // Five loads make lines 0-4 live in d1-d5; the same eight instructions
    // then need no memory access at all, the low end of the 0-5 range.
    mem_init[2] = 64'h20;
    prog = '{ldst(OP_LOADUDW, 1, 0, 0, 0), ldst(OP_LOADUDW, 2, 0, 0, 8), ldst(OP_LOADUDW, 3, 0, 0, 'h10),
             ldst(OP_LOADSW, 4, 0, 2, 0), ldst(OP_LOADSW, 5, 0, 3, 0),
             ldst(OP_LOADUDW, 1, 0, 0, 0), ldst(OP_LOADUDW, 2, 0, 0, 8), ldst(OP_LOADUDW, 3, 0, 0, 'h10),
             ldst(OP_LOADDUMMY, 6, 0, 1, 0), ldst(OP_LOADSW, 4, 0, 2, 0), ldst(OP_LOADSW, 5, 0, 3, 0),
             arith(OP_ADD, 6, 4, 5, 0), arith(OP_AND, 5, 6, 5, 0)};
    run_program("alias lines live");
    chk(c_read == 5, "alias lines live: only the five preparing loads fetch");
    chk(c_hit == 5, "alias lines live: all five loads of the example hit");
    // ---- 3. lazy store ----
    foreach (mem_init[k]) mem_init[k] = {$urandom, $urandom};
    mem_init[2] = 64'hDDDD_DDDD_DDDD_DDDD; mem_init[4] = 64'hBBBB_BBBB_BBBB_BBBB;
    mem_init[8] = 64'h3333_3333_3333_3333; mem_init[3] = 64'hCCCC_CCCC_CCCC_CCCC;
    mem_init[5] = 64'hAAAA_AAAA_AAAA_AAAA;
    prog = '{ldst(OP_LOADUB, 2, 0, 0, 'h10), ldst(OP_LOADUB, 3, 0, 0, 'h20), ldst(OP_LOADUB, 4, 0, 0, 'h40),
             ldst(OP_LOADUB, 5, 0, 0, 'h18), ldst(OP_LOADDUMMY, 6, 0, 0, 'h78), arith(OP_ADD, 6, 3, 2, 0),
             ldst(OP_LOADUB, 6, 0, 0, 'h28), arith(OP_ADD, 6, 4, 5, 0), ldst(OP_LOADUB, 6, 0, 0, 'h30),
             arith(OP_ADD, 6, 2, 4, 0), ldst(OP_LOADUB, 6, 0, 0, 'h38), ldst(OP_LOADUB, 7, 0, 0, 'h28),
             ldst(OP_LOADUB, 1, 0, 0, 'h30)};
    run_program("lazy store");
    chk(mm[15] == 64'h9898_9898_9898_9898, "lazy store: dd+bb bytes = 98.. written back to line 15");
    chk(c_wbst >= 1, "lazy store: third eviction stalls on a full buffer");
    // ---- 4. scalar add, type casts, aliasing ----
    foreach (mem_init[k]) mem_init[k] = {$urandom, $urandom};
    mem_init[8] = 64'h0005_0001_0003_0004; // d1 bytes
    mem_init[2] = 64'h0000_0000_0005_0004; // d4 bytes
    mem_init[3] = 64'h0000_FFFF_0000_000F; // d5 words
    mem_init[6] = 64'h8001_7FFF_0123_FF80; // signed half words
    prog = '{ldst(OP_LOADUB, 1, 0, 0, 'h44), ldst(OP_LOADUB, 4, 0, 0, 'h12), ldst(OP_LOADUW, 5, 0, 0, 'h1C),
             arith(OP_ADD, 1, 4, 5, 1)};
    run_program("scalar add");
    dbg_lar_idx = 3'd1; #1;
    chk(dbg_lar.data == 64'h0005_0004_0003_0004, $sformatf("scalar add: d1 = %h", dbg_lar.data));
    chk({dbg_lar.tag, dbg_lar.woff} == 64'h44 && dbg_lar.wdsz == 2'b00 && dbg_lar.dirty, "scalar add: d1 fields");
    prog = '{ldst(OP_LOADUB, 1, 0, 0, 'h44), ldst(OP_LOADUB, 4, 0, 0, 'h12), ldst(OP_LOADUW, 5, 0, 0, 'h1C),
             arith(OP_ADD, 1, 4, 5, 1),                 // scalar: byte 4 of d1 becomes 04h
             ldst(OP_LOADSHW, 2, 0, 0, 'h30), ldst(OP_LOADUB, 7, 0, 0, 'h40),   // d7 aliases d1 (hit)
             ldst(OP_LOADSW, 3, 0, 0, 'h18),
             arith(OP_SUB, 3, 2, 4, 0, 1, 0),           // half words (signed) -> words, offset 1
             arith(OP_OR, 1, 3, 2, 0, 0, 0),            // words -> bytes saturating; alias update of d7
             ldst(OP_STORESHW, 4, 0, 0, 'h50),          // type cast d4 to signed half words
             arith(OP_EXOR, 4, 1, 7, 0, 1, 0),          // bytes -> half words, offset 1
             arith(OP_SUB, 7, 4, 2, 1)};                // scalar subtract into d7
    run_program("scalar and casts");
    // ---- 5. hazard timing ----
    foreach (mem_init[k]) mem_init[k] = {$urandom, $urandom};
    prog = '{ldst(OP_LOADUW, 3, 0, 0, 'h28), ldst(OP_LOADUW, 5, 0, 0, 'h30), ldst(OP_LOADUW, 6, 0, 0, 'h38),
             ldst(OP_LOADUW, 7, 0, 0, 'h40),
             ldst(OP_LOADUW, 1, 0, 0, 'h08), ldst(OP_LOADUW, 4, 0, 0, 'h20), ldst(OP_LOADUW, 2, 0, 0, 'h10),
             arith(OP_AND, 3, 2, 4, 0),                 // reads d2 right after its LOAD: 2 bubbles
             arith(OP_ADD, 5, 1, 2, 0),
             arith(OP_AND, 6, 5, 4, 0),                 // reads d5 right after its ADD: 1 bubble
             arith(OP_OR, 7, 5, 6, 0)};                 // d5 two ahead, d6 one ahead: 1 bubble
    run_program("hazards");
    chk(p_bubbles == 4, $sformatf("hazards: %0d bubbles, expected 2 + 1 + 1", p_bubbles));
    chk(c_search == 7, "hazards: one search cycle per LOAD");
    // ---- 6. random programs ----
    for (int r = 0; r < 40; r++) begin
      foreach (mem_init[k]) mem_init[k] = {$urandom, $urandom};
      prog.delete();
      for (int n = 0; n < 24; n++) prog.push_back(rand_instr());
      run_program($sformatf("random %0d", r));
    end

    // mechanisms seen over all programs
    chk(t_hz > 0,     "mechanism: hazard bubble");
    chk(t_search > 0, "mechanism: LOAD search stall");
    chk(t_hit > 0,    "mechanism: LOAD cancelled by a LAR hit");
    chk(t_read > 0,   "mechanism: memory fetch");
    chk(t_buf > 0,    "mechanism: LOAD served by the write buffer");
    chk(t_evict > 0,  "mechanism: eviction of a dirty LAR");
    chk(t_wbst > 0,   "mechanism: write buffer full stall");
    chk(t_fem > 0,    "mechanism: forwarding from EX/MEM");
    chk(t_fmw > 0,    "mechanism: forwarding from MEM/WB");
    chk(t_alias > 0,  "mechanism: associative update");
    chk(t_widen > 0,  "mechanism: sign/zero extension");
    chk(t_narrow > 0, "mechanism: saturating truncation");
    chk(t_scalar > 0, "mechanism: scalar operation");
    $display("totals: bubbles %0d searches %0d hits %0d fetches %0d buffer-hits %0d evictions %0d full-stalls %0d fwd-em %0d fwd-mw %0d alias %0d widen %0d narrow %0d scalar %0d",
             t_hz, t_search, t_hit, t_read, t_buf, t_evict, t_wbst, t_fem, t_fmw, t_alias, t_widen, t_narrow, t_scalar);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
