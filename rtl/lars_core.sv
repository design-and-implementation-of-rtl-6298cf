// lars_core: six-stage pipelined processor whose registers are DATA LARs.
//
// Stages: IF (PC, instruction register file) -> ID (decode, LAR read, hazard
// detection) -> CONV (forwarding, scalar mask/shift, sign-extend/truncate,
// effective-address first add) -> EX (packed carry-select ALU, final EA add)
// -> MEM (scalar output merge, LOAD associative search / data memory) -> WB
// (LAR write with associative update, eviction of dirty lines to the write
// buffer). Pipeline registers IF/ID, ID/CONV, CONV/EX, EX/MEM, MEM/WB.
//
// Instruction classes:
//  * LOADxx d,s1,s2,imm: EA = s1.address + s2.data + sext(imm). In MEM the
//    pipeline freezes one cycle while the LARs are searched for the EA's line;
//    on a hit the fetch is cancelled and the LAR copy is used, else the line is
//    read from the data memory (or from the write buffer if it waits there).
//    d gets the line, the EA as its address, the opcode's WDSZ/TYP, dirty = 0.
//  * STORExx / LOADDUMMY: same EA; d keeps its data and takes the EA and the
//    type (STORE: from the opcode; LOADDUMMY: from the SRC1 LAR). No memory
//    access.
//  * ADD/SUB/AND/OR/EXOR d,s1,s2 (vector or scalar): operands converted to
//    d's element width, result written to d (dirty) and to every LAR holding
//    the same line.
// Overwriting a dirty LAR with a LOAD/STORE/LOADDUMMY first pushes its line
// into the write buffer. Lines stay there until an eviction finds the buffer
// full: the machine then stalls for one cycle while the oldest line is written
// to the data memory. A LOAD that misses in the LARs looks in the write buffer
// before the data memory.
// Because the instruction ahead of a LOAD sits in WB during the search, the
// LOAD's line is taken, in order, from: that instruction if it writes the same
// line (its LOAD/STORE/LOADDUMMY record only if no lower-numbered LAR hit),
// the search hit, the line evicted this cycle, the write buffer, memory. The
// search leaves out the LAR a LOAD/STORE/LOADDUMMY in WB is replacing. These
// orderings, the valid bits and the tag-based alias hazards (valid LARs only,
// using the tags the LARs will hold after EX and MEM) are this design's own;
// the description does not cover them. STORE and LOADDUMMY read their
// destination (they keep its data), so they wait for a pending result to it.
//
// Interface: hold rst_n low while loading the program (prog_*) and the data
// memory (dm_init_*); release to run. The dbg_* ports read any LAR and any
// memory line combinationally; the ev_* outputs pulse for one cycle per event
// so a testbench can count them. Defaults follow the processor description
// (8 LARs, 32 instructions, 16 memory lines, 2 write-buffer entries).
module lars_core
  import lars_pkg::*;
#(
  parameter int unsigned NLARS      = 8,
  parameter int unsigned IMEM_DEPTH = 32,
  parameter int unsigned DMEM_DEPTH = 16,
  parameter int unsigned WBUF_DEPTH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // program and data loading (while in reset)
  input  logic        prog_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] prog_addr,
  input  logic [31:0] prog_data,
  input  logic        dm_init_we,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dm_init_addr,
  input  logic [63:0] dm_init_data,
  // observation
  input  logic [2:0]  dbg_lar_idx,
  output lar_t        dbg_lar,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dbg_dm_addr,
  output logic [63:0] dbg_dm_data,
  output logic [$clog2(IMEM_DEPTH)-1:0] pc,
  output logic        ev_retire,     // an instruction wrote its LAR
  output logic        ev_hz_stall,   // hazard bubble inserted
  output logic        ev_ld_search,  // LOAD search cycle
  output logic        ev_ld_hit,     // LOAD satisfied from a LAR (fetch cancelled)
  output logic        ev_mem_read,   // line fetched from the data memory
  output logic        ev_wbuf_fwd,   // line taken from the write buffer
  output logic        ev_evict,      // dirty line pushed into the write buffer
  output logic        ev_wb_stall,   // stall because the write buffer was full
  output logic        ev_drain,      // write buffer wrote a line to memory
  output logic        ev_fwd_em,     // operand forwarded from EX/MEM
  output logic        ev_fwd_mw,     // operand forwarded from MEM/WB
  output logic        ev_alias_upd   // associative update of another LAR
);
  localparam int unsigned IAW = $clog2(IMEM_DEPTH);
  localparam int unsigned DAW = $clog2(DMEM_DEPTH);

  // ---------------- pipeline register contents ----------------
  typedef struct packed {
    ctrl_t      ctrl;
    logic [2:0] src1, src2, dst;
    logic [2:0] off1, off2;
    logic [11:0] imm;
    lar_t       r1, r2, rd;
    logic       v1, v2, vd;   // valid bits of the three LARs read
  } idconv_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [2:0]  dst;
    logic [63:0] opa, opb;
    lar_t        rd;        // destination record (forwarded)
    logic [1:0]  new_wdsz;
    logic        new_typ;
  } convex_t;

  typedef struct packed {
    ctrl_t       ctrl;
    logic [2:0]  dst;
    logic [63:0] y;
    lar_t        rd;
    logic [1:0]  new_wdsz;
    logic        new_typ;
  } exmem_t;

  typedef struct packed {
    ctrl_t      ctrl;
    logic [2:0] dst;
    lar_t       lar;        // new destination record
  } memwb_t;

  // ---------------- controls ----------------
  logic ld_stall, wb_stall, hz_stall;
  logic pc_en, ifid_en, idconv_en, idconv_bubble, convex_en, exmem_en, memwb_en, wb_en, mem_adv;

  master_controller u_mc (
    .ld_stall, .wb_stall, .hz_stall,
    .pc_en, .ifid_en, .idconv_en, .idconv_bubble, .convex_en,
    .exmem_en, .memwb_en, .wb_en, .mem_adv
  );

  // ---------------- IF ----------------
  logic [31:0] if_instr;
  instr_t      id_instr;

  pc_unit #(.AW(IAW)) u_pc (.clk, .rst_n, .en(pc_en), .pc);

  inst_reg_file #(.DEPTH(IMEM_DEPTH)) u_irf (
    .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data),
    .raddr(pc), .rdata(if_instr)
  );

  pipe_reg #(.T(instr_t)) u_ifid (
    .clk, .rst_n, .en(ifid_en), .bubble(1'b0), .d(instr_t'(if_instr)), .q(id_instr)
  );

  // ---------------- ID ----------------
  ctrl_t   id_ctrl;
  idconv_t id_d, cv;
  lar_t    rdp [3];
  logic    rvp [3];
  logic [2:0] rap [3];
  logic        wb_we, wb_alias;
  memwb_t      mw;
  lar_t        wb_old;
  logic [TAG_W-1:0] s_tag;
  logic        s_hit;
  logic [2:0]  s_idx;
  lar_t        s_lar;
  logic        alias_any;

  datapath_controller u_dc (.op(id_instr.op), .sv(id_instr.sv), .ctrl(id_ctrl));

  assign rap[0] = id_instr.src1[2:0];
  assign rap[1] = id_instr.src2[2:0];
  assign rap[2] = id_instr.dst[2:0];

  data_lars #(.NLARS(NLARS)) u_lars (
    .clk, .rst_n,
    .ra(rap), .rd(rdp), .rv(rvp),
    .we(wb_we), .widx(mw.dst), .wlar(mw.lar), .alias_upd(wb_alias), .wold(wb_old),
    .s_tag, .s_excl(mw.ctrl.valid && mw.ctrl.is_addr), .s_excl_idx(mw.dst),
    .s_hit, .s_idx, .s_lar,
    .w_aliased(alias_any), .dbg_idx(dbg_lar_idx), .dbg_lar
  );

  always_comb begin
    id_d      = '0;
    id_d.ctrl = id_ctrl;
    id_d.src1 = id_instr.src1[2:0];
    id_d.src2 = id_instr.src2[2:0];
    id_d.dst  = id_instr.dst[2:0];
    id_d.off1 = id_instr.off1;
    id_d.off2 = id_instr.off2;
    id_d.imm  = {id_instr.sv, id_instr.off1, id_instr.off2, id_instr.doff, id_instr.unused};
    id_d.r1   = rdp[0];
    id_d.r2   = rdp[1];
    id_d.rd   = rdp[2];
    id_d.v1   = rvp[0];
    id_d.v2   = rvp[1];
    id_d.vd   = rvp[2];
  end

  // Tag and valid bit each LAR read will have once the instructions in EX and
  // MEM have written it back: the alias check of the hazard unit needs them.
  // (A LOAD/STORE/LOADDUMMY in EX writing the LAR stalls the reader anyway.)
  convex_t cx;
  exmem_t  em;
  logic [TAG_W-1:0] hz_tag [3];
  logic             hz_v [3];

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      hz_tag[p] = rdp[p].tag;
      hz_v[p]   = rvp[p];
      if (em.ctrl.valid && em.dst == rap[p]) begin
        hz_tag[p] = em.ctrl.is_addr ? em.y[63:3] : em.rd.tag;
        hz_v[p]   = 1'b1;
      end
      if (cx.ctrl.valid && cx.dst == rap[p]) begin
        hz_tag[p] = cx.rd.tag;
        hz_v[p]   = 1'b1;
      end
    end
  end

  lar_t    f1, f2, fd;

  hazard_detection_unit u_hdu (
    .id_ctrl, .id_src1(rap[0]), .id_src2(rap[1]), .id_dst(rap[2]),
    .id_tag1(hz_tag[0]), .id_tag2(hz_tag[1]), .id_tagd(hz_tag[2]),
    .id_v1(hz_v[0]), .id_v2(hz_v[1]), .id_vd(hz_v[2]),
    .cv_ctrl(cv.ctrl), .cv_dst(cv.dst), .cv_dtag(fd.tag),
    .ex_ctrl(cx.ctrl), .ex_dst(cx.dst), .stall(hz_stall)
  );

  pipe_reg #(.T(idconv_t)) u_idconv (
    .clk, .rst_n, .en(idconv_en), .bubble(idconv_bubble), .d(id_d), .q(cv)
  );

  // ---------------- CONV ----------------
  lar_t   em_lar;
  logic   em_fwd_ok;
  logic [1:0] sel1, sel2, seld;

  assign em_fwd_ok = em.ctrl.valid && em.ctrl.is_alu;

  forwarding_unit u_fw1 (.idx(cv.src1), .rd_in(cv.r1), .rv_in(cv.v1),
    .em_valid(em_fwd_ok), .em_dst(em.dst), .em_lar,
    .mw_valid(mw.ctrl.valid), .mw_alu(mw.ctrl.is_alu), .mw_dst(mw.dst), .mw_lar(mw.lar),
    .rd_out(f1), .sel(sel1));
  forwarding_unit u_fw2 (.idx(cv.src2), .rd_in(cv.r2), .rv_in(cv.v2),
    .em_valid(em_fwd_ok), .em_dst(em.dst), .em_lar,
    .mw_valid(mw.ctrl.valid), .mw_alu(mw.ctrl.is_alu), .mw_dst(mw.dst), .mw_lar(mw.lar),
    .rd_out(f2), .sel(sel2));
  forwarding_unit u_fwd (.idx(cv.dst), .rd_in(cv.rd), .rv_in(cv.vd),
    .em_valid(em_fwd_ok), .em_dst(em.dst), .em_lar,
    .mw_valid(mw.ctrl.valid), .mw_alu(mw.ctrl.is_alu), .mw_dst(mw.dst), .mw_lar(mw.lar),
    .rd_out(fd), .sel(seld));

  logic [63:0] ms1, ms2, cv1, cv2, ea1;
  convex_t     cx_d;

  mask_shift_scalar_unit u_ms1 (.din(f1.data), .wdsz(f1.wdsz), .woff(f1.woff), .sv(cv.ctrl.sv), .dout(ms1));
  mask_shift_scalar_unit u_ms2 (.din(f2.data), .wdsz(f2.wdsz), .woff(f2.woff), .sv(cv.ctrl.sv), .dout(ms2));

  sign_extend_truncate_unit u_se1 (.din(ms1), .src_wdsz(f1.wdsz), .src_typ(f1.typ),
    .dst_wdsz(fd.wdsz), .off(cv.off1), .sv(cv.ctrl.sv), .dout(cv1));
  sign_extend_truncate_unit u_se2 (.din(ms2), .src_wdsz(f2.wdsz), .src_typ(f2.typ),
    .dst_wdsz(fd.wdsz), .off(cv.off2), .sv(cv.ctrl.sv), .dout(cv2));

  ea_calc_unit u_ea (.addr({f1.tag, f1.woff}), .imm(cv.imm), .ea_part(ea1));

  always_comb begin
    cx_d          = '0;
    cx_d.ctrl     = cv.ctrl;
    cx_d.dst      = cv.dst;
    cx_d.rd       = fd;
    // LOAD/ALU multiplexer: address class takes the EA path
    cx_d.opa      = cv.ctrl.is_addr ? ea1     : cv1;
    cx_d.opb      = cv.ctrl.is_addr ? f2.data : cv2;
    cx_d.new_wdsz = cv.ctrl.is_dummy ? f1.wdsz : cv.ctrl.new_wdsz;
    cx_d.new_typ  = cv.ctrl.is_dummy ? f1.typ  : cv.ctrl.new_typ;
  end

  pipe_reg #(.T(convex_t)) u_convex (
    .clk, .rst_n, .en(convex_en), .bubble(1'b0), .d(cx_d), .q(cx)
  );

  // ---------------- EX ----------------
  logic [63:0] ex_y;
  exmem_t      em_d;

  alu u_alu (.a(cx.opa), .b(cx.opb), .op(cx.ctrl.alu_op), .wdsz(cx.rd.wdsz), .y(ex_y));

  always_comb begin
    em_d          = '0;
    em_d.ctrl     = cx.ctrl;
    em_d.dst      = cx.dst;
    em_d.y        = ex_y;
    em_d.rd       = cx.rd;
    em_d.new_wdsz = cx.new_wdsz;
    em_d.new_typ  = cx.new_typ;
  end

  pipe_reg #(.T(exmem_t)) u_exmem (
    .clk, .rst_n, .en(exmem_en), .bubble(1'b0), .d(em_d), .q(em)
  );

  // ---------------- MEM ----------------
  logic [63:0] so_data, dm_rdata, ld_data;
  logic        cancel, searching;
  logic [63:0] hit_data;
  logic [2:0]  hit_idx;
  logic        wb_lk_hit;
  logic [63:0] wb_lk_data;
  logic        mem_load, mem_read_now;
  memwb_t      mw_d;
  logic        drain_valid, wbuf_full, wbuf_empty;
  logic [TAG_W-1:0] drain_tag;
  logic [63:0] drain_data;
  logic        evict;

  scalar_output_unit u_so (.old_data(em.rd.data), .result(em.y), .wdsz(em.rd.wdsz),
    .woff(em.rd.woff), .sv(em.ctrl.sv), .dout(so_data));

  always_comb begin
    em_lar       = em.rd;
    em_lar.data  = so_data;
    em_lar.dirty = 1'b1;
  end

  assign mem_load = em.ctrl.valid && em.ctrl.is_load;
  assign s_tag    = em.y[63:3];

  controller_for_loads u_cfl (
    .clk, .rst_n, .mem_is_load(mem_load), .mem_adv,
    .s_hit, .s_idx, .s_data(s_lar.data),
    .ld_stall, .searching, .cancel, .hit_idx, .hit_data
  );

  data_memory #(.DEPTH(DMEM_DEPTH)) u_dm (
    .clk,
    .we(dm_init_we || drain_valid),
    .waddr(dm_init_we ? dm_init_addr : drain_tag[DAW-1:0]),
    .wdata(dm_init_we ? dm_init_data : drain_data),
    .raddr(em.y[3 +: DAW]), .rdata(dm_rdata),
    .dbg_addr(dbg_dm_addr), .dbg_data(dbg_dm_data)
  );

  // The search ran while the instruction ahead of the LOAD was held in WB, so
  // the LOAD must see the LARs as they are once that instruction has written:
  //  * a LOAD/STORE/LOADDUMMY there replaces LAR mw.dst, which the search
  //    therefore left out; if its new record holds the line, it competes with
  //    the search hit by index (lowest wins, as in the search itself);
  //  * an arithmetic result for the line updates every LAR holding it, so it
  //    is the line's data whatever the search found;
  //  * a dirty line it evicts is on its way into the write buffer.
  // All of these come before the data memory.
  logic mw_alu_line, mw_addr_line, use_mw, ev_line, ld_hit, ld_buf;
  assign mw_alu_line  = mw.ctrl.valid && mw.ctrl.is_alu  && mw.lar.tag == s_tag;
  assign mw_addr_line = mw.ctrl.valid && mw.ctrl.is_addr && mw.lar.tag == s_tag;
  assign use_mw  = mw_alu_line || (mw_addr_line && !(cancel && hit_idx < mw.dst));
  assign ev_line = evict && wb_old.tag == s_tag;
  assign ld_hit  = cancel || mw_alu_line || mw_addr_line;
  assign ld_buf  = !ld_hit && (wb_lk_hit || ev_line);

  assign mem_read_now = mem_load && !ld_stall && mem_adv && !ld_hit && !ld_buf;

  always_comb begin
    if (use_mw)         ld_data = mw.lar.data;
    else if (cancel)    ld_data = hit_data;
    else if (ev_line)   ld_data = wb_old.data;
    else if (wb_lk_hit) ld_data = wb_lk_data;
    else                ld_data = dm_rdata;
  end

  always_comb begin
    mw_d      = '0;
    mw_d.ctrl = em.ctrl;
    mw_d.dst  = em.dst;
    if (em.ctrl.is_addr) begin
      mw_d.lar.data  = em.ctrl.is_load ? ld_data : em.rd.data;
      mw_d.lar.tag   = em.y[63:3];
      mw_d.lar.woff  = em.y[2:0];
      mw_d.lar.wdsz  = em.new_wdsz;
      mw_d.lar.typ   = em.new_typ;
      mw_d.lar.dirty = 1'b0;
    end else begin
      mw_d.lar = em_lar;
    end
  end

  pipe_reg #(.T(memwb_t)) u_memwb (
    .clk, .rst_n, .en(memwb_en), .bubble(1'b0), .d(mw_d), .q(mw)
  );

  // ---------------- WB ----------------
  assign evict    = mw.ctrl.valid && mw.ctrl.is_addr && wb_old.dirty;
  assign wb_stall = evict && wbuf_full;
  assign wb_we    = wb_en && mw.ctrl.valid;
  assign wb_alias = mw.ctrl.is_alu;

  write_buffer #(.DEPTH(WBUF_DEPTH)) u_wbuf (
    .clk, .rst_n,
    .push(evict && wb_en), .push_tag(wb_old.tag), .push_data(wb_old.data),
    .full(wbuf_full), .empty(wbuf_empty),
    .drain_ok(wb_stall && !dm_init_we),
    .drain_valid, .drain_tag, .drain_data,
    .lk_tag(s_tag), .lk_hit(wb_lk_hit), .lk_data(wb_lk_data)
  );

  // ---------------- observation ----------------

  assign ev_retire    = wb_we;
  assign ev_hz_stall  = idconv_bubble;
  assign ev_ld_search = searching;
  assign ev_ld_hit    = mem_load && mem_adv && ld_hit;
  assign ev_mem_read  = mem_read_now;
  assign ev_wbuf_fwd  = mem_load && mem_adv && ld_buf;
  assign ev_evict     = evict && wb_en;
  assign ev_wb_stall  = wb_stall;
  assign ev_drain     = drain_valid;
  assign ev_fwd_em    = cv.ctrl.valid && (sel1 == 2'd2 || sel2 == 2'd2 || seld == 2'd2);
  assign ev_fwd_mw    = cv.ctrl.valid && (sel1 == 2'd1 || sel2 == 2'd1 || seld == 2'd1);
  assign ev_alias_upd = wb_we && wb_alias && alias_any;
endmodule
