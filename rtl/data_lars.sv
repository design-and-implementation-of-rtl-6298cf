// data_lars: the DATA LAR register set with associative search and update.
//
// NLARS registers of 132 bits each (lars_pkg::lar_t): a 64-bit packed data
// line, a 61-bit tag and 3-bit word offset that together hold the line's
// address, WDSZ, TYP and a dirty bit. All reset to zero.
//
// Ports:
//  * three combinational read ports (SRC1, SRC2, DEST of the decode stage).
//    A write in the same cycle is bypassed to them, including an alias update,
//    so a reader never sees a value one cycle old. `rv` is the LAR's valid
//    bit (1 also when the same-cycle write targets it);
//  * one write port (write-back stage). `alias_upd` marks an arithmetic
//    result: besides the destination, every other LAR whose tag equals the
//    written tag takes the new data line (associative update). Loads and
//    type-casts write only their destination;
//  * a write-old port returning the current record at `widx`, used to evict a
//    dirty line before it is overwritten;
//  * an associative search port: `s_tag` is compared with every valid LAR's
//    tag; the lowest-numbered match is returned. With `s_excl` high, LAR
//    `s_excl_idx` is left out: the core uses this for a LAR whose record is
//    about to be replaced by the instruction waiting in write-back.
// Search and update compare tags (line addresses), not the word offset: a LAR
// holds the whole line, so any LAR with the same tag holds the same data. That
// reading, and the lowest-index priority, are this design's choices. So is a
// valid bit per LAR, cleared by reset and set by the first write: a LAR that
// was never written (address 0, data 0) must not answer a search for line 0
// or take part in an associative update.
// `w_aliased` and the dbg port are for observation.
module data_lars
  import lars_pkg::*;
#(
  parameter int unsigned NLARS = 8,
  parameter int unsigned IW    = $clog2(NLARS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // read ports
  input  logic [IW-1:0]    ra [3],
  output lar_t             rd [3],
  output logic             rv [3],
  // write port
  input  logic             we,
  input  logic [IW-1:0]    widx,
  input  lar_t             wlar,
  input  logic             alias_upd,
  output lar_t             wold,
  // associative search
  input  logic [TAG_W-1:0] s_tag,
  input  logic             s_excl,
  input  logic [IW-1:0]    s_excl_idx,
  output logic             s_hit,
  output logic [IW-1:0]    s_idx,
  output lar_t             s_lar,
  // observation
  output logic             w_aliased,
  input  logic [IW-1:0]    dbg_idx,
  output lar_t             dbg_lar
);
  lar_t             lars [NLARS];
  logic [NLARS-1:0] valid;     // set by the first write after reset

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLARS; i++) lars[i] <= '0;
      valid <= '0;
    end else if (we) begin
      for (int i = 0; i < NLARS; i++) begin
        if (IW'(i) == widx) begin
          lars[i]  <= wlar;
          valid[i] <= 1'b1;
        end else if (alias_upd && valid[i] && lars[i].tag == wlar.tag)
          lars[i].data <= wlar.data;
      end
    end
  end

  // read ports with write-through bypass
  always_comb begin
    for (int p = 0; p < 3; p++) begin
      rd[p] = lars[ra[p]];
      rv[p] = valid[ra[p]];
      if (we) begin
        if (ra[p] == widx) begin
          rd[p] = wlar;
          rv[p] = 1'b1;
        end else if (alias_upd && valid[ra[p]] && rd[p].tag == wlar.tag)
          rd[p].data = wlar.data;
      end
    end
  end

  assign wold    = lars[widx];
  assign dbg_lar = lars[dbg_idx];

  // another LAR holds the line being written (an alias update will happen)
  always_comb begin
    w_aliased = 1'b0;
    for (int i = 0; i < NLARS; i++)
      if (IW'(i) != widx && valid[i] && lars[i].tag == wlar.tag) w_aliased = 1'b1;
  end

  // associative search, lowest index wins
  always_comb begin
    s_hit = 1'b0;
    s_idx = '0;
    for (int i = NLARS - 1; i >= 0; i--) begin
      if (valid[i] && lars[i].tag == s_tag && !(s_excl && IW'(i) == s_excl_idx)) begin
        s_hit = 1'b1;
        s_idx = IW'(i);
      end
    end
    s_lar = lars[s_idx];
  end
endmodule
