// forwarding_unit: data/address/type forwarding for one LAR operand.
//
// Sits at the conversion stage, one instance per operand (SRC1, SRC2, DEST).
// It takes the LAR record read in decode and replaces it with a newer one in
// flight:
//  * by index: a producer whose destination is this LAR supplies the whole
//    record (data, address, WDSZ, TYP, dirty);
//  * by line tag: an arithmetic producer whose destination holds the same line
//    supplies only the data (its associative update would have done the same),
//    provided the LAR read is valid (`rv_in`, or made valid by an index match
//    from MEM/WB): a LAR never written takes no associative update.
// Sources: the MEM/WB register (any producer) and, younger and so taking
// precedence, the EX/MEM result of an arithmetic producer. Address-class
// producers in EX/MEM are never forwarded from there; the hazard unit keeps
// their readers back. `sel` reports the source used (0 none, 1 MEM/WB,
// 2 EX/MEM). Combinational.
module forwarding_unit
  import lars_pkg::*;
(
  input  logic [2:0] idx,
  input  lar_t       rd_in,
  input  logic       rv_in,
  // EX/MEM producer (arithmetic only)
  input  logic       em_valid,
  input  logic [2:0] em_dst,
  input  lar_t       em_lar,
  // MEM/WB producer
  input  logic       mw_valid,
  input  logic       mw_alu,
  input  logic [2:0] mw_dst,
  input  lar_t       mw_lar,
  output lar_t       rd_out,
  output logic [1:0] sel
);
  logic v;

  always_comb begin
    rd_out = rd_in;
    v      = rv_in;
    sel    = 2'd0;
    if (mw_valid) begin
      if (mw_dst == idx) begin
        rd_out = mw_lar;
        v      = 1'b1;
        sel    = 2'd1;
      end else if (mw_alu && v && rd_out.tag == mw_lar.tag) begin
        rd_out.data = mw_lar.data;
        sel         = 2'd1;
      end
    end
    if (em_valid) begin
      if (em_dst == idx) begin
        rd_out = em_lar;
        sel    = 2'd2;
      end else if (v && rd_out.tag == em_lar.tag) begin
        rd_out.data = em_lar.data;
        sel         = 2'd2;
      end
    end
  end
endmodule
