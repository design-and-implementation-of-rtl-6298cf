// hazard_detection_unit: stalls the decode stage when forwarding cannot help.
//
// Results are forwarded into the conversion stage (where operands are
// converted before the ALU), never into the ALU itself, so:
//  * an arithmetic result is available from EX/MEM; a reader directly behind
//    its producer must wait 1 cycle;
//  * a LOAD/STORE/LOADDUMMY result is available only from MEM/WB; a reader
//    directly behind waits 2 cycles, one two places behind waits 1.
// The instruction in decode reads SRC1 and SRC2 and, for arithmetic, its
// destination LAR (type, word offset and old data); a STORE or LOADDUMMY also
// reads its destination, whose data it keeps. A read depends on a
// producer when the LAR index matches, or, for an arithmetic producer, when
// the LAR read is valid and holds the same line tag (the producer's
// associative update will change it). The tags and valid bits given here must
// already reflect a LOAD/STORE/LOADDUMMY further ahead that re-addresses the
// LAR (the core takes them from the memory stage). On a dependence `stall` is raised: the master controller
// holds PC and IF/ID and sends a bubble down. Combinational.
module hazard_detection_unit
  import lars_pkg::*;
(
  // instruction in decode
  input  ctrl_t            id_ctrl,
  input  logic [2:0]       id_src1,
  input  logic [2:0]       id_src2,
  input  logic [2:0]       id_dst,
  input  logic [TAG_W-1:0] id_tag1,    // tags of the LARs it reads
  input  logic [TAG_W-1:0] id_tag2,
  input  logic [TAG_W-1:0] id_tagd,
  input  logic             id_v1,      // valid bits of those LARs
  input  logic             id_v2,
  input  logic             id_vd,
  // instruction in the conversion stage (one ahead)
  input  ctrl_t            cv_ctrl,
  input  logic [2:0]       cv_dst,
  input  logic [TAG_W-1:0] cv_dtag,
  // instruction in the execute stage (two ahead)
  input  ctrl_t            ex_ctrl,
  input  logic [2:0]       ex_dst,
  output logic             stall
);
  logic use_d;
  logic m_cv_idx, m_cv_tag, m_ex_idx;

  assign use_d = id_ctrl.is_alu || (id_ctrl.is_addr && !id_ctrl.is_load);

  always_comb begin
    m_cv_idx = (id_src1 == cv_dst) || (id_src2 == cv_dst) || (use_d && id_dst == cv_dst);
    m_cv_tag = (id_v1 && id_tag1 == cv_dtag) || (id_v2 && id_tag2 == cv_dtag) ||
               (use_d && id_vd && id_tagd == cv_dtag);
    m_ex_idx = (id_src1 == ex_dst) || (id_src2 == ex_dst) || (use_d && id_dst == ex_dst);
    stall = 1'b0;
    if (id_ctrl.valid) begin
      if (cv_ctrl.valid && cv_ctrl.is_alu  && (m_cv_idx || m_cv_tag)) stall = 1'b1;
      if (cv_ctrl.valid && cv_ctrl.is_addr && m_cv_idx)               stall = 1'b1;
      if (ex_ctrl.valid && ex_ctrl.is_addr && m_ex_idx)               stall = 1'b1;
    end
  end
endmodule
