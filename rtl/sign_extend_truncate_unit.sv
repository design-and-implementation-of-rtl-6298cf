// sign_extend_truncate_unit: aligns an operand to the ALU's element width.
//
// The ALU works on elements the size of the destination LAR's WDSZ. An operand
// whose own WDSZ differs is converted here, in the conversion stage:
//  * same size: passed unchanged;
//  * smaller source elements (widening): the destination holds N = 8 >> dst_wdsz
//    elements; source elements off*N .. off*N+N-1 are each zero-extended
//    (unsigned source) or sign-extended (signed source) into destination
//    elements 0..N-1. E.g. bytes to words with off = 1 takes bytes 2 and 3;
//  * larger source elements (narrowing): the M = 8 >> src_wdsz source elements
//    are each saturated to the destination width and placed in destination
//    element slots off*M .. off*M+M-1; every other bit is zero.
// `off` is the instruction's 3-bit operand offset field; with `sv` high
// (scalar) the element was already moved to bit 0 and `off` is treated as 0.
// Saturation uses the source's signedness: unsigned values above the largest
// destination value become all ones; signed values are clamped to
// [-2^(n-1), 2^(n-1)-1].
// Combinational.
module sign_extend_truncate_unit (
  input  logic [63:0] din,
  input  logic [1:0]  src_wdsz,
  input  logic        src_typ,
  input  logic [1:0]  dst_wdsz,
  input  logic [2:0]  off,
  input  logic        sv,
  output logic [63:0] dout
);
  function automatic logic [63:0] size_mask(input logic [1:0] w);
    case (w)
      2'b00:   return 64'h0000_0000_0000_00FF;
      2'b01:   return 64'h0000_0000_0000_FFFF;
      2'b10:   return 64'h0000_0000_FFFF_FFFF;
      default: return '1;
    endcase
  endfunction

  logic [63:0] ma, md;
  logic [6:0]  sa, sd;      // element sizes in bits
  logic [3:0]  na, nd;      // element counts
  logic [2:0]  o;
  logic [63:0] v, sat;
  logic [6:0]  idx;
  logic signed [63:0] sv_v, smax, smin;

  always_comb begin
    ma   = size_mask(src_wdsz);
    md   = size_mask(dst_wdsz);
    sa   = 7'd8 << src_wdsz;
    sd   = 7'd8 << dst_wdsz;
    na   = 4'd8 >> src_wdsz;
    nd   = 4'd8 >> dst_wdsz;
    o    = sv ? 3'd0 : off;
    dout = '0;
    v    = '0;
    sat  = '0;
    idx  = '0;
    sv_v = '0;
    smax = '0;
    smin = '0;
    if (src_wdsz == dst_wdsz) begin
      dout = din;
    end else if (src_wdsz < dst_wdsz) begin
      for (int k = 0; k < 8; k++) begin
        idx = 7'(o) * 7'(nd) + 7'(k);
        if (k < int'(nd) && idx < 7'(na)) begin
          v = (din >> (idx * sa)) & ma;
          if (src_typ && v[6'(sa - 7'd1)]) v = v | ~ma;
          dout = dout | ((v & md) << (7'(k) * sd));
        end
      end
    end else begin
      smax = signed'(md >> 1);
      smin = ~smax;
      for (int k = 0; k < 8; k++) begin
        idx = 7'(o) * 7'(na) + 7'(k);
        if (k < int'(na) && idx < 7'(nd)) begin
          v = (din >> (7'(k) * sa)) & ma;
          if (src_typ) begin
            sv_v = signed'(v[6'(sa - 7'd1)] ? (v | ~ma) : v);
            if (sv_v > smax)      sat = 64'(smax);
            else if (sv_v < smin) sat = 64'(smin);
            else                  sat = 64'(sv_v);
          end else begin
            sat = (v > md) ? md : v;
          end
          dout = dout | ((sat & md) << (idx * sd));
        end
      end
    end
  end
endmodule
