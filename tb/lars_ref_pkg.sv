// lars_ref_pkg: reference models used by the testbenches. They are written
// element by element with integer arithmetic, separately from the RTL, so that
// the testbenches compare the hardware against an independent description of
// packed-element conversion, ALU and scalar merge behaviour.
package lars_ref_pkg;

  function automatic int nbytes(input logic [1:0] w);
    return 1 << w;
  endfunction

  // element k of a line as an unsigned value
  function automatic logic [63:0] get_el(input logic [63:0] line, input logic [1:0] w, input int k);
    logic [63:0] r = 0;
    for (int b = 0; b < nbytes(w); b++) r[8*b +: 8] = line[8*(k*nbytes(w)+b) +: 8];
    return r;
  endfunction

  function automatic logic [63:0] put_el(input logic [63:0] line, input logic [1:0] w, input int k,
                                         input logic [63:0] v);
    for (int b = 0; b < nbytes(w); b++) line[8*(k*nbytes(w)+b) +: 8] = v[8*b +: 8];
    return line;
  endfunction

  // signed value of an element of w bytes held in v
  function automatic longint sval(input logic [63:0] v, input logic [1:0] w);
    int bits = 8 * nbytes(w);
    if (bits == 64) return longint'(v);
    if (v[bits-1]) return longint'(v) - (longint'(1) <<< bits);
    return longint'(v);
  endfunction

  function automatic logic [63:0] conv(input logic [63:0] line, input logic [1:0] sw, input logic st,
                                       input logic [1:0] dw, input logic [2:0] off, input logic sv);
    logic [63:0] r = 0;
    int o = sv ? 0 : int'(off);
    int na = 8 / nbytes(sw), nd = 8 / nbytes(dw);
    int dbits = 8 * nbytes(dw);
    if (sw == dw) return line;
    if (sw < dw) begin
      for (int k = 0; k < nd; k++) begin
        int idx = o * nd + k;
        if (idx < na) begin
          logic [63:0] e = get_el(line, sw, idx);
          if (st) e = 64'(sval(e, sw));
          r = put_el(r, dw, k, e);
        end
      end
    end else begin
      for (int k = 0; k < na; k++) begin
        int slot = o * na + k;
        if (slot < nd) begin
          logic [63:0] e = get_el(line, sw, k);
          logic [63:0] s;
          if (st) begin
            longint x = sval(e, sw);
            longint mx = (longint'(1) <<< (dbits - 1)) - 1;
            longint mn = -(longint'(1) <<< (dbits - 1));
            s = (x > mx) ? 64'(mx) : (x < mn) ? 64'(mn) : 64'(x);
          end else begin
            logic [63:0] mx = (dbits == 64) ? '1 : ((64'd1 << dbits) - 1);
            s = (e > mx) ? mx : e;
          end
          r = put_el(r, dw, slot, s);
        end
      end
    end
    return r;
  endfunction

  // op: 0 add, 1 sub, 2 and, 3 or, 4 xor
  function automatic logic [63:0] alu_ref(input logic [63:0] a, input logic [63:0] b,
                                          input int op, input logic [1:0] w);
    logic [63:0] r = 0;
    int n = 8 / nbytes(w);
    case (op)
      2: return a & b;
      3: return a | b;
      4: return a ^ b;
      default: ;
    endcase
    for (int k = 0; k < n; k++) begin
      logic [63:0] x = get_el(a, w, k), y = get_el(b, w, k);
      r = put_el(r, w, k, (op == 0) ? x + y : x - y);
    end
    return r;
  endfunction

  function automatic logic [63:0] extract(input logic [63:0] line, input logic [1:0] w,
                                          input logic [2:0] woff);
    return get_el(line, w, int'(woff) / nbytes(w));
  endfunction

  function automatic logic [63:0] merge(input logic [63:0] old, input logic [63:0] res,
                                        input logic [1:0] w, input logic [2:0] woff);
    return put_el(old, w, int'(woff) / nbytes(w), res);
  endfunction

endpackage
