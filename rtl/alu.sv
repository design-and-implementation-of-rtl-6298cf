// alu: the execute-stage packed-SIMD ALU.
//
// A 64-bit carry-select adder made of eight 8-bit lanes; each lane computes
// its sum for carry-in 0 and 1, and anding_unit picks the real carry-in so
// that carries never cross an element boundary. Element width comes from the
// destination LAR's WDSZ. ADD and SUB (A + ~B + 1 per element) wrap around
// modulo the element size. AND, OR and EXOR are bitwise. ALU_ADD64 is a plain
// 64-bit add, used for the final step of the effective-address calculation.
// Combinational.
module alu
  import lars_pkg::*;
(
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  alu_op_e     op,
  input  logic [1:0]  wdsz,
  output logic [63:0] y
);
  logic        sub;
  logic [1:0]  lane_wdsz;
  logic [63:0] bb, sum;
  logic [8:0]  s0 [8];
  logic [8:0]  s1 [8];
  logic [7:0]  co0, co1, cin, cout;

  assign sub       = (op == ALU_SUB);
  assign lane_wdsz = (op == ALU_ADD64) ? 2'b11 : wdsz;
  assign bb        = sub ? ~b : b;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      s0[i]  = {1'b0, a[8*i +: 8]} + {1'b0, bb[8*i +: 8]};
      s1[i]  = {1'b0, a[8*i +: 8]} + {1'b0, bb[8*i +: 8]} + 9'd1;
      co0[i] = s0[i][8];
      co1[i] = s1[i][8];
    end
  end

  anding_unit u_and (.co0, .co1, .wdsz(lane_wdsz), .cin0(sub), .cin, .cout);

  always_comb begin
    for (int i = 0; i < 8; i++)
      sum[8*i +: 8] = cin[i] ? s1[i][7:0] : s0[i][7:0];
  end

  always_comb begin
    unique case (op)
      ALU_ADD, ALU_SUB, ALU_ADD64: y = sum;
      ALU_AND:                     y = a & b;
      ALU_OR:                      y = a | b;
      ALU_XOR:                     y = a ^ b;
      default:                     y = sum;
    endcase
  end
endmodule
