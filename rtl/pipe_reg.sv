// pipe_reg: one pipeline register (IF/ID, ID/CONV, CONV/EX, EX/MEM, MEM/WB).
//
// Loads `d` on a clock edge when `en` is high; holds when it is low (a stall).
// `bubble` loads all zeros instead, which the decoder reads as a NO-OP with
// every valid bit clear. Reset also clears it. `bubble` wins over `en`.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic bubble,
  input  T     d,
  output T     q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      q <= T'(0);
    else if (bubble) q <= T'(0);
    else if (en)     q <= d;
endmodule
