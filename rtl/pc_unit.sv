// pc_unit: program counter of the fetch stage and its dedicated +1 adder.
//
// The PC indexes the instruction register file one word per instruction. On
// each enabled clock edge the PC takes PC + 1 (the fetch stage's add-only
// adder); when `en` is low (a stall) it holds. Reset clears it to 0. Width is
// the address width of the 32-entry instruction register file. The adder and
// the hold-on-stall behaviour follow the processor block diagram; wrap-around
// at the end of the file is this design's choice.
module pc_unit #(
  parameter int unsigned AW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [AW-1:0] pc
);
  logic [AW-1:0] pc_plus1;
  assign pc_plus1 = pc + AW'(1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  pc <= '0;
    else if (en) pc <= pc_plus1;
endmodule
