// master_controller: turns the stall interrupts into pipeline controls.
//
// Interrupts in priority order:
//  * ld_stall (controller for loads) and wb_stall (write buffer full while an
//    eviction is pending) freeze the whole machine for the cycle: PC, all five
//    pipeline registers and the LAR write-back hold;
//  * hz_stall (hazard detection) holds PC and IF/ID and inserts a NO-OP bubble
//    into ID/CONV; the older instructions move on.
// Otherwise everything advances. `mem_adv` tells the memory stage it moves on.
// The data memory here answers in one cycle and never interrupts.
// Combinational.
module master_controller (
  input  logic ld_stall,
  input  logic wb_stall,
  input  logic hz_stall,
  output logic pc_en,
  output logic ifid_en,
  output logic idconv_en,
  output logic idconv_bubble,
  output logic convex_en,
  output logic exmem_en,
  output logic memwb_en,
  output logic wb_en,
  output logic mem_adv
);
  logic freeze;
  assign freeze        = ld_stall | wb_stall;
  assign pc_en         = !freeze && !hz_stall;
  assign ifid_en       = !freeze && !hz_stall;
  assign idconv_en     = !freeze;
  assign idconv_bubble = !freeze && hz_stall;
  assign convex_en     = !freeze;
  assign exmem_en      = !freeze;
  assign memwb_en      = !freeze;
  assign wb_en         = !freeze;
  assign mem_adv       = !freeze;
endmodule
