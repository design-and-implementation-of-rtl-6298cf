// anding_unit: carry management between the ALU's eight 8-bit adder lanes.
//
// The execute-stage adder is a carry-select adder built from eight 8-bit
// lanes; each lane offers a carry-out for carry-in 0 (co0) and carry-in 1
// (co1). This unit produces each lane's real carry-in: a lane that starts a
// packed element (per WDSZ) gets `cin0` (1 for subtraction, 0 for addition);
// any other lane gets the selected carry-out of the lane below, i.e. the
// carry chain is ANDed with "same element". `cout` is each lane's selected
// carry-out. Lane 0 always starts an element, so cin[0] always equals cin0;
// it is kept as an output so the ALU can treat all lanes alike. Combinational.
module anding_unit
  import lars_pkg::*;
(
  input  logic [7:0] co0,
  input  logic [7:0] co1,
  input  logic [1:0] wdsz,
  input  logic       cin0,
  output logic [7:0] cin,
  output logic [7:0] cout
);
  logic [7:0] start;
  assign start = lane_start(wdsz);

  logic c;

  always_comb begin
    c = cin0;
    for (int i = 0; i < 8; i++) begin
      if (start[i]) c = cin0;
      cin[i]  = c;
      c       = c ? co1[i] : co0[i];
      cout[i] = c;
    end
  end
endmodule
