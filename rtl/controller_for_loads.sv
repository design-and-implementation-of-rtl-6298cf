// controller_for_loads: the LOAD associative-search controller.
//
// Every LOAD that reaches the memory stage first spends one cycle searching
// the DATA LARs for its line. In that cycle this controller raises `ld_stall`
// (its interrupt to the master controller, which freezes every pipeline
// register and the write-back), and captures the search result: hit flag,
// the matching LAR's index and its data line. In the next cycle the LOAD proceeds: on a hit
// `cancel` is high and `hit_data` replaces the memory fetch; on a miss the
// line is fetched from the data memory. The state returns to idle when the
// memory stage advances (`mem_adv`). Timing: 1 extra cycle per LOAD.
module controller_for_loads (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mem_is_load,   // EX/MEM holds a valid LOAD
  input  logic        mem_adv,       // the memory stage advances this cycle
  input  logic        s_hit,         // search result from data_lars
  input  logic [2:0]  s_idx,
  input  logic [63:0] s_data,
  output logic        ld_stall,
  output logic        searching,
  output logic        cancel,
  output logic [2:0]  hit_idx,
  output logic [63:0] hit_data
);
  logic searched, hit_q;
  logic [63:0] data_q;
  logic [2:0]  idx_q;

  assign ld_stall  = mem_is_load && !searched;
  assign searching = ld_stall;
  assign cancel    = searched && hit_q;
  assign hit_data  = data_q;
  assign hit_idx   = idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      searched <= 1'b0;
      hit_q    <= 1'b0;
      data_q   <= '0;
      idx_q    <= '0;
    end else if (ld_stall) begin
      searched <= 1'b1;
      hit_q    <= s_hit;
      data_q   <= s_data;
      idx_q    <= s_idx;
    end else if (mem_adv) begin
      searched <= 1'b0;
      hit_q    <= 1'b0;
    end
  end
endmodule
