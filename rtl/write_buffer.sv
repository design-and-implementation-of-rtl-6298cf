// write_buffer: lazy-store buffer for dirty lines evicted from the DATA LARs.
//
// DEPTH entries (2 in the processor) of 125 bits: a 61-bit tag and a 64-bit
// data line. When a LOAD, STORE or LOADDUMMY is about to overwrite a dirty
// LAR, the write-back stage pushes the old line here. Entries leave in FIFO
// order: whenever `drain_ok` is high and the buffer is not empty, the oldest
// entry is presented on `drain_*` with `drain_valid` and removed on the same
// clock edge. In the processor `drain_ok` is raised only while an eviction
// finds the buffer full, so lines are written to memory as late as possible.
// `full` is the buffer's interrupt: a push while full is not accepted, so the
// pipeline must be stalled until a drain makes room. `lk_tag` is looked up
// against every entry so a load that misses in the LARs can take a line that
// is still waiting here (newest match wins); this lookup is this design's
// addition to keep loads coherent with lazily stored lines.
module write_buffer
  import lars_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [TAG_W-1:0] push_tag,
  input  logic [63:0]      push_data,
  output logic             full,
  output logic             empty,
  input  logic             drain_ok,
  output logic             drain_valid,
  output logic [TAG_W-1:0] drain_tag,
  output logic [63:0]      drain_data,
  input  logic [TAG_W-1:0] lk_tag,
  output logic             lk_hit,
  output logic [63:0]      lk_data
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [63:0]      data;
  } entry_t;

  entry_t          q [DEPTH];
  logic [CW-1:0]   count;
  logic            do_push, do_pop;

  assign full        = (count == CW'(DEPTH));
  assign empty       = (count == '0);
  assign drain_valid = drain_ok && !empty;
  assign drain_tag   = q[0].tag;
  assign drain_data  = q[0].data;
  assign do_pop      = drain_valid;
  assign do_push     = push && !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      // shift out on pop, then append on push
      for (int i = 0; i < DEPTH; i++) begin
        if (do_pop) q[i] <= (i + 1 < DEPTH) ? q[i+1] : q[i];
      end
      if (do_push) begin
        for (int i = 0; i < DEPTH; i++)
          if (CW'(i) == count - CW'(do_pop)) q[i] <= '{tag: push_tag, data: push_data};
      end
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_comb begin
    lk_hit  = 1'b0;
    lk_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (CW'(i) < count && q[i].tag == lk_tag) begin
        lk_hit  = 1'b1;
        lk_data = q[i].data;
      end
    end
  end

  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("write_buffer: push while full");
endmodule
