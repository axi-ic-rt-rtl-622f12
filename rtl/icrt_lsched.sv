// Local scheduler (L-Sched) of one Primary inside a Transaction Control
// Unit: picks, among the valid entries of the Primary's TIB, the one with
// the most urgent priority and returns its slot, TID and priority.
//
// Purely combinational, so the local decision is always ready in the same
// clock cycle, as the description requires. It is built as a balanced
// tree of two-input priority comparators with multiplexers, one tree
// level per halving of the entry count. Order: numerically smaller
// priority wins; on equal priorities the lower slot wins (this design's
// choice).
module icrt_lsched
  import icrt_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  tinfo_t [DEPTH-1:0] entry,
  input  logic   [DEPTH-1:0] valid,
  output logic               best_valid,
  output logic   [IW-1:0]    best_idx,
  output tinfo_t             best_info
);

  localparam int unsigned LEAVES = 1 << IW;
  localparam int unsigned NODES  = 2 * LEAVES - 1;

  typedef struct packed {
    logic          v;
    logic [IW-1:0] idx;
    tinfo_t        info;
  } node_t;

  node_t node [NODES];

  always_comb begin
    // leaves, heap-ordered: leaf j sits at LEAVES-1+j
    for (int j = 0; j < LEAVES; j++) begin
      if (j < DEPTH) begin
        node[LEAVES-1+j].v    = valid[j];
        node[LEAVES-1+j].idx  = IW'(j);
        node[LEAVES-1+j].info = entry[j];
      end else begin
        node[LEAVES-1+j] = '0;
      end
    end
    // comparator nodes, bottom up
    for (int k = LEAVES - 2; k >= 0; k--) begin
      node_t a, b;
      a = node[2*k+1];
      b = node[2*k+2];
      if (a.v && (!b.v || !prio_wins(b.info.prio, a.info.prio)))
        node[k] = a;
      else
        node[k] = b;
    end
  end

  assign best_valid = node[0].v;
  assign best_idx   = node[0].idx;
  assign best_info  = node[0].info;

endmodule
