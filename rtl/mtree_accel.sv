// mtree_accel: M-tree range-query accelerator, top level.
//
// Answers range queries "all objects within r_q of q" over a data set that a
// host has already organised as an M-tree with two entries per node. Instead
// of a recursive search it walks the tree with one node queue: the first
// matching child of a node is queued, the second is searched next at once,
// and queued nodes are taken up when a branch ends. Each tree entry is pruned
// with the two-stage triangle-inequality test of the M-tree range search, one
// entry per clock cycle.
//
// Use:
//  1. Load the tree: hold wr_tree high for as many cycles as there are words;
//     each cycle writes n_data, ro_data and o_data to address 0, 1, 2, ... of
//     the node, routing-object and object memories. The root node is node 0.
//  2. With busy low, put the query on q and r_q and pulse start.
//  3. Every matching object appears as one cycle of out with its data on
//     result; done pulses once after the last one. r_q = 0 is an exact-match
//     query.
// Timing: done follows start by 2N + P + 2 cycles for N nodes visited and P
// nodes taken from the queue (see mtree_cu).
//
// The partition into control unit and datapath unit, the three memories, the
// FIFO and the range-search unit follow the source design; the record layouts
// and widths are set in mtree_pkg and are this design's choice.
module mtree_accel
  import mtree_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // tree loading
  input  logic  wr_tree,
  input  node_t n_data,
  input  ro_t   ro_data,
  input  obj_t  o_data,
  // query
  input  logic  start,
  input  val_t  q,
  input  val_t  r_q,
  // results
  output logic  out,
  output obj_t  result,
  output logic  done,
  output logic  busy
);

  du_ctrl_t ctrl;
  du_stat_t stat;

  mtree_cu u_cu (
    .clk, .rst_n, .wr_tree, .start, .stat, .ctrl, .done, .busy
  );

  mtree_du u_du (
    .clk, .rst_n, .ctrl, .stat, .n_data, .ro_data, .o_data,
    .q, .r_q, .out, .result
  );

endmodule
