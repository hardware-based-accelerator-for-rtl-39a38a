// range_search: the M-tree prune test for one node entry, fully combinational.
//
// For an entry Or of a node N whose parent routing object is Op, and a query
// object Q with search radius r(Q):
//   stage 1 (cheap, uses only stored distances):
//       |d(Op,Q) - d(Or,Op)| <= r(Q) + r(Or)      (non-leaf entry)
//       |d(Op,Q) - d(Or,Op)| <= r(Q)              (leaf entry)
//   stage 2 (computes the distance to the query):
//       d(Or,Q) <= r(Q) + r(Or)                    (non-leaf entry)
//       d(Or,Q) <= r(Q)                            (leaf entry)
// The entry matches when both stages pass. A matching non-leaf entry returns
// its child-node address (node_hit) together with d(Or,Q), which becomes
// d(Op,Q) for the child's entries; a matching leaf entry raises obj_out and
// returns the object address. These are the four conditions of the standard
// M-tree range search. Stage 1 is skipped (passes) at the root, which has no
// parent. The distance function is the one-dimensional |a - b|.
//
// Both stages are evaluated in parallel in the same cycle (this design's
// choice; the source design checks one entry per clock cycle). Sums are one
// bit wider than the operands, so nothing overflows.
module range_search
  import mtree_pkg::*;
(
  input  val_t  q,           // query object
  input  val_t  r_q,         // query radius r(Q)
  input  val_t  dpq,         // d(Op,Q): query to the node's parent object
  input  logic  has_parent,  // low only for the root node
  input  logic  leaf,        // the node is a leaf: entries are objects
  input  logic  valid,       // the entry exists
  input  ro_t   ro,          // the entry
  output logic  stage1_pass,
  output logic  stage2_pass,
  output logic  node_hit,    // matching routing object: descend into ro.ptr
  output logic  obj_out,     // matching object: ro.ptr is the object address
  output addr_t ptr,
  output val_t  d_rq         // d(Or,Q)
);

  logic [DATA_W:0] limit;
  val_t            dpar_diff;

  function automatic val_t absdiff(val_t a, val_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  always_comb begin
    limit       = {1'b0, r_q} + (leaf ? '0 : {1'b0, ro.radius});
    dpar_diff   = absdiff(dpq, ro.dpar);
    d_rq        = absdiff(ro.value, q);
    stage1_pass = !has_parent || ({1'b0, dpar_diff} <= limit);
    stage2_pass = {1'b0, d_rq} <= limit;
    node_hit    = valid && stage1_pass && stage2_pass && !leaf;
    obj_out     = valid && stage1_pass && stage2_pass && leaf;
    ptr         = ro.ptr;
  end

endmodule
