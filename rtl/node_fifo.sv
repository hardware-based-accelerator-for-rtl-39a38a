// node_fifo: queue of M-tree nodes still to be searched.
//
// The software range search recurses into every matching child node. The
// accelerator replaces the recursion with a queue: when the first entry of a
// node matches, its child is pushed here; when the search of a branch ends,
// the control unit pops the next node. Each element (qent_t) holds the node
// address and the query's distance to that node's parent routing object,
// which the parent-distance pre-check of the node's entries needs.
//
// Synchronous first-in first-out buffer, show-ahead: head is the oldest
// element whenever empty is low, and pop removes it at the clock edge. Push
// and pop may happen in the same cycle. DEPTH defaults to the size of the node
// memory: a node is pushed at most once per query, so the queue cannot
// overflow for any tree the node memory can hold. Pushing when full or popping
// when empty is ignored and flagged by an assertion. Reset (rst_n, active
// low, synchronous) empties the queue.
module node_fifo
  import mtree_pkg::*;
#(
  parameter int DEPTH = 2**ADDR_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  qent_t din,
  input  logic  pop,
  output qent_t head,
  output logic  empty,
  output logic  full
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  qent_t           mem [DEPTH];
  logic [PW-1:0]   wr_ptr, rd_ptr;
  logic [PW:0]     count;
  logic            do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (PW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign head    = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("node_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("node_fifo: pop while empty");

endmodule
