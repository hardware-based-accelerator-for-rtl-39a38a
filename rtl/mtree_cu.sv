// mtree_cu: control unit of the M-tree range-query accelerator.
//
// A state machine that walks the tree with the datapath unit:
//   IDLE    waits. wr_tree enters write mode; start latches the query and
//           makes the root the current node.
//   WRITE   write mode: each cycle wr_tree is high, one word from each of the
//           three loading buses is stored. Dropping wr_tree returns to IDLE.
//   SEARCH1 examines entry 0 of the current node. A matching routing object
//           has its child node queued in the FIFO; a matching object is sent
//           to the output.
//   SEARCH2 examines entry 1. A matching routing object's child becomes the
//           current node directly (no trip through the FIFO) and the search
//           goes back to SEARCH1; a matching object is sent to the output.
//           Without a child to descend into, the branch is finished: CHECK.
//   CHECK   pops the next queued node into SEARCH1, or, with the queue empty,
//           ends the query.
//   DONE    done is high for this one cycle, then IDLE.
// The states and their order follow the source design's description of the
// query flow; the one-cycle CHECK and DONE states and the encoding are this
// design's choice. A query costs 2 cycles per node visited plus one CHECK per
// finished branch plus start and DONE: with N nodes visited and P nodes popped
// from the queue, done rises 2N + P + 2 cycles after the cycle start is seen
// in IDLE.
//
// Outputs to the datapath (ctrl) are decoded from the state and, for push,
// descend and out_en, from the datapath's same-cycle status (Mealy).
// Reset (rst_n, active low, synchronous) returns to IDLE.
module mtree_cu
  import mtree_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     wr_tree,
  input  logic     start,
  input  du_stat_t stat,
  output du_ctrl_t ctrl,
  output logic     done,
  output logic     busy
);

  typedef enum logic [2:0] {
    S_IDLE, S_WRITE, S_SEARCH1, S_SEARCH2, S_CHECK, S_DONE
  } state_t;

  state_t state, state_n;

  always_ff @(posedge clk) begin
    if (!rst_n) state <= S_IDLE;
    else        state <= state_n;
  end

  always_comb begin
    state_n = state;
    ctrl    = '0;
    unique case (state)
      S_IDLE: begin
        ctrl.wr_clr = !wr_tree;
        if (wr_tree) begin
          ctrl.wr_en = 1'b1;
          state_n    = S_WRITE;
        end else if (start) begin
          ctrl.q_load = 1'b1;
          state_n     = S_SEARCH1;
        end
      end
      S_WRITE: begin
        if (wr_tree) ctrl.wr_en = 1'b1;
        else         state_n    = S_IDLE;
      end
      S_SEARCH1: begin
        ctrl.entry_sel = 1'b0;
        ctrl.fifo_push = stat.node_hit;
        ctrl.out_en    = stat.obj_hit;
        state_n        = S_SEARCH2;
      end
      S_SEARCH2: begin
        ctrl.entry_sel = 1'b1;
        ctrl.descend   = stat.node_hit;
        ctrl.out_en    = stat.obj_hit;
        state_n        = stat.node_hit ? S_SEARCH1 : S_CHECK;
      end
      S_CHECK: begin
        if (!stat.fifo_empty) begin
          ctrl.fifo_pop = 1'b1;
          state_n       = S_SEARCH1;
        end else begin
          state_n       = S_DONE;
        end
      end
      S_DONE:  state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  assign done = (state == S_DONE);
  assign busy = (state != S_IDLE) && (state != S_WRITE);

endmodule
