// mtree_du: datapath unit of the M-tree range-query accelerator.
//
// Holds the three memories of the tree (nodes, routing objects, objects), the
// queue of nodes still to search, the range-search unit, and the registers of
// the running query: the query object q and radius r(Q), and the current node
// (address, d(Op,Q), has-parent flag).
//
// Every cycle the datapath reads, combinationally, the current node, the entry
// selected by ctrl.entry_sel, and the object that entry points to, and runs
// the range search on the entry. The control unit sees node_hit/obj_hit and
// answers in the same cycle with push, descend or out_en, which take effect at
// the clock edge. One entry is therefore examined per clock cycle.
//
// Write mode: while ctrl.wr_en is high, n_data, ro_data and o_data are written
// each cycle to the node, routing-object and object memories, all at the same
// address, which starts at 0 (ctrl.wr_clr) and steps by one per write. Loading
// the three memories in lock-step from one counter is this design's choice;
// the source design says only that the three buses are written in write mode.
//
// Output: out is high for one cycle, the cycle after the matching leaf entry
// was examined, with the object data on result. The root node is at node
// address 0 (this design's choice).
//
// stage1_pass, stage2_pass and fifo_full are left unconnected on purpose: the
// control flow needs only the combined hit flags, and the queue is as deep as
// the node memory so it cannot fill during a query. They remain as named
// observation points (lint reports them as unused).
module mtree_du
  import mtree_pkg::*;
#(
  parameter int NODE_DEPTH = 2**ADDR_W,
  parameter int RO_DEPTH   = 2**ADDR_W,
  parameter int OBJ_DEPTH  = 2**ADDR_W,
  parameter int FIFO_DEPTH = NODE_DEPTH
) (
  input  logic     clk,
  input  logic     rst_n,
  input  du_ctrl_t ctrl,
  output du_stat_t stat,
  // tree loading buses
  input  node_t    n_data,
  input  ro_t      ro_data,
  input  obj_t     o_data,
  // query
  input  val_t     q,
  input  val_t     r_q,
  // result
  output logic     out,
  output obj_t     result
);

  localparam addr_t ROOT = '0;

  addr_t wr_addr;
  val_t  q_r, rq_r;
  qent_t cur;

  node_t node_rd;
  ro_t   ro_rd;
  obj_t  obj_rd;
  addr_t ent_addr;
  logic  ent_valid;

  logic  stage1_pass, stage2_pass, node_hit, obj_hit;
  addr_t hit_ptr;
  val_t  hit_dist;
  qent_t child, fifo_head;
  logic  fifo_empty, fifo_full;

  // ---------------------------------------------------------------- memories
  node_mem #(.DEPTH(NODE_DEPTH)) u_node_mem (
    .clk, .we(ctrl.wr_en), .waddr(wr_addr), .wdata(n_data),
    .raddr(cur.node), .rdata(node_rd)
  );

  assign ent_addr  = ctrl.entry_sel ? node_rd.ro_addr1 : node_rd.ro_addr0;
  assign ent_valid = ctrl.entry_sel ? node_rd.valid1   : node_rd.valid0;

  ro_mem #(.DEPTH(RO_DEPTH)) u_ro_mem (
    .clk, .we(ctrl.wr_en), .waddr(wr_addr), .wdata(ro_data),
    .raddr(ent_addr), .rdata(ro_rd)
  );

  obj_mem #(.DEPTH(OBJ_DEPTH)) u_obj_mem (
    .clk, .we(ctrl.wr_en), .waddr(wr_addr), .wdata(o_data),
    .raddr(hit_ptr), .rdata(obj_rd)
  );

  // ------------------------------------------------------------ range search
  range_search u_rs (
    .q(q_r), .r_q(rq_r), .dpq(cur.dpq), .has_parent(cur.has_parent),
    .leaf(node_rd.leaf), .valid(ent_valid), .ro(ro_rd),
    .stage1_pass, .stage2_pass, .node_hit, .obj_out(obj_hit),
    .ptr(hit_ptr), .d_rq(hit_dist)
  );

  assign child = '{node: hit_ptr, dpq: hit_dist, has_parent: 1'b1};

  // --------------------------------------------------------------- node queue
  node_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(ctrl.fifo_push), .din(child), .pop(ctrl.fifo_pop),
    .head(fifo_head), .empty(fifo_empty), .full(fifo_full)
  );

  assign stat = '{node_hit: node_hit, obj_hit: obj_hit, fifo_empty: fifo_empty};

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_addr <= '0;
      q_r     <= '0;
      rq_r    <= '0;
      cur     <= '{node: ROOT, dpq: '0, has_parent: 1'b0};
      out     <= 1'b0;
      result  <= '0;
    end else begin
      if (ctrl.wr_clr)     wr_addr <= '0;
      else if (ctrl.wr_en) wr_addr <= wr_addr + 1'b1;

      if (ctrl.q_load) begin
        q_r  <= q;
        rq_r <= r_q;
        cur  <= '{node: ROOT, dpq: '0, has_parent: 1'b0};
      end else if (ctrl.descend) begin
        cur  <= child;
      end else if (ctrl.fifo_pop) begin
        cur  <= fifo_head;
      end

      out <= ctrl.out_en;
      if (ctrl.out_en) result <= obj_rd;
    end
  end

  a_push_needs_hit: assert property (@(posedge clk) disable iff (!rst_n)
    (ctrl.fifo_push || ctrl.descend) |-> node_hit)
    else $error("mtree_du: child queued without a matching routing object");
  a_out_needs_hit: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.out_en |-> obj_hit)
    else $error("mtree_du: output without a matching object");

endmodule
