// mtree_pkg: widths, record layouts and control bundle shared by the M-tree
// range-query accelerator.
//
// The accelerator searches an M-tree whose nodes hold at most two entries
// (node capacity two, as in the source design; the record layout and the
// control unit's two search states are built for exactly two) over one-dimensional unsigned
// fixed-point values. The distance function is |a - b|.
//
// Record layouts (all this design's choice; the source design fixes only
// which fields exist):
//   node_t  : leaf flag, one valid bit per entry, two entry addresses into the
//             routing-object memory.
//   ro_t    : feature value, covering radius, distance to the parent routing
//             object, and a pointer. In a non-leaf node the pointer is the
//             address of the child node; in a leaf node it is the address of
//             the object data in the object memory (the object identifier),
//             and the covering radius is ignored.
//   qent_t  : one node still to be searched: its address, the distance from
//             the query to its parent routing object d(Op,Q), and whether it
//             has a parent at all (only the root has none).
package mtree_pkg;

  // Feature value, radius and distance width (unsigned fixed point).
  localparam int DATA_W = 8;
  // Address width of the node, routing-object and object memories.
  localparam int ADDR_W = 8;
  // Width of the object data returned as a result.
  localparam int OBJ_W  = 8;

  typedef logic [DATA_W-1:0] val_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [OBJ_W-1:0]  obj_t;

  typedef struct packed {
    logic  leaf;
    logic  valid1;
    logic  valid0;
    addr_t ro_addr1;
    addr_t ro_addr0;
  } node_t;

  typedef struct packed {
    val_t  value;
    val_t  radius;
    val_t  dpar;
    addr_t ptr;
  } ro_t;

  typedef struct packed {
    addr_t node;
    val_t  dpq;
    logic  has_parent;
  } qent_t;

  // Control bundle from the control unit to the datapath unit.
  typedef struct packed {
    logic wr_en;      // write n_data/ro_data/o_data at the write counter
    logic wr_clr;     // return the write counter to address 0
    logic q_load;     // latch q and r_q, make the root the current node
    logic entry_sel;  // which entry of the current node is examined (0/1)
    logic fifo_push;  // queue the child node found by the range search
    logic descend;    // make the child node found the current node
    logic fifo_pop;   // make the FIFO head the current node
    logic out_en;     // present the matching object at the output
  } du_ctrl_t;

  // Status bundle from the datapath unit to the control unit.
  typedef struct packed {
    logic node_hit;    // the examined entry is a routing object to descend into
    logic obj_hit;     // the examined entry is a matching leaf object
    logic fifo_empty;
  } du_stat_t;

endpackage
