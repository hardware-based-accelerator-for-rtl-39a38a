// mtree_du_tb: checks the datapath unit on its own, with the testbench in the
// role of the control unit.
//
// Loads M-trees (the example set and random sets) through the write port,
// then walks each query the way the control unit does: the testbench works
// out from its own copy of the tree whether each entry should hit, checks the
// datapath's node_hit/obj_hit/fifo_empty against that, and drives push,
// descend, pop and out_en accordingly. The objects that appear on out/result
// must be the linear-scan result set, in walk order.
`timescale 1ns/1ps
module mtree_du_tb;
  import mtree_pkg::*;
  import mtree_tb_pkg::*;

  logic     clk = 1'b0, rst_n;
  du_ctrl_t ctrl;
  du_stat_t stat;
  node_t    n_data;
  ro_t      ro_data;
  obj_t     o_data;
  val_t     q, r_q;
  logic     out;
  obj_t     result;
  val_t     tq, tr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mtree_du dut (.*);

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  obj_t got [$];
  always @(posedge clk) if (rst_n && out) got.push_back(result);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load_tree();
    @(negedge clk);
    ctrl = '0; ctrl.wr_clr = 1'b1;
    @(negedge clk);
    ctrl = '0;
    for (int i = 0; i < load_words(); i++) begin
      ctrl.wr_en = 1'b1;
      n_data = tb_nodes[i]; ro_data = tb_ros[i]; o_data = tb_objs[i];
      @(negedge clk);
    end
    ctrl = '0;
  endtask

  // examine entry e of the node (cn, cd, ch) and compare with the tree
  task automatic examine(bit e, int cn, val_t cd, bit ch, output bit node_hit, output int child,
                         output val_t cdist);
    node_t nd;
    ro_t   ent;
    bit    hit, v;
    val_t  d;
    nd  = tb_nodes[cn];
    ent = e ? tb_ros[nd.ro_addr1] : tb_ros[nd.ro_addr0];
    v   = e ? nd.valid1 : nd.valid0;
    hit = v && entry_ok(tq, tr, cd, ch, nd.leaf, ent, d);
    ctrl.entry_sel = e;
    #1;
    check(stat.node_hit == (hit && !nd.leaf) && stat.obj_hit == (hit && nd.leaf),
          $sformatf("node %0d entry %0d: hit %0d/%0d expected %0d/%0d", cn, e,
                    stat.node_hit, stat.obj_hit, hit && !nd.leaf, hit && nd.leaf));
    node_hit = hit && !nd.leaf;
    child    = int'(ent.ptr);
    cdist    = d;
    ctrl.out_en = hit && nd.leaf;
  endtask

  task automatic walk(val_t qq, val_t rr);
    int   qn [$];
    val_t qd [$];
    int   cn, child;
    val_t cd, d;
    bit   ch, nh;
    ref_query(qq, rr);
    got.delete();
    tq = qq; tr = rr;
    q = qq; r_q = rr;
    ctrl = '0; ctrl.q_load = 1'b1;
    @(negedge clk);
    ctrl = '0;
    q = ~qq; r_q = ~rr;   // the datapath must use its latched copy
    cn = 0; cd = '0; ch = 1'b0;
    forever begin
      ctrl = '0;
      examine(1'b0, cn, cd, ch, nh, child, d);
      ctrl.fifo_push = nh;
      if (nh) begin qn.push_back(child); qd.push_back(d); end
      @(negedge clk);
      ctrl = '0;
      examine(1'b1, cn, cd, ch, nh, child, d);
      ctrl.descend = nh;
      @(negedge clk);
      ctrl = '0;
      if (nh) begin cn = child; cd = d; ch = 1'b1; continue; end
      #1;
      check(stat.fifo_empty == (qn.size() == 0), "fifo_empty disagrees with the walk");
      if (qn.size() == 0) break;
      ctrl.fifo_pop = 1'b1;
      cn = qn.pop_front(); cd = qd.pop_front(); ch = 1'b1;
      @(negedge clk);
      ctrl = '0;
    end
    @(negedge clk);
    check(got.size() == scan_cnt, $sformatf("q=%0d r=%0d: %0d results, scan finds %0d", qq, rr, got.size(), scan_cnt));
    for (int i = 0; i < got.size(); i++) begin
      check(exp_set[got[i]], $sformatf("q=%0d r=%0d: result %0d not in range", qq, rr, got[i]));
      if (i < exp_cnt) check(got[i] == exp_seq[i], "result order");
    end
  endtask

  val_t vals [];

  initial begin
    rst_n = 1'b0; ctrl = '0; n_data = '0; ro_data = '0; o_data = '0; q = '0; r_q = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    vals = new[15];
    foreach (vals[i]) vals[i] = val_t'((i < 8) ? i + 1 : i + 14);
    build_tree(vals, 15);
    load_tree();
    walk(8'd5, 8'd1);
    walk(8'd22, 8'd0);
    walk(8'd0, 8'd255);
    for (int t = 0; t < 15; t++) begin
      int n;
      n = 1 + int'($urandom_range(0, 100));
      vals = new[n];
      foreach (vals[i]) vals[i] = val_t'($urandom_range(0, 255));
      build_tree(vals, n);
      load_tree();
      for (int k = 0; k < 6; k++) walk(val_t'($urandom), val_t'($urandom_range(0, 40)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
