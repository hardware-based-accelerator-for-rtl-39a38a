// mtree_accel_tb: end-to-end test of the M-tree range-query accelerator at
// its default sizes.
//
// Builds M-trees on the testbench side (mtree_tb_pkg), loads them through the
// write mode, runs range queries and checks, for every query:
//   * the outputs against a linear scan of all objects (as a set) and against
//     a software walk of the tree (exact order),
//   * the start-to-done cycle count against 2N + P + 2 from the same walk.
// Data sets: the 15-value example set {1..8, 21..27} with the query 5 +/- 1
// and the exact-match query 22; full trees of 3, 4 and 5 node levels; queries on a
// 5-level tree returning 1, 4, 8 and 16 objects; then random data sets and
// queries. It counts how often each mechanism of the design occurred (write
// mode, queue push and pop, direct descent into the second entry, object
// output, prune in stage 1, prune in stage 2, an entry-less slot, an empty
// result) and fails any that never did.
`timescale 1ns/1ps
module mtree_accel_tb;
  import mtree_pkg::*;
  import mtree_tb_pkg::*;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  wr_tree, start;
  node_t n_data;
  ro_t   ro_data;
  obj_t  o_data;
  val_t  q, r_q;
  logic  out, done, busy;
  obj_t  result;

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;   // 100 MHz, as in the source evaluation
  always @(posedge clk) cyc <= cyc + 1;

  mtree_accel dut (.*);

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- mechanism counters
  int n_write, n_push, n_pop, n_descend, n_out, n_prune1, n_prune2, n_noslot, n_empty;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_du.ctrl.wr_en)     n_write++;
    if (dut.u_du.ctrl.fifo_push) n_push++;
    if (dut.u_du.ctrl.fifo_pop)  n_pop++;
    if (dut.u_du.ctrl.descend)   n_descend++;
    if (dut.u_du.ctrl.out_en)    n_out++;
    if (dut.u_cu.state inside {dut.u_cu.S_SEARCH1, dut.u_cu.S_SEARCH2}) begin
      if (!dut.u_du.ent_valid) n_noslot++;
      else if (!dut.u_du.stage1_pass) n_prune1++;
      else if (!dut.u_du.stage2_pass) n_prune2++;
    end
  end

  // ------------------------------------------------------------ result capture
  obj_t got [$];
  always @(posedge clk) if (rst_n && out) got.push_back(result);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_tree();
    int w;
    w = load_words();
    @(negedge clk);
    for (int i = 0; i < w; i++) begin
      wr_tree = 1'b1;
      n_data  = tb_nodes[i];
      ro_data = tb_ros[i];
      o_data  = tb_objs[i];
      @(negedge clk);
    end
    wr_tree = 1'b0;
    n_data = '0; ro_data = '0; o_data = '0;
    @(negedge clk);
  endtask

  task automatic run_query(val_t qq, val_t rr, string tag, int want_cnt = -1);
    int t0, t1, in_set;
    bit seen [MAXN];
    ref_query(qq, rr);
    got.delete();
    @(negedge clk);
    check(!busy, {tag, ": idle before start"});
    q = qq; r_q = rr; start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    q = ~qq; r_q = ~rr;   // the query must have been latched
    while (!done) @(negedge clk);
    t1 = cyc;
    @(negedge clk);
    // outputs, exact order from the tree walk
    check(got.size() == exp_cnt, $sformatf("%s: %0d outputs, expected %0d", tag, got.size(), exp_cnt));
    for (int i = 0; i < got.size() && i < exp_cnt; i++)
      check(got[i] == exp_seq[i], $sformatf("%s: output %0d is %0d, expected %0d", tag, i, got[i], exp_seq[i]));
    // outputs as a set, from the linear scan
    for (int i = 0; i < MAXN; i++) seen[i] = 1'b0;
    in_set = 0;
    foreach (got[i]) begin
      if (exp_set[got[i]] && !seen[got[i]]) in_set++;
      seen[got[i]] = 1'b1;
    end
    check(in_set == scan_cnt && got.size() == scan_cnt,
          $sformatf("%s: %0d distinct correct results of %0d, scan finds %0d", tag, in_set, got.size(), scan_cnt));
    if (want_cnt >= 0)
      check(scan_cnt == want_cnt, $sformatf("%s: workload returns %0d, intended %0d", tag, scan_cnt, want_cnt));
    // cycles
    check(t1 - t0 == ref_cycles,
          $sformatf("%s: done after %0d cycles, expected %0d", tag, t1 - t0, ref_cycles));
    if (scan_cnt == 0) n_empty++;
    if (tag.substr(0, 5) != "random")
      $display("%s: q=%0d r=%0d results=%0d nodes=%0d pops=%0d cycles=%0d (%0d ns)",
             tag, qq, rr, got.size(), ref_nodes, ref_pops, t1 - t0, (t1 - t0) * 10);
  endtask

  val_t vals [];

  initial begin
    rst_n = 1'b0; wr_tree = 1'b0; start = 1'b0;
    n_data = '0; ro_data = '0; o_data = '0; q = '0; r_q = '0;
    n_write = 0; n_push = 0; n_pop = 0; n_descend = 0; n_out = 0;
    n_prune1 = 0; n_prune2 = 0; n_noslot = 0; n_empty = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // example data set
    vals = new[15];
    foreach (vals[i]) vals[i] = val_t'((i < 8) ? i + 1 : i + 14);
    build_tree(vals, 15);
    load_tree();
    run_query(8'd5, 8'd1, "example range 5+/-1", 3);
    run_query(8'd22, 8'd0, "example exact 22", 1);
    run_query(8'd15, 8'd2, "example empty", 0);

    // tree levels 3, 4, 5 (8, 16, 32 objects), one exact-match query each
    for (int lv = 3; lv <= 5; lv++) begin
      int n;
      n = 1 << lv;
      vals = new[n];
      foreach (vals[i]) vals[i] = val_t'(3 * i + 1);
      build_tree(vals, n);
      check(tree_levels == lv, $sformatf("level-%0d tree built with %0d levels", lv, tree_levels));
      load_tree();
      run_query(val_t'(3 * (n / 2) + 1), 8'd0, $sformatf("levels=%0d", lv), 1);
    end

    // number of results 1, 4, 8, 16 on a 32-object tree (values 2i)
    vals = new[32];
    foreach (vals[i]) vals[i] = val_t'(2 * i);
    build_tree(vals, 32);
    load_tree();
    run_query(8'd20, 8'd0, "results=1", 1);
    run_query(8'd21, 8'd3, "results=4", 4);
    run_query(8'd23, 8'd7, "results=8", 8);
    run_query(8'd31, 8'd15, "results=16", 16);

    // random data sets
    for (int t = 0; t < 40; t++) begin
      int n;
      n = 1 + int'($urandom_range(0, 110));
      vals = new[n];
      foreach (vals[i]) vals[i] = val_t'($urandom_range(0, 255));
      build_tree(vals, n);
      load_tree();
      for (int k = 0; k < 8; k++)
        run_query(val_t'($urandom_range(0, 255)), val_t'($urandom_range(0, (k < 4) ? 8 : 80)),
                  $sformatf("random %0d.%0d n=%0d", t, k, n));
    end

    $display("mechanisms: write=%0d push=%0d pop=%0d descend=%0d out=%0d prune1=%0d prune2=%0d noslot=%0d empty=%0d",
             n_write, n_push, n_pop, n_descend, n_out, n_prune1, n_prune2, n_noslot, n_empty);
    check(n_write   > 0, "write mode never used");
    check(n_push    > 0, "queue push never happened");
    check(n_pop     > 0, "queue pop never happened");
    check(n_descend > 0, "direct descent never happened");
    check(n_out     > 0, "no object output");
    check(n_prune1  > 0, "stage-1 prune never happened");
    check(n_prune2  > 0, "stage-2 prune never happened");
    check(n_noslot  > 0, "node with one entry never searched");
    check(n_empty   > 0, "empty result never happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
