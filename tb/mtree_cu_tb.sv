// mtree_cu_tb: checks the control unit's state sequence cycle by cycle.
//
// The testbench plays the datapath: each cycle it sets wr_tree, start and the
// status bits, and compares the control outputs, done and busy with the values
// the query flow calls for in that cycle. A directed run covers write mode,
// a queue push in the first search state, a direct descent in the second,
// object output from both states, a queue pop, and the end of the query; a
// second run checks that start is ignored during write mode and that reset
// returns to idle. The cycle count from start to done is checked against
// 2N + P + 2 (N nodes, P pops).
`timescale 1ns/1ps
module mtree_cu_tb;
  import mtree_pkg::*;

  logic     clk = 1'b0, rst_n;
  logic     wr_tree, start, done, busy;
  du_stat_t stat;
  du_ctrl_t ctrl;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mtree_cu dut (.*);

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic du_ctrl_t c(bit wr_en = 0, bit wr_clr = 0, bit q_load = 0, bit sel = 0,
                                 bit push = 0, bit descend = 0, bit pop = 0, bit out_en = 0);
    return '{wr_en: wr_en, wr_clr: wr_clr, q_load: q_load, entry_sel: sel,
             fifo_push: push, descend: descend, fifo_pop: pop, out_en: out_en};
  endfunction

  // one cycle: drive, compare, clock
  task automatic step(string tag, bit wr, bit st, bit nh, bit oh, bit emp,
                      du_ctrl_t exp, bit exp_done, bit exp_busy);
    @(negedge clk);
    wr_tree = wr; start = st;
    stat = '{node_hit: nh, obj_hit: oh, fifo_empty: emp};
    #1;
    checks++;
    if (ctrl != exp || done != exp_done || busy != exp_busy) begin
      failures++;
      $display("FAIL %s: ctrl=%b done=%0d busy=%0d, expected ctrl=%b done=%0d busy=%0d",
               tag, ctrl, done, busy, exp, exp_done, exp_busy);
    end
  endtask

  int t0;

  initial begin
    rst_n = 1'b0; wr_tree = 0; start = 0; stat = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    //   tag          wr st nh oh emp  expected ctrl                         done busy
    step("idle",      0, 0, 0, 0, 1, c(.wr_clr(1)),                          0, 0);
    step("write0",    1, 0, 0, 0, 1, c(.wr_en(1)),                           0, 0);
    step("write1",    1, 1, 0, 0, 1, c(.wr_en(1)),                           0, 0);
    step("write2",    1, 0, 0, 0, 1, c(.wr_en(1)),                           0, 0);
    step("write end", 0, 1, 0, 0, 1, c(),                                    0, 0);
    step("idle2",     0, 0, 0, 0, 1, c(.wr_clr(1)),                          0, 0);
    step("start",     0, 1, 0, 0, 1, c(.wr_clr(1), .q_load(1)),              0, 0);
    t0 = cyc;
    // node A: entry 0 queues a child, entry 1 descends
    step("A.e0",      0, 0, 1, 0, 1, c(.sel(0), .push(1)),                   0, 1);
    step("A.e1",      0, 0, 1, 0, 0, c(.sel(1), .descend(1)),                0, 1);
    // node B (leaf): both entries are results
    step("B.e0",      0, 0, 0, 1, 0, c(.sel(0), .out_en(1)),                 0, 1);
    step("B.e1",      0, 0, 0, 1, 0, c(.sel(1), .out_en(1)),                 0, 1);
    step("check1",    0, 0, 0, 0, 0, c(.pop(1)),                             0, 1);
    // node C (popped): nothing matches
    step("C.e0",      0, 1, 0, 0, 1, c(.sel(0)),                             0, 1);
    step("C.e1",      0, 0, 0, 0, 1, c(.sel(1)),                             0, 1);
    step("check2",    0, 0, 0, 0, 1, c(),                                    0, 1);
    step("done",      0, 0, 0, 0, 1, c(),                                    1, 1);
    checks++;
    if (cyc - t0 != 2 * 3 + 1 + 2) begin
      failures++;
      $display("FAIL: done %0d cycles after start, expected %0d", cyc - t0, 2 * 3 + 1 + 2);
    end
    step("back idle", 0, 0, 0, 0, 1, c(.wr_clr(1)),                          0, 0);
    // reset in the middle of a query
    step("start2",    0, 1, 0, 0, 1, c(.wr_clr(1), .q_load(1)),              0, 0);
    step("D.e0",      0, 0, 1, 0, 1, c(.sel(0), .push(1)),                   0, 1);
    rst_n = 1'b0;
    // synchronous reset: taken at the edge that ends D.e0
    step("in reset",  0, 0, 0, 0, 1, c(.wr_clr(1)),                          0, 0);
    rst_n = 1'b1;
    step("after rst", 0, 0, 0, 0, 1, c(.wr_clr(1)),                          0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
