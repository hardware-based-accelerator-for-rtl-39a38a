// node_fifo_tb: checks the node queue against a SystemVerilog queue model.
//
// Fills the FIFO to full (256 entries at the default depth), checks full,
// drains it checking order, then runs random
// push/pop traffic, including simultaneous push and pop, comparing head,
// empty and full every cycle. Pushes while full and pops while empty are not
// driven (the block asserts on them).
`timescale 1ns/1ps
module node_fifo_tb;
  import mtree_pkg::*;

  localparam int DEPTH = 2**ADDR_W;

  logic  clk = 1'b0, rst_n;
  logic  push, pop, empty, full;
  qent_t din, head;
  qent_t model [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  node_fifo dut (.*);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic qent_t rnd();
    return '{node: addr_t'($urandom), dpq: val_t'($urandom), has_parent: 1'($urandom)};
  endfunction

  task automatic compare(string where);
    checks++;
    if (empty != (model.size() == 0) || full != (model.size() == DEPTH) ||
        (model.size() > 0 && head != model[0])) begin
      failures++;
      $display("FAIL %s: size=%0d empty=%0d full=%0d head=%h model=%h", where,
               model.size(), empty, full, head, (model.size() > 0) ? model[0] : '0);
    end
  endtask

  // one clock: apply push/pop, update the model the same way
  task automatic step(bit p, bit o, qent_t d);
    push = p; pop = o; din = d;
    @(posedge clk);
    #1;
    if (o && model.size() > 0) void'(model.pop_front());
    if (p && model.size() < DEPTH) model.push_back(d);
    push = 0; pop = 0;
    compare("step");
  endtask

  initial begin
    rst_n = 0; push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare("after reset");
    for (int i = 0; i < DEPTH; i++) step(1, 0, rnd());
    checks++;
    if (!full) begin failures++; $display("FAIL not full after %0d pushes", DEPTH); end
    while (model.size() > 0) step(0, 1, '0);
    for (int i = 0; i < 5000; i++) begin
      bit p, o;
      p = $urandom_range(0, 99) < 55;
      o = $urandom_range(0, 99) < 45;
      if (model.size() == 0) o = 0;
      if (model.size() == DEPTH) p = 0;
      step(p, o, rnd());
    end
    // reset empties
    step(1, 0, rnd());
    rst_n = 0; @(posedge clk); #1 rst_n = 1; model.delete();
    compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
