// node_mem_tb: checks the memory against an array model.
//
// Writes a random word to every address, reads all of them back through the
// combinational read port, then mixes random writes (some with we low, which
// must change nothing) and random reads. A read of the address just written
// must show the new word right after the clock edge.
`timescale 1ns/1ps
module node_mem_tb;
  import mtree_pkg::*;

  localparam int DEPTH = 2**ADDR_W;

  logic  clk = 1'b0;
  logic  we;
  addr_t waddr, raddr;
  node_t wdata, rdata;
  node_t model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  node_mem dut (.*);

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic node_t rnd();
    logic [63:0] r;
    r = {$urandom, $urandom};
    return node_t'(r);
  endfunction

  task automatic wr(addr_t a, node_t d, bit en);
    @(negedge clk);
    we = en; waddr = a; wdata = d; raddr = a;
    @(posedge clk);
    #1;
    if (en) model[a] = d;
    we = 1'b0;
    rd(a);
  endtask

  task automatic rd(addr_t a);
    raddr = a;
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL addr %0d: read %h, expected %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < DEPTH; i++) wr(addr_t'(i), rnd(), 1'b1);
    for (int i = 0; i < DEPTH; i++) rd(addr_t'(i));
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 1) != 0) wr(addr_t'($urandom), rnd(), $urandom_range(0, 3) != 0);
      else rd(addr_t'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
