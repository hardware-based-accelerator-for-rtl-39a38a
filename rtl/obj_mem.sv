// obj_mem: the accelerator's object memory. It holds the object data returned
// for a matching leaf entry; the leaf entry's pointer is its address (the
// object identifier).
//
// A plain array with one synchronous write port and one asynchronous
// (combinational) read port, the shape of an FPGA distributed (LUT) RAM. The
// asynchronous read is this design's choice: it lets the datapath read a node,
// one of its entries and the entry's object in the same clock cycle, which is
// what gives the one-entry-per-cycle search rate of the source design. The
// memory is written only in the accelerator's write mode and has no reset;
// its contents are undefined until written.
//
// Interface: clk; we with waddr/wdata (written at the rising edge);
// raddr -> rdata (combinational). DEPTH defaults to the full address space.
module obj_mem
  import mtree_pkg::*;
#(
  parameter int DEPTH = 2**ADDR_W
) (
  input  logic  clk,
  input  logic  we,
  input  addr_t waddr,
  input  obj_t wdata,
  input  addr_t raddr,
  output obj_t rdata
);

  obj_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata = (int'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
