// category_bank: one category's slice of the contents-table.
//
// A plain single-port memory of WORDS words of D bits, built from flip-flops.
// Its one address is the write address during a write (contents-table input)
// and the loop-address-counter's address otherwise; the word read there is
// broadcast to every port module. Keeping the memory a conventional bank,
// with no comparators inside, is the point of the FMCAM organisation.
//
// Timing: the read is combinational from the array, so `rdata` is the word at
// `raddr` in the same cycle; a write lands at the clock edge. `rdata` is not
// meaningful in a write cycle (the port is busy writing). The flip-flop array
// and its combinational read are this design's choice; a memory macro with a
// registered read would need the loop address one cycle earlier.
module category_bank #(
  parameter int unsigned WORDS = 16,
  parameter int unsigned D = 32,
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [D-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [D-1:0]  rdata
);

  logic [D-1:0]  mem [WORDS];
  logic [AW-1:0] addr;

  assign addr  = we ? waddr : raddr;
  assign rdata = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

endmodule
