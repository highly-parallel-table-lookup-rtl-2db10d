// loop_address_counter: the free-running address source shared by all ports.
//
// The counter steps through the word addresses of a category bank, one per
// clock, whether or not any port is searching, and returns to address 0 after
// `last_addr`. Every port module sees the same address, memorises the one at
// which its own search began, and finishes when the counter comes back to it;
// so no port ever waits for another. `addr_next` is the address of the next
// cycle, which lets a port know in the current cycle that it is doing its
// final compare.
//
// `last_addr` (the counting value minus one) is this design's way of giving
// the settable comparison length: a smaller value shortens the loop, and so
// every search, to the filled part of the banks. It should only change while
// no port is searching. If the counter is above a newly set `last_addr` it
// wraps to 0 on the next step.
//
// Timing: `addr` is a register, `addr_next` is combinational from it.
module loop_address_counter #(
  parameter int unsigned WORDS = 16,
  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] last_addr,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] addr_next
);

  always_comb begin
    if (addr >= last_addr) addr_next = '0;
    else                   addr_next = addr + AW'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr <= '0;
    else        addr <= addr_next;
  end

endmodule
