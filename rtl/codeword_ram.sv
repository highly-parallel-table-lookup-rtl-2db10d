// codeword_ram: the multi-ported code word table of the parallel coder.
//
// 2^A entries, one per FMCAM address, each holding a code word (right-aligned
// in CODE_W bits) and its length in bits. P read ports work at once, one per
// FMCAM port, so P symbols are coded per cycle; one write port loads the
// table. The design it is meant for is a bank-based multi-port RAM; this one
// is a flip-flop array with P independent read ports, which gives the same
// function without bank conflicts (this design's choice).
//
// Timing: registered reads - rcode/rlen are valid the cycle after raddr.
// A write and a read of the same entry in one cycle return the old entry.
module codeword_ram #(
  parameter int unsigned P = 16,
  parameter int unsigned A = 8,
  parameter int unsigned CODE_W = 16,
  parameter int unsigned LEN_W = 5
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [A-1:0]             waddr,
  input  logic [CODE_W-1:0]        wcode,
  input  logic [LEN_W-1:0]         wlen,
  input  logic [P-1:0][A-1:0]      raddr,
  output logic [P-1:0][CODE_W-1:0] rcode,
  output logic [P-1:0][LEN_W-1:0]  rlen
);

  logic [CODE_W-1:0] code_mem [1 << A];
  logic [LEN_W-1:0]  len_mem  [1 << A];

  always_ff @(posedge clk) begin
    if (we) begin
      code_mem[waddr] <= wcode;
      len_mem[waddr]  <= wlen;
    end
    for (int i = 0; i < P; i++) begin
      rcode[i] <= code_mem[raddr[i]];
      rlen[i]  <= len_mem[raddr[i]];
    end
  end

endmodule
