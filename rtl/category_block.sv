// category_block: the contents-table, made of C single-port category banks.
//
// The 2^A-word table is addressed as {category, word}: the upper log2(C) bits
// of a write address pick the bank, the lower bits the word inside it, so
// each bank holds 2^A/C words (this equal split is this design's choice).
// During search every bank reads the word at the broadcast loop address and
// all C words are broadcast to the port block together; each port takes the
// one of its own category.
//
// Timing: combinational read (see category_bank), writes at the clock edge.
module category_block #(
  parameter int unsigned C = 16,
  parameter int unsigned D = 32,
  parameter int unsigned A = 8,
  localparam int unsigned WORDS = (1 << A) / C,
  localparam int unsigned CW = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned WA = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [A-1:0]         waddr,
  input  logic [D-1:0]         wdata,
  input  logic [WA-1:0]        raddr,
  output logic [C-1:0][D-1:0]  ref_data
);

  logic [CW-1:0] wcat;
  logic [WA-1:0] wword;

  assign wcat  = CW'(waddr >> WA);
  assign wword = waddr[WA-1:0];

  for (genvar k = 0; k < C; k++) begin : g_bank
    category_bank #(.WORDS(WORDS), .D(D)) u_bank (
      .clk,
      .we   (we && (wcat == CW'(k))),
      .waddr(wword),
      .wdata,
      .raddr,
      .rdata(ref_data[k])
    );
  end

endmodule
