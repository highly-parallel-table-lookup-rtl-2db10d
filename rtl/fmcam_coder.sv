// fmcam_coder: parallel table-lookup coder (top level).
//
// P processing elements hand over one symbol each; the FMCAM finds, for all
// of them in parallel, the address of the stored symbol, and the multi-port
// code word RAM turns each address into the code word and its length. This is
// how a static Huffman table (or any one-to-one lookup table, such as a
// substitution table of a cipher) is applied to P symbols at once without P
// copies of the table: the symbols are the FMCAM's reference words, the code
// words sit at the same addresses in the code word RAM.
//
// Interface, per port i:
//   sym_valid/sym_ready/sym_data/sym_mask - the symbol (a request to port i)
//   out_valid  - a result; out_match says the symbol was found, out_addr is
//                its table address, out_code/out_len its code word (valid
//                when out_match), out_last marks the end of the search
// Table loading: cam_* writes the symbol table, cw_* the code word table at
// the same address, cat_* the category bounds, set_* the search mode and the
// counting value (see fmcam). Load before sending symbols.
// Timing: a symbol whose n-th compare matches gives out_valid n+1 cycles
// after it was accepted (one cycle FMCAM response register, one cycle code
// word RAM read). In single search mode port i is ready again n cycles after
// accepting.
// Pairing the FMCAM with a multi-port code word RAM is the published
// architecture's; the code word format (right-aligned code plus length) and
// the output timing are this design's choices.
module fmcam_coder
  import fmcam_pkg::*;
#(
  parameter int unsigned P = 16,
  parameter int unsigned C = 16,
  parameter int unsigned D = 32,
  parameter int unsigned A = 8,
  parameter int unsigned CODE_W = 16,
  parameter int unsigned LEN_W = 5,
  localparam int unsigned WORDS = (1 << A) / C,
  localparam int unsigned CW = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned WA = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // table loading and settings
  input  logic                     cam_we,
  input  logic [A-1:0]             cam_waddr,
  input  logic [D-1:0]             cam_wdata,
  input  logic                     cw_we,
  input  logic [A-1:0]             cw_waddr,
  input  logic [CODE_W-1:0]        cw_wcode,
  input  logic [LEN_W-1:0]         cw_wlen,
  input  logic                     cat_we,
  input  logic [CW-1:0]            cat_idx,
  input  logic [D-1:0]             cat_bound,
  input  logic                     set_we,
  input  search_mode_e             set_mode,
  input  logic [WA:0]              set_count,
  // symbols from the processing elements
  input  logic [P-1:0]             sym_valid,
  output logic [P-1:0]             sym_ready,
  input  logic [P-1:0][D-1:0]      sym_data,
  input  logic [P-1:0][D-1:0]      sym_mask,
  // code words to the processing elements
  output logic [P-1:0]             out_valid,
  output logic [P-1:0]             out_match,
  output logic [P-1:0]             out_last,
  output logic [P-1:0][A-1:0]      out_addr,
  output logic [P-1:0][CODE_W-1:0] out_code,
  output logic [P-1:0][LEN_W-1:0]  out_len,
  output logic [P-1:0]             busy
);

  logic [P-1:0]        rsp_valid, rsp_match, rsp_last;
  logic [P-1:0][A-1:0] rsp_addr;

  fmcam #(.P(P), .C(C), .D(D), .A(A)) u_fmcam (
    .clk, .rst_n,
    .cam_we, .cam_waddr, .cam_wdata,
    .cat_we, .cat_idx, .cat_bound,
    .set_we, .set_mode, .set_count,
    .req_valid(sym_valid), .req_ready(sym_ready),
    .req_data (sym_data),  .req_mask (sym_mask),
    .rsp_valid, .rsp_match, .rsp_addr, .rsp_last, .busy
  );

  codeword_ram #(.P(P), .A(A), .CODE_W(CODE_W), .LEN_W(LEN_W)) u_cw_ram (
    .clk, .we(cw_we), .waddr(cw_waddr), .wcode(cw_wcode), .wlen(cw_wlen),
    .raddr(rsp_addr), .rcode(out_code), .rlen(out_len)
  );

  // the FMCAM response travels alongside the code word RAM read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_match <= '0;
      out_last  <= '0;
      out_addr  <= '0;
    end else begin
      out_valid <= rsp_valid;
      out_match <= rsp_match;
      out_last  <= rsp_last;
      out_addr  <= rsp_addr;
    end
  end

endmodule
