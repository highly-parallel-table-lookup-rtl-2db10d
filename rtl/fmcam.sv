// fmcam: the adapted flexible multi-ported content addressable memory.
//
// Three independent parts (the split is the FMCAM's own):
//   * category block - C single-port banks holding the 2^A-word contents
//     table; every cycle each bank reads the word at the loop address and
//     broadcasts it;
//   * controller     - category-registers, loop-address-counter, search mode
//     and counting value;
//   * port block     - P port modules, each comparing its own request with
//     the broadcast word of its request's category.
// Only one comparator per port touches the reference data (block-parallel
// instead of word-parallel search), so P ports cost P comparators plus P*C
// category-comparators, not P*2^A comparators. A search takes at most the
// counting value's number of cycles, and in single search mode ends at the
// first match.
//
// Loading: write each reference word with cam_we at cam_waddr = {category,
// word}; write the category bounds (ascending) with cat_we; choose mode and
// counting value with set_we. Searches must not run while the table is being
// written. The loading ports are this design's choice.
// Timing: responses one cycle after the compare (see fmcam_port).
module fmcam
  import fmcam_pkg::*;
#(
  parameter int unsigned P = 16,
  parameter int unsigned C = 16,
  parameter int unsigned D = 32,
  parameter int unsigned A = 8,
  localparam int unsigned WORDS = (1 << A) / C,
  localparam int unsigned CW = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned WA = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // contents-table input
  input  logic                 cam_we,
  input  logic [A-1:0]         cam_waddr,
  input  logic [D-1:0]         cam_wdata,
  // controller settings
  input  logic                 cat_we,
  input  logic [CW-1:0]        cat_idx,
  input  logic [D-1:0]         cat_bound,
  input  logic                 set_we,
  input  search_mode_e         set_mode,
  input  logic [WA:0]          set_count,
  // search ports
  input  logic [P-1:0]         req_valid,
  output logic [P-1:0]         req_ready,
  input  logic [P-1:0][D-1:0]  req_data,
  input  logic [P-1:0][D-1:0]  req_mask,
  output logic [P-1:0]         rsp_valid,
  output logic [P-1:0]         rsp_match,
  output logic [P-1:0][A-1:0]  rsp_addr,
  output logic [P-1:0]         rsp_last,
  output logic [P-1:0]         busy
);

  logic [C-1:0][D-1:0] bounds, ref_data;
  logic [WA-1:0]       loop_addr, loop_addr_next;
  search_mode_e        mode;

  fmcam_controller #(.C(C), .D(D), .A(A)) u_ctrl (
    .clk, .rst_n,
    .cat_we, .cat_idx, .cat_bound,
    .set_we, .set_mode, .set_count,
    .bounds, .loop_addr, .loop_addr_next, .mode
  );

  category_block #(.C(C), .D(D), .A(A)) u_cat_block (
    .clk, .we(cam_we), .waddr(cam_waddr), .wdata(cam_wdata),
    .raddr(loop_addr), .ref_data
  );

  port_block #(.P(P), .C(C), .D(D), .A(A)) u_ports (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_data, .req_mask,
    .bounds, .ref_data, .loop_addr, .loop_addr_next, .mode,
    .rsp_valid, .rsp_match, .rsp_addr, .rsp_last, .busy
  );

endmodule
