// fmcam_controller: the controller of the FMCAM.
//
// It holds the two parts named for it - the category-registers, whose bounds
// are broadcast to all ports, and the loop-address-counter, whose address is
// broadcast to all ports and all category banks - plus the two mode settings
// of the adapted FMCAM:
//   * the search mode (single search stops at the first match, multiple
//     search visits the whole category), and
//   * the counting value, the number of words a search visits (1..WORDS;
//     0 or anything above WORDS means WORDS).
// Both are written together with `set_we`; after reset the mode is single
// search and the counting value is WORDS (reset values, the write port and
// the encoding of the counting value are this design's choices). They should
// only be changed while no port is searching.
//
// Timing: settings and bounds take effect the cycle after the write.
module fmcam_controller
  import fmcam_pkg::*;
#(
  parameter int unsigned C = 16,
  parameter int unsigned D = 32,
  parameter int unsigned A = 8,
  localparam int unsigned WORDS = (1 << A) / C,
  localparam int unsigned CW = (C > 1) ? $clog2(C) : 1,
  localparam int unsigned WA = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // category structure
  input  logic                 cat_we,
  input  logic [CW-1:0]        cat_idx,
  input  logic [D-1:0]         cat_bound,
  // mode registers
  input  logic                 set_we,
  input  search_mode_e         set_mode,
  input  logic [WA:0]          set_count,
  // broadcasts
  output logic [C-1:0][D-1:0]  bounds,
  output logic [WA-1:0]        loop_addr,
  output logic [WA-1:0]        loop_addr_next,
  output search_mode_e         mode
);

  logic [WA-1:0] last_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= MODE_SINGLE;
      last_addr <= WA'(WORDS - 1);
    end else if (set_we) begin
      mode <= set_mode;
      if (set_count == '0 || set_count > (WA+1)'(WORDS)) last_addr <= WA'(WORDS - 1);
      else                                             last_addr <= WA'(set_count - 1'b1);
    end
  end

  category_registers #(.C(C), .D(D)) u_cat_regs (
    .clk, .rst_n, .cat_we, .cat_idx, .cat_bound, .bounds
  );

  loop_address_counter #(.WORDS(WORDS)) u_loop_cnt (
    .clk, .rst_n, .last_addr, .addr(loop_addr), .addr_next(loop_addr_next)
  );

endmodule
