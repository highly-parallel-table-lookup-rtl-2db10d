// fmcam_port: one input/output port module of the FMCAM.
//
// A search request carries D-bit comparison data and a D-bit mask (a mask bit
// of 1 leaves that bit out of the comparison). In the cycle a request is
// accepted:
//   * C category-comparators test the data against the broadcast category
//     bounds (data >= bounds[k]); the category decoder turns their results
//     into the index of the highest category whose bound is reached;
//   * the multiplexer passes that category's broadcast reference word to the
//     D-bit search-comparator, which makes the first compare at once;
//   * the broadcast loop address is memorised as the start address.
// In every following cycle the port compares with the next word of the same
// bank, as the shared loop-address-counter moves on. The search ends after
// the compare made when the counter's next address equals the start address,
// i.e. after exactly one pass of the loop (the counting value's length). In
// single search mode it ends earlier, at the first match. Because each port
// keeps its own start address, ports start and finish independently.
//
// Responses (registered, one cycle after the compare that produced them):
//   rsp_valid  - a response this cycle
//   rsp_match  - the compare matched; rsp_addr = {category, word address}
//   rsp_last   - the search is over (in multiple search mode every match is
//                reported and the last response carries rsp_last; a search
//                with no match gives one response with match=0, last=1)
// Request handshake: valid/ready, ready while the port is idle, so a new
// request is taken the cycle after the last compare of the previous one. A
// search of n compares occupies the port for n cycles.
// The structure follows the port module described for the FMCAM; handshake,
// mask polarity and range categories are this design's choices.
module fmcam_port
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
  // search request
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic [D-1:0]         req_data,
  input  logic [D-1:0]         req_mask,
  // broadcasts from the controller and the category block
  input  logic [C-1:0][D-1:0]  bounds,
  input  logic [C-1:0][D-1:0]  ref_data,
  input  logic [WA-1:0]        loop_addr,
  input  logic [WA-1:0]        loop_addr_next,
  input  search_mode_e         mode,
  // search response
  output logic                 rsp_valid,
  output logic                 rsp_match,
  output logic [A-1:0]         rsp_addr,
  output logic                 rsp_last,
  output logic                 busy
);

  port_state_e   state;
  logic [D-1:0]  data_q, mask_q;
  logic [CW-1:0] cat_q;
  logic [WA-1:0] start_q;

  // category-comparators and category decoder
  logic [C-1:0]  cat_ge;
  logic [CW-1:0] cat_in;

  always_comb begin
    for (int k = 0; k < C; k++) cat_ge[k] = (req_data >= bounds[k]);
    cat_in = '0;
    for (int k = 0; k < C; k++) if (cat_ge[k]) cat_in = CW'(k);
  end

  // operands of this cycle's compare
  logic          searching, active, accept, hit, last, finish;
  logic [D-1:0]  cur_data, cur_mask, ref_word;
  logic [CW-1:0] cur_cat;
  logic [WA-1:0] start;

  assign searching = (state == PORT_SEARCH);
  assign req_ready = !searching;
  assign accept    = req_valid && req_ready;
  assign active    = searching || accept;
  assign busy      = searching;

  assign cur_data = searching ? data_q  : req_data;
  assign cur_mask = searching ? mask_q  : req_mask;
  assign cur_cat  = searching ? cat_q   : cat_in;
  assign start    = searching ? start_q : loop_addr;

  // multiplexer and search-comparator
  assign ref_word = ref_data[cur_cat];
  assign hit      = active && (((ref_word ^ cur_data) & ~cur_mask) == '0);
  assign last     = (loop_addr_next == start);
  assign finish   = active && (last || (mode == MODE_SINGLE && hit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= PORT_IDLE;
      data_q    <= '0;
      mask_q    <= '0;
      cat_q     <= '0;
      start_q   <= '0;
      rsp_valid <= 1'b0;
      rsp_match <= 1'b0;
      rsp_addr  <= '0;
      rsp_last  <= 1'b0;
    end else begin
      if (accept) begin
        data_q  <= req_data;
        mask_q  <= req_mask;
        cat_q   <= cat_in;
        start_q <= loop_addr;
      end
      state     <= (active && !finish) ? PORT_SEARCH : PORT_IDLE;
      rsp_valid <= active && (hit || finish);
      rsp_match <= hit;
      rsp_addr  <= A'({cur_cat, loop_addr});
      rsp_last  <= finish;
      // a response is a match or the end of a search; in single search mode
      // it is always the end
      a_rsp_kind: assert (!rsp_valid || rsp_match || rsp_last);
      a_single_once: assert (!rsp_valid || rsp_last || mode != MODE_SINGLE);
    end
  end

endmodule
