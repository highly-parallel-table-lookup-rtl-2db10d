// port_block: P independent FMCAM port modules.
//
// All ports receive the same broadcasts - category bounds, the C reference
// words of the current loop address, the loop address itself and the search
// mode - and each runs its own search on its own request. Nothing is shared
// between ports except these broadcasts, so adding a port adds one port
// module and no arbitration.
//
// Timing: as fmcam_port, per port.
module port_block
  import fmcam_pkg::*;
#(
  parameter int unsigned P = 16,
  parameter int unsigned C = 16,
  parameter int unsigned D = 32,
  parameter int unsigned A = 8,
  localparam int unsigned WORDS = (1 << A) / C,
  localparam int unsigned WA = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [P-1:0]         req_valid,
  output logic [P-1:0]         req_ready,
  input  logic [P-1:0][D-1:0]  req_data,
  input  logic [P-1:0][D-1:0]  req_mask,
  input  logic [C-1:0][D-1:0]  bounds,
  input  logic [C-1:0][D-1:0]  ref_data,
  input  logic [WA-1:0]        loop_addr,
  input  logic [WA-1:0]        loop_addr_next,
  input  search_mode_e         mode,
  output logic [P-1:0]         rsp_valid,
  output logic [P-1:0]         rsp_match,
  output logic [P-1:0][A-1:0]  rsp_addr,
  output logic [P-1:0]         rsp_last,
  output logic [P-1:0]         busy
);

  for (genvar i = 0; i < P; i++) begin : g_port
    fmcam_port #(.C(C), .D(D), .A(A)) u_port (
      .clk, .rst_n,
      .req_valid(req_valid[i]), .req_ready(req_ready[i]),
      .req_data (req_data[i]),  .req_mask (req_mask[i]),
      .bounds, .ref_data, .loop_addr, .loop_addr_next, .mode,
      .rsp_valid(rsp_valid[i]), .rsp_match(rsp_match[i]),
      .rsp_addr (rsp_addr[i]),  .rsp_last (rsp_last[i]),
      .busy     (busy[i])
    );
  end

endmodule
