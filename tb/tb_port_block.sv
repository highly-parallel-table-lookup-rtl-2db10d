// tb_port_block: P port modules searching at the same time, each with its own
// random request stream, against one set of broadcasts driven by the
// testbench. A per-port reference model predicts every response and its
// cycle; the test checks that ports start and finish independently (requests
// accepted at different loop addresses, several ports busy at once).
module tb_port_block;
  import fmcam_pkg::*;
  localparam int unsigned P = 16, C = 16, D = 32, A = 8, WORDS = 16, WA = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0] req_valid = '0, req_ready;
  logic [P-1:0][D-1:0] req_data = '0, req_mask = '0;
  logic [C-1:0][D-1:0] bounds, ref_data;
  logic [WA-1:0] loop_addr = '0, loop_addr_next;
  search_mode_e mode = MODE_SINGLE;
  logic [P-1:0] rsp_valid, rsp_match, rsp_last, busy;
  logic [P-1:0][A-1:0] rsp_addr;

  logic [D-1:0] table_mem [C][WORDS];
  int checks = 0, failures = 0, cyc = 0, max_busy = 0;

  typedef struct {
    int cyc;
    bit match;
    logic [A-1:0] addr;
    bit last;
  } rsp_t;
  rsp_t expq [P][$];

  always #5 clk = ~clk;

  port_block #(.P(P), .C(C), .D(D), .A(A)) dut (.*);

  assign loop_addr_next = loop_addr + 1'b1;   // full count of 16 words
  always_ff @(posedge clk) if (rst_n) loop_addr <= loop_addr_next;
  always_comb for (int k = 0; k < C; k++) ref_data[k] = table_mem[k][loop_addr];

  function automatic void model(int p, logic [D-1:0] data);
    int cat = 0;
    for (int k = 0; k < C; k++) if (data >= bounds[k]) cat = k;
    for (int i = 0; i < int'(WORDS); i++) begin
      int a = (int'(loop_addr) + i) % WORDS;
      bit hit = (table_mem[cat][a] == data);
      bit last = (i == int'(WORDS) - 1) || (mode == MODE_SINGLE && hit);
      if (hit || last) expq[p].push_back('{cyc + i + 1, hit, A'(cat * WORDS + a), last});
      if (last) break;
    end
  endfunction

  task automatic cycle(bit want_req);
    int nb;
    @(negedge clk);
    cyc++;
    nb = $countones(busy);
    if (nb > max_busy) max_busy = nb;
    for (int p = 0; p < int'(P); p++) begin
      checks++;
      if (expq[p].size() > 0 && expq[p][0].cyc == cyc) begin
        rsp_t e = expq[p].pop_front();
        if (!rsp_valid[p] || rsp_match[p] !== e.match || rsp_last[p] !== e.last ||
            (e.match && rsp_addr[p] !== e.addr)) begin
          failures++;
          $display("FAIL port %0d cyc %0d: got v%0b m%0b l%0b a%0d, expected m%0b l%0b a%0d", p, cyc,
                   rsp_valid[p], rsp_match[p], rsp_last[p], rsp_addr[p], e.match, e.last, e.addr);
        end
      end else if (rsp_valid[p]) begin
        failures++;
        $display("FAIL port %0d cyc %0d: unexpected response", p, cyc);
      end
      req_valid[p] = 1'b0;
      if (want_req && req_ready[p] && $urandom_range(2) != 0) begin
        req_valid[p] = 1'b1;
        req_data[p] = ($urandom_range(4) == 0) ? D'($urandom)
                    : table_mem[$urandom_range(C - 1)][$urandom_range(WORDS - 1)];
        model(p, req_data[p]);
      end
    end
  endtask

  function automatic bit all_idle();
    for (int p = 0; p < int'(P); p++) if (busy[p] || expq[p].size() > 0) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    for (int k = 0; k < C; k++) bounds[k] = D'(k) << 28;
    for (int k = 0; k < C; k++)
      for (int w = 0; w < int'(WORDS); w++) table_mem[k][w] = bounds[k] + D'($urandom_range(32'h0FFF_FFFF));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mode = MODE_SINGLE;
    for (int i = 0; i < 300; i++) cycle(1'b1);
    while (!all_idle()) cycle(1'b0);
    mode = MODE_MULTIPLE;
    for (int i = 0; i < 200; i++) cycle(1'b1);
    while (!all_idle()) cycle(1'b0);
    cycle(1'b0);
    $display("most ports busy at once: %0d", max_busy);
    checks++;
    if (max_busy < int'(P) / 2) begin failures++; $display("FAIL ports were not searching in parallel"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
