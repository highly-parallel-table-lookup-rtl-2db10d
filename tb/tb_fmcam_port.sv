// tb_fmcam_port: one port module, with the broadcasts (category bounds,
// reference words, loop address) driven by the testbench itself. A reference
// model works out, for every accepted request, the category, the address of
// every compare and the cycle of every response, and each cycle the port's
// response is compared with it. Covered: single search mode stopping at the
// first match, multiple search mode reporting every match, searches that find
// nothing, masked bits, shortened counting values, back-to-back requests.
module tb_fmcam_port;
  import fmcam_pkg::*;
  localparam int unsigned C = 16, D = 32, A = 8, WORDS = 16, CW = 4, WA = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid = 1'b0, req_ready;
  logic [D-1:0] req_data = '0, req_mask = '0;
  logic [C-1:0][D-1:0] bounds, ref_data;
  logic [WA-1:0] loop_addr = '0, loop_addr_next;
  search_mode_e mode = MODE_SINGLE;
  logic rsp_valid, rsp_match, rsp_last, busy;
  logic [A-1:0] rsp_addr;

  logic [D-1:0] table_mem [C][WORDS];
  int count = WORDS;
  int checks = 0, failures = 0, cyc = 0;
  int n_early = 0, n_multi = 0, n_nomatch = 0, n_short = 0;

  typedef struct {
    int cyc;
    bit match;
    logic [A-1:0] addr;
    bit last;
  } rsp_t;
  rsp_t expq[$];

  always #5 clk = ~clk;

  fmcam_port #(.C(C), .D(D), .A(A)) dut (.*);

  // broadcasts
  assign loop_addr_next = (int'(loop_addr) >= count - 1) ? '0 : loop_addr + 1'b1;
  always_ff @(posedge clk) if (rst_n) loop_addr <= loop_addr_next;
  always_comb for (int k = 0; k < C; k++) ref_data[k] = table_mem[k][loop_addr];

  function automatic int category_of(logic [D-1:0] v);
    int c = 0;
    for (int k = 0; k < C; k++) if (v >= bounds[k]) c = k;
    return c;
  endfunction

  // expected responses of a request accepted in cycle cyc
  function automatic void model(logic [D-1:0] data, logic [D-1:0] mask);
    int cat = category_of(data);
    int hits = 0;
    for (int i = 0; i < count; i++) begin
      int a = (int'(loop_addr) + i) % count;
      bit hit = ((table_mem[cat][a] ^ data) & ~mask) == '0;
      bit last = (i == count - 1) || (mode == MODE_SINGLE && hit);
      if (hit) hits++;
      if (hit || last) expq.push_back('{cyc + i + 1, hit, A'(cat * WORDS + a), last});
      if (last) begin
        if (mode == MODE_SINGLE && hit && i < count - 1) n_early++;
        if (mode == MODE_MULTIPLE && hits > 1) n_multi++;
        if (hits == 0) n_nomatch++;
        if (count < int'(WORDS)) n_short++;
        break;
      end
    end
  endfunction

  // each negedge: check this cycle's response, then drive the next request
  task automatic cycle(bit want_req);
    @(negedge clk);
    cyc++;
    checks++;
    if (expq.size() > 0 && expq[0].cyc == cyc) begin
      rsp_t e = expq.pop_front();
      if (!rsp_valid || rsp_match !== e.match || rsp_last !== e.last ||
          (e.match && rsp_addr !== e.addr)) begin
        failures++;
        $display("FAIL cyc %0d: got v%0b m%0b l%0b a%0d, expected m%0b l%0b a%0d",
                 cyc, rsp_valid, rsp_match, rsp_last, rsp_addr, e.match, e.last, e.addr);
      end
    end else if (rsp_valid) begin
      failures++;
      $display("FAIL cyc %0d: unexpected response", cyc);
    end
    req_valid = 1'b0;
    if (want_req && req_ready) begin
      int cat = $urandom_range(C - 1);
      int r = $urandom_range(9);
      req_valid = 1'b1;
      req_mask = '0;
      if (r < 6) req_data = table_mem[cat][$urandom_range(WORDS - 1)];
      else if (r < 8) begin
        req_data = table_mem[cat][$urandom_range(WORDS - 1)];
        req_mask = 32'h0000_000F;
      end else req_data = $urandom;
      model(req_data, req_mask);
    end
  endtask

  task automatic drain();
    while (busy || expq.size() > 0) cycle(1'b0);
    cycle(1'b0);
  endtask

  task automatic run(int n);
    for (int i = 0; i < n; i++) cycle($urandom_range(3) != 0);
    drain();
  endtask

  initial begin
    // ascending category bounds, and words of each bank inside its range;
    // every bank holds some words that differ only in their low 4 bits
    bounds[0] = '0;
    for (int k = 1; k < C; k++) bounds[k] = bounds[k-1] + D'($urandom_range(32'h0800_0000, 32'h0010_0000));
    for (int k = 0; k < C; k++)
      for (int w = 0; w < int'(WORDS); w++) begin
        automatic logic [D-1:0] span = (k == C - 1) ? 32'h0100_0000 : bounds[k+1] - bounds[k];
        if (w % 4 == 3) table_mem[k][w] = table_mem[k][w-1] ^ D'(1 + (w % 3));
        else table_mem[k][w] = bounds[k] + D'($urandom % span);
        if (category_of(table_mem[k][w]) != k) table_mem[k][w] = bounds[k];
      end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    mode = MODE_SINGLE;   count = 16; run(400);
    mode = MODE_MULTIPLE; count = 16; run(300);
    mode = MODE_SINGLE;   count = 7;  run(300);
    mode = MODE_MULTIPLE; count = 5;  run(200);
    mode = MODE_SINGLE;   count = 1;  run(50);
    $display("early stops %0d, multiple matches %0d, no match %0d, short counts %0d",
             n_early, n_multi, n_nomatch, n_short);
    checks++;
    if (n_early == 0 || n_multi == 0 || n_nomatch == 0 || n_short == 0) begin
      failures++; $display("FAIL a search case was never exercised");
    end
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
