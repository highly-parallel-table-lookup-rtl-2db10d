// tb_fmcam: the whole adapted FMCAM, loaded only through its own write ports
// (contents-table, category bounds, mode and counting value). The testbench
// keeps its own model of the loop-address-counter and of every port's
// search, and checks every response of every port in the cycle it is due.
// Runs single and multiple search mode, with full and shortened counting
// values and with a table whose categories are unevenly sized.
module tb_fmcam;
  import fmcam_pkg::*;
  localparam int unsigned P = 8, C = 16, D = 32, A = 8, WORDS = 16, CW = 4, WA = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cam_we = 1'b0;
  logic [A-1:0] cam_waddr = '0;
  logic [D-1:0] cam_wdata = '0;
  logic cat_we = 1'b0;
  logic [CW-1:0] cat_idx = '0;
  logic [D-1:0] cat_bound = '0;
  logic set_we = 1'b0;
  search_mode_e set_mode = MODE_SINGLE;
  logic [WA:0] set_count = '0;
  logic [P-1:0] req_valid = '0, req_ready;
  logic [P-1:0][D-1:0] req_data = '0, req_mask = '0;
  logic [P-1:0] rsp_valid, rsp_match, rsp_last, busy;
  logic [P-1:0][A-1:0] rsp_addr;

  fmcam #(.P(P), .C(C), .D(D), .A(A)) dut (.*);

  // reference state
  logic [D-1:0] table_mem [C][WORDS];
  logic [D-1:0] mbounds [C];
  int mcount = WORDS, maddr = 0;
  search_mode_e mmode = MODE_SINGLE;
  int checks = 0, failures = 0, cyc = 0;
  int n_early = 0, n_multi = 0, n_nomatch = 0, n_short = 0;

  typedef struct {
    int cyc;
    bit match;
    logic [A-1:0] addr;
    bit last;
  } rsp_t;
  rsp_t expq [P][$];

  always #5 clk = ~clk;

  // loop-address-counter model: steps with the count in force before the edge
  always @(posedge clk) begin
    if (rst_n) maddr = (maddr >= mcount - 1) ? 0 : maddr + 1;
    if (rst_n && set_we) begin
      mmode = set_mode;
      mcount = (set_count == 0 || int'(set_count) > int'(WORDS)) ? WORDS : int'(set_count);
    end
  end

  function automatic int category_of(logic [D-1:0] v);
    int c = 0;
    for (int k = 0; k < C; k++) if (v >= mbounds[k]) c = k;
    return c;
  endfunction

  function automatic void model(int p, logic [D-1:0] data, logic [D-1:0] mask);
    int cat = category_of(data);
    int hits = 0;
    for (int i = 0; i < mcount; i++) begin
      int a = (maddr + i) % mcount;
      bit hit = ((table_mem[cat][a] ^ data) & ~mask) == '0;
      bit last = (i == mcount - 1) || (mmode == MODE_SINGLE && hit);
      if (hit) hits++;
      if (hit || last) expq[p].push_back('{cyc + i + 1, hit, A'(cat * WORDS + a), last});
      if (last) begin
        if (mmode == MODE_SINGLE && hit && i < mcount - 1) n_early++;
        if (mmode == MODE_MULTIPLE && hits > 1) n_multi++;
        if (hits == 0) n_nomatch++;
        if (mcount < int'(WORDS)) n_short++;
        break;
      end
    end
  endfunction

  task automatic cycle(bit want_req);
    @(negedge clk);
    cyc++;
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
      if (want_req && req_ready[p] && $urandom_range(3) != 0) begin
        int k = $urandom_range(C - 1);
        int r = $urandom_range(9);
        req_valid[p] = 1'b1;
        req_mask[p] = '0;
        req_data[p] = table_mem[k][$urandom_range(mcount - 1)];
        if (r == 8) req_mask[p] = 32'h0000_00FF;
        if (r == 9) req_data[p] = $urandom;
        model(p, req_data[p], req_mask[p]);
      end
    end
  endtask

  task automatic settle();
    bit any;
    do begin
      cycle(1'b0);
      any = 1'b0;
      for (int p = 0; p < int'(P); p++) if (busy[p] || expq[p].size() > 0) any = 1'b1;
    end while (any);
  endtask

  task automatic configure(search_mode_e m, int cnt);
    @(negedge clk);
    set_we = 1'b1; set_mode = m; set_count = (WA+1)'(cnt);
    @(negedge clk);
    set_we = 1'b0;
  endtask

  // loads bounds and table; words of a category lie in its range, and every
  // fourth word repeats its neighbour except in the low byte
  task automatic load_table(bit uneven);
    for (int k = 0; k < C; k++) begin
      mbounds[k] = uneven ? ((k == 0) ? '0 : mbounds[k-1] + D'($urandom_range(32'h0400_0000, 32'h0000_1000)))
                          : D'(k) << 28;
      @(negedge clk);
      cat_we = 1'b1; cat_idx = CW'(k); cat_bound = mbounds[k];
    end
    @(negedge clk);
    cat_we = 1'b0;
    for (int k = 0; k < C; k++)
      for (int w = 0; w < int'(WORDS); w++) begin
        logic [D-1:0] span;
        span = (k == C - 1) ? 32'h0100_0000 : mbounds[k+1] - mbounds[k];
        if (w % 4 == 3) table_mem[k][w] = (table_mem[k][w-1] & ~32'hFF) | D'($urandom_range(255));
        else table_mem[k][w] = mbounds[k] + D'($urandom % span);
        if (category_of(table_mem[k][w]) != k) table_mem[k][w] = mbounds[k];
        @(negedge clk);
        cam_we = 1'b1; cam_waddr = A'(k * WORDS + w); cam_wdata = table_mem[k][w];
      end
    @(negedge clk);
    cam_we = 1'b0;
  endtask

  task automatic run(int n);
    for (int i = 0; i < n; i++) cycle(1'b1);
    settle();
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load_table(1'b0);
    run(300);                          // reset settings: single search, full count
    configure(MODE_MULTIPLE, 16); run(300);
    configure(MODE_SINGLE, 9);    run(300);
    load_table(1'b1);
    configure(MODE_MULTIPLE, 12); run(300);
    configure(MODE_SINGLE, 0);    run(300);
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
