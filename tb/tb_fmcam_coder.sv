// tb_fmcam_coder: end-to-end test of the parallel table-lookup coder at its
// full size (16 ports, 256-word table of 32-bit symbols, 16 categories).
//
// The table is the JPEG-style AC Huffman table of tb_jpeg_table_pkg: 162
// run/size symbols in categories of 11, so each category bank is filled to
// 11 of its 16 words and the counting value is set to 11.
//
// All 16 ports code random symbol streams at once. A reference model (its own
// loop-address counter and search) predicts for every symbol the cycle of
// each result, the table address and the code word; every output is checked.
// Counted and required at least once each: a search stopped early by single
// search mode, a search with several matches in multiple search mode (masked
// low nibble), a symbol missing from the table, a shortened counting value,
// all 16 ports busy at once, a request accepted right after the previous
// search ended, and a mode switch. Every cycle each port's ready is checked
// against the model: a search of n compares holds its port for n cycles.
module tb_fmcam_coder;
  import fmcam_pkg::*;
  import tb_jpeg_table_pkg::*;
  localparam int unsigned P = 16, C = 16, D = 32, A = 8, WORDS = 16, CW = 4, WA = 4;
  localparam int unsigned CODE_W = 16, LEN_W = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cam_we = 1'b0;
  logic [A-1:0] cam_waddr = '0;
  logic [D-1:0] cam_wdata = '0;
  logic cw_we = 1'b0;
  logic [A-1:0] cw_waddr = '0;
  logic [CODE_W-1:0] cw_wcode = '0;
  logic [LEN_W-1:0] cw_wlen = '0;
  logic cat_we = 1'b0;
  logic [CW-1:0] cat_idx = '0;
  logic [D-1:0] cat_bound = '0;
  logic set_we = 1'b0;
  search_mode_e set_mode = MODE_SINGLE;
  logic [WA:0] set_count = '0;
  logic [P-1:0] sym_valid = '0, sym_ready;
  logic [P-1:0][D-1:0] sym_data = '0, sym_mask = '0;
  logic [P-1:0] out_valid, out_match, out_last, busy;
  logic [P-1:0][A-1:0] out_addr;
  logic [P-1:0][CODE_W-1:0] out_code;
  logic [P-1:0][LEN_W-1:0] out_len;

  fmcam_coder dut (.*);

  // ---------------- reference model ----------------
  int mcount = WORDS, maddr = 0;
  search_mode_e mmode = MODE_SINGLE;
  int checks = 0, failures = 0, cyc = 0;
  int n_early = 0, n_multi = 0, n_nomatch = 0, n_short = 0, n_allbusy = 0, n_b2b = 0, n_switch = 0;
  int compares = 0;
  int last_end [P];

  typedef struct {
    int cyc;
    bit match;
    logic [A-1:0] addr;
    bit last;
  } rsp_t;
  rsp_t expq [P][$];

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n) maddr = (maddr >= mcount - 1) ? 0 : maddr + 1;
    if (rst_n && set_we) begin
      if (set_mode != mmode) n_switch++;
      mmode = set_mode;
      mcount = (set_count == 0 || int'(set_count) > int'(WORDS)) ? WORDS : int'(set_count);
    end
  end

  function automatic void model(int p, logic [D-1:0] data, logic [D-1:0] mask);
    int cat = 0, hits = 0;
    for (int k = 0; k < int'(C); k++) if (data >= mbounds[k]) cat = k;
    if (last_end[p] == cyc) n_b2b++;
    for (int i = 0; i < mcount; i++) begin
      int a = (maddr + i) % mcount;
      bit hit = ((table_mem[cat][a] ^ data) & ~mask) == '0;
      bit last = (i == mcount - 1) || (mmode == MODE_SINGLE && hit);
      compares++;
      if (hit) hits++;
      // results leave the coder two cycles after the compare
      if (hit || last) expq[p].push_back('{cyc + i + 2, hit, A'(cat * WORDS + a), last});
      if (last) begin
        last_end[p] = cyc + i + 1;
        if (mmode == MODE_SINGLE && hit && i < mcount - 1) n_early++;
        if (mmode == MODE_MULTIPLE && hits > 1) n_multi++;
        if (hits == 0) n_nomatch++;
        if (mcount < int'(WORDS)) n_short++;
        break;
      end
    end
  endfunction

  task automatic check_outputs();
    for (int p = 0; p < int'(P); p++) begin
      checks++;
      if (expq[p].size() > 0 && expq[p][0].cyc == cyc) begin
        rsp_t e = expq[p].pop_front();
        if (!out_valid[p] || out_match[p] !== e.match || out_last[p] !== e.last) begin
          failures++;
          $display("FAIL port %0d cyc %0d: got v%0b m%0b l%0b, expected m%0b l%0b",
                   p, cyc, out_valid[p], out_match[p], out_last[p], e.match, e.last);
        end else if (e.match) begin
          logic [7:0] s = table_mem[int'(e.addr) / WORDS][int'(e.addr) % WORDS][7:0];
          checks++;
          if (out_addr[p] !== e.addr || out_code[p] !== code_of[s] || int'(out_len[p]) != len_of[s]) begin
            failures++;
            $display("FAIL port %0d cyc %0d: addr %0d code %h/%0d, expected addr %0d code %h/%0d", p, cyc,
                     out_addr[p], out_code[p], out_len[p], e.addr, code_of[s], len_of[s]);
          end
        end
      end else if (out_valid[p]) begin
        failures++;
        $display("FAIL port %0d cyc %0d: unexpected result", p, cyc);
      end
    end
  endtask

  // one cycle: check results, then offer the next symbols
  task automatic cycle(bit want_req, logic [D-1:0] mask);
    @(negedge clk);
    cyc++;
    check_outputs();
    if (&busy) n_allbusy++;
    for (int p = 0; p < int'(P); p++) begin
      // a search of n compares occupies its port for exactly n cycles
      checks++;
      if (sym_ready[p] !== (last_end[p] <= cyc)) begin
        failures++; $display("FAIL port %0d cyc %0d: ready=%0b", p, cyc, sym_ready[p]);
      end
      sym_valid[p] = 1'b0;
      if (want_req && sym_ready[p]) begin
        sym_valid[p] = 1'b1;
        sym_mask[p] = mask;
        if ($urandom_range(19) == 0) sym_data[p] = D'(8'h0B + 8'h10 * 8'($urandom_range(14)));  // size 11: not coded
        else sym_data[p] = D'(syms[$urandom_range(NSYM - 1)]);
        model(p, sym_data[p], sym_mask[p]);
      end
    end
  endtask

  task automatic settle();
    bit any;
    do begin
      cycle(1'b0, '0);
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

  // codes a burst of symbols on all ports and checks the time it took
  task automatic burst(int n, logic [D-1:0] mask);
    int c0 = cyc, cmp0 = compares, busy_cycles;
    for (int i = 0; i < n; i++) cycle(1'b1, mask);
    settle();
    // every port was kept fed, so the burst lasted as long as the busiest
    // port's compares; it can never be shorter than the average load
    busy_cycles = cyc - c0;
    checks++;
    if (busy_cycles < (compares - cmp0) / int'(P)) begin
      failures++; $display("FAIL burst took %0d cycles for %0d compares", busy_cycles, compares - cmp0);
    end
    $display("burst: %0d cycles, %0d compares on %0d ports", busy_cycles, compares - cmp0, P);
  endtask

  initial begin
    build_table();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // load categories, symbol table and code table
    for (int k = 0; k < int'(C); k++) begin
      @(negedge clk);
      cat_we = 1'b1; cat_idx = CW'(k); cat_bound = mbounds[k];
    end
    @(negedge clk);
    cat_we = 1'b0;
    for (int a = 0; a < (1 << A); a++) begin
      automatic logic [7:0] s = table_mem[a / WORDS][a % WORDS][7:0];
      @(negedge clk);
      cam_we = 1'b1; cam_waddr = A'(a); cam_wdata = table_mem[a / WORDS][a % WORDS];
      cw_we = 1'b1; cw_waddr = A'(a); cw_wcode = code_of[s]; cw_wlen = LEN_W'(len_of[s]);
    end
    @(negedge clk);
    cam_we = 1'b0; cw_we = 1'b0;
    for (int p = 0; p < int'(P); p++) last_end[p] = -1;

    configure(MODE_SINGLE, PER_CAT);     // single match, counting value 11
    burst(400, '0);
    configure(MODE_MULTIPLE, PER_CAT);   // every symbol of the same run class
    burst(100, 32'h0000_000F);
    configure(MODE_SINGLE, 0);           // full count of 16
    burst(200, '0);

    $display("early stop %0d, multiple matches %0d, not in table %0d, short count %0d, all busy %0d, back-to-back %0d, mode switches %0d",
             n_early, n_multi, n_nomatch, n_short, n_allbusy, n_b2b, n_switch);
    checks++;
    if (n_early == 0 || n_multi == 0 || n_nomatch == 0 || n_short == 0 || n_allbusy == 0 ||
        n_b2b == 0 || n_switch == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
