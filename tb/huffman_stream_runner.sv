// huffman_stream_runner: testbench helper that codes the shared symbol stream
// of tb_jpeg_table_pkg with one fmcam_coder of P ports, twice:
//   * as the original FMCAM would: multiple search mode over the full
//     16-word category (every search takes 16 compares);
//   * as the adapted FMCAM: single search mode with the counting value set
//     to the 11 symbols per category.
// Symbol i goes to port i mod P, as if each processing element coded its own
// share; each port takes its symbols in order, back to back. Every code word
// is checked against the table. It reports the cycles each run took, from
// the first accepted symbol to the last compare.
module huffman_stream_runner
  import fmcam_pkg::*;
  import tb_jpeg_table_pkg::*;
#(
  parameter int unsigned P = 1
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   cycles_orig,
  output int   cycles_adapt,
  output int   checks,
  output int   failures
);
  localparam int unsigned A = 8, CW = 4, WA = 4, LEN_W = 5;

  logic rst_n = 1'b0;
  logic cam_we = 1'b0, cw_we = 1'b0, cat_we = 1'b0, set_we = 1'b0;
  logic [A-1:0] cam_waddr = '0, cw_waddr = '0;
  logic [D-1:0] cam_wdata = '0, cat_bound = '0;
  logic [CODE_W-1:0] cw_wcode = '0;
  logic [LEN_W-1:0] cw_wlen = '0;
  logic [CW-1:0] cat_idx = '0;
  search_mode_e set_mode = MODE_SINGLE;
  logic [WA:0] set_count = '0;
  logic [P-1:0] sym_valid = '0, sym_ready;
  logic [P-1:0][D-1:0] sym_data = '0, sym_mask = '0;
  logic [P-1:0] out_valid, out_match, out_last, busy;
  logic [P-1:0][A-1:0] out_addr;
  logic [P-1:0][CODE_W-1:0] out_code;
  logic [P-1:0][LEN_W-1:0] out_len;

  fmcam_coder #(.P(P)) dut (.*);

  // per port: next symbol to send, next code word expected
  int sent [P], got [P], ended [P];

  function automatic int port_share(int p);
    return (stream_len - p + int'(P) - 1) / int'(P);
  endfunction

  task automatic code_stream(search_mode_e m, int cnt, output int cycles);
    int first = -1, last = 0, cyc = 0;
    bit all_done;
    @(negedge clk);
    set_we = 1'b1; set_mode = m; set_count = (WA+1)'(cnt);
    @(negedge clk);
    set_we = 1'b0;
    for (int p = 0; p < int'(P); p++) begin sent[p] = 0; got[p] = 0; ended[p] = 0; end
    do begin
      @(negedge clk);
      cyc++;
      all_done = 1'b1;
      for (int p = 0; p < int'(P); p++) begin
        // results: one matching code word per symbol, in order
        if (out_valid[p] && out_match[p]) begin
          logic [7:0] s;
          s = stream[got[p] * int'(P) + p];
          checks++;
          if (out_code[p] !== code_of[s] || int'(out_len[p]) != len_of[s]) begin
            failures++;
            $display("FAIL P=%0d port %0d symbol %h: code %h/%0d expected %h/%0d",
                     P, p, s, out_code[p], out_len[p], code_of[s], len_of[s]);
          end
          got[p]++;
        end
        if (out_valid[p] && out_last[p]) begin ended[p]++; last = cyc; end
        sym_valid[p] = 1'b0;
        if (sent[p] < port_share(p) && sym_ready[p]) begin
          sym_valid[p] = 1'b1;
          sym_data[p] = D'(stream[sent[p] * int'(P) + p]);
          sent[p]++;
          if (first < 0) first = cyc;
        end
        if (got[p] < port_share(p) || ended[p] < port_share(p)) all_done = 1'b0;
      end
    end while (!all_done && cyc < 100000);
    repeat (3) begin
      @(negedge clk);
      for (int p = 0; p < int'(P); p++) if (out_valid[p] && out_match[p]) begin
        failures++; $display("FAIL P=%0d port %0d: extra code word", P, p);
      end
    end
    checks++;
    if (!all_done) begin failures++; $display("FAIL P=%0d: stream not finished", P); end
    // the last search's final result leaves two cycles after its last compare
    cycles = last - first - 1;
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; cycles_orig = 0; cycles_adapt = 0;
    wait (start);
    @(negedge clk);
    rst_n = 1'b1;
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
    code_stream(MODE_MULTIPLE, 16, cycles_orig);
    code_stream(MODE_SINGLE, PER_CAT, cycles_adapt);
    done = 1'b1;
  end
endmodule
