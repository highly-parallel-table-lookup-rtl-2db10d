// tb_huffman_workload: Huffman coding of one symbol stream with 1, 2, 4, 8
// and 16 ports, in the original FMCAM manner (multiple search over full
// 16-word categories) and in the adapted manner (single search, counting
// value 11), printing the cycle counts side by side.
//
// The stream is 1024 run/size symbols drawn with probability 2^-length from
// the JPEG-style table of tb_jpeg_table_pkg; it stands in for the coefficient
// stream of a picture. Checked: every code word; the original-manner run
// takes exactly 16 cycles per symbol on the busiest port; the adapted run is
// never slower than the original one and never faster than one symbol per
// cycle per port; more ports never take more cycles.
module tb_huffman_workload;
  import tb_jpeg_table_pkg::*;
  localparam int NPORT = 5;
  localparam int unsigned NSYMBOLS = 1024;
  localparam int PORTS [NPORT] = '{1, 2, 4, 8, 16};

  logic clk = 1'b0, start = 1'b0;
  logic [NPORT-1:0] done;
  int c_orig [NPORT], c_adapt [NPORT], n_chk [NPORT], n_fail [NPORT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NPORT; i++) begin : g_run
    huffman_stream_runner #(.P(PORTS[i])) u_run (
      .clk, .start, .done(done[i]),
      .cycles_orig(c_orig[i]), .cycles_adapt(c_adapt[i]),
      .checks(n_chk[i]), .failures(n_fail[i])
    );
  end

  initial begin
    build_table();
    make_stream(NSYMBOLS);
    start = 1'b1;
    wait (&done);
    $display("ports  original-cycles  adapted-cycles  reduction");
    for (int i = 0; i < NPORT; i++) begin
      automatic int share = (NSYMBOLS + PORTS[i] - 1) / PORTS[i];
      checks += n_chk[i];
      failures += n_fail[i];
      $display("%5d  %15d  %14d  %8.1f%%", PORTS[i], c_orig[i], c_adapt[i],
               100.0 * (1.0 - real'(c_adapt[i]) / real'(c_orig[i])));
      checks++;
      if (c_orig[i] != share * 16) begin
        failures++; $display("FAIL P=%0d: original manner took %0d cycles, expected %0d", PORTS[i], c_orig[i], share * 16);
      end
      checks++;
      if (c_adapt[i] > c_orig[i] || c_adapt[i] < share) begin
        failures++; $display("FAIL P=%0d: adapted manner took %0d cycles", PORTS[i], c_adapt[i]);
      end
      if (i > 0) begin
        checks++;
        if (c_orig[i] > c_orig[i-1] || c_adapt[i] > c_adapt[i-1]) begin
          failures++; $display("FAIL P=%0d slower than P=%0d", PORTS[i], PORTS[i-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
