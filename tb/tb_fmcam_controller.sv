// tb_fmcam_controller: checks the controller's settings - reset mode (single
// search, full count), counting values 1..WORDS, 0 and too-large values
// meaning the full bank, the mode register, and the category register write
// path - by watching the length of the loop-address-counter's loop.
module tb_fmcam_controller;
  import fmcam_pkg::*;
  localparam int unsigned C = 16, D = 32, A = 8, WORDS = 16, CW = 4, WA = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cat_we = 1'b0;
  logic [CW-1:0] cat_idx = '0;
  logic [D-1:0] cat_bound = '0;
  logic set_we = 1'b0;
  search_mode_e set_mode = MODE_MULTIPLE;
  logic [WA:0] set_count = '0;
  logic [C-1:0][D-1:0] bounds;
  logic [WA-1:0] loop_addr, loop_addr_next;
  search_mode_e mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fmcam_controller #(.C(C), .D(D), .A(A)) dut (.*);

  // measures the loop length: cycles between two visits of address 0
  task automatic check_loop(int expected);
    int n;
    while (loop_addr != 0) @(negedge clk);
    n = 0;
    do begin
      @(negedge clk);
      n++;
      checks++;
      if (int'(loop_addr) >= expected) begin
        failures++; $display("FAIL address %0d beyond count %0d", loop_addr, expected);
      end
    end while (loop_addr != 0 && n < 100);
    checks++;
    if (n != expected) begin
      failures++; $display("FAIL loop length %0d expected %0d", n, expected);
    end
  endtask

  task automatic set(search_mode_e m, int cnt);
    @(negedge clk);
    set_we = 1'b1; set_mode = m; set_count = (WA+1)'(cnt);
    @(negedge clk);
    set_we = 1'b0;
    checks++;
    if (mode != m) begin failures++; $display("FAIL mode"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (mode != MODE_SINGLE) begin failures++; $display("FAIL reset mode"); end
    check_loop(WORDS);
    for (int cnt = 1; cnt <= int'(WORDS); cnt++) begin
      set((cnt % 2) ? MODE_MULTIPLE : MODE_SINGLE, cnt);
      check_loop(cnt);
      check_loop(cnt);
    end
    set(MODE_MULTIPLE, 3);
    set(MODE_MULTIPLE, 0);
    check_loop(WORDS);
    set(MODE_SINGLE, 3);
    set(MODE_SINGLE, 17);
    check_loop(WORDS);
    // category register path
    @(negedge clk);
    cat_we = 1'b1; cat_idx = 4'd5; cat_bound = 32'hDEAD_BEEF;
    @(negedge clk);
    cat_we = 1'b0;
    checks++;
    if (bounds[5] !== 32'hDEAD_BEEF || bounds[4] !== 32'h4000_0000) begin
      failures++; $display("FAIL category register write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
