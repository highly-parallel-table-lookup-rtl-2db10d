// tb_loop_address_counter: checks the loop-address-counter against a
// reference count: it steps once per clock from 0, wraps to 0 after
// last_addr, presents the following address on addr_next, and follows a new
// last_addr (shorter loop, wrap from above it, loop of one).
module tb_loop_address_counter;
  localparam int unsigned WORDS = 16;
  localparam int unsigned AW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] last_addr, addr, addr_next;
  int checks = 0, failures = 0;
  int model;

  always #5 clk = ~clk;

  loop_address_counter #(.WORDS(WORDS)) dut (.*);

  task automatic check_cycles(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      model = (model >= int'(last_addr)) ? 0 : model + 1;
      checks++;
      if (addr !== AW'(model)) begin
        failures++; $display("FAIL addr=%0d expected %0d", addr, model);
      end
      checks++;
      if (addr_next !== AW'(model >= int'(last_addr) ? 0 : model + 1)) begin
        failures++; $display("FAIL addr_next=%0d at addr %0d", addr_next, model);
      end
    end
  endtask

  initial begin
    last_addr = AW'(WORDS - 1);
    model = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (addr !== '0) begin failures++; $display("FAIL reset value %0d", addr); end
    rst_n = 1'b1;
    check_cycles(40);        // full loop of 16, wraps twice
    while (model != 9) check_cycles(1);
    last_addr = 4'd5;        // counter at 9 > 5: must wrap to 0
    check_cycles(20);
    last_addr = 4'd0;        // loop of one word
    check_cycles(5);
    last_addr = 4'd7;
    check_cycles(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
