// tb_category_registers: checks the reset split of the value space into C
// equal ranges, writes of single bounds, and that a write touches only the
// addressed category.
module tb_category_registers;
  localparam int unsigned C = 16, D = 32, CW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cat_we = 1'b0;
  logic [CW-1:0] cat_idx = '0;
  logic [D-1:0] cat_bound = '0;
  logic [C-1:0][D-1:0] bounds;
  logic [D-1:0] model [C];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  category_registers #(.C(C), .D(D)) dut (.*);

  task automatic check_all();
    for (int k = 0; k < C; k++) begin
      checks++;
      if (bounds[k] !== model[k]) begin
        failures++; $display("FAIL bound[%0d]=%h expected %h", k, bounds[k], model[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < C; k++) model[k] = D'(k) * 32'h1000_0000;
    repeat (2) @(negedge clk);
    check_all();
    rst_n = 1'b1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 40; n++) begin
      cat_we = 1'b1;
      cat_idx = CW'($urandom);
      cat_bound = $urandom;
      model[cat_idx] = cat_bound;
      @(negedge clk);
      cat_we = 1'b0;
      cat_bound = $urandom;      // not written: we is low
      @(negedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
