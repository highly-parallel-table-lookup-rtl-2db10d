// tb_category_block: writes the whole 2^A-word table through {category,
// word} addresses, then for every read address checks that all C banks
// broadcast the right word at once.
module tb_category_block;
  localparam int unsigned C = 16, D = 32, A = 8, WA = 4;

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [A-1:0] waddr = '0;
  logic [D-1:0] wdata = '0;
  logic [WA-1:0] raddr = '0;
  logic [C-1:0][D-1:0] ref_data;
  logic [D-1:0] model [1 << A];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  category_block #(.C(C), .D(D), .A(A)) dut (.*);

  task automatic check_all();
    for (int w = 0; w < (1 << WA); w++) begin
      raddr = WA'(w);
      #1;
      for (int k = 0; k < C; k++) begin
        checks++;
        if (ref_data[k] !== model[k * (1 << WA) + w]) begin
          failures++;
          $display("FAIL bank %0d word %0d = %h expected %h", k, w, ref_data[k], model[k * (1 << WA) + w]);
        end
      end
    end
  endtask

  initial begin
    for (int a = 0; a < (1 << A); a++) begin
      @(negedge clk);
      we = 1'b1; waddr = A'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    check_all();
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      we = 1'b1; waddr = A'($urandom); wdata = $urandom; model[waddr] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    check_all();
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
