// tb_category_bank: fills a bank with random words, then reads every address
// through the read port (combinational read) and compares with a reference
// array; overwrites some words and reads again.
module tb_category_bank;
  localparam int unsigned WORDS = 16, D = 32, AW = 4;

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [D-1:0] wdata = '0, rdata;
  logic [D-1:0] model [WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  category_bank #(.WORDS(WORDS), .D(D)) dut (.*);

  task automatic write_word(int a, logic [D-1:0] v);
    @(negedge clk);
    we = 1'b1; waddr = AW'(a); wdata = v; model[a] = v;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic read_all();
    for (int a = 0; a < WORDS; a++) begin
      raddr = AW'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++; $display("FAIL word %0d = %h expected %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < WORDS; a++) write_word(a, $urandom);
    read_all();
    for (int n = 0; n < 10; n++) write_word($urandom_range(WORDS - 1), $urandom);
    read_all();
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
