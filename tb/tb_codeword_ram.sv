// tb_codeword_ram: loads the code word table, then reads it through all P
// ports at once with random addresses every cycle and checks each port's
// registered read data one cycle later against a reference array.
module tb_codeword_ram;
  localparam int unsigned P = 16, A = 8, CODE_W = 16, LEN_W = 5;

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [A-1:0] waddr = '0;
  logic [CODE_W-1:0] wcode = '0;
  logic [LEN_W-1:0] wlen = '0;
  logic [P-1:0][A-1:0] raddr = '0;
  logic [P-1:0][CODE_W-1:0] rcode;
  logic [P-1:0][LEN_W-1:0] rlen;
  logic [CODE_W-1:0] mcode [1 << A];
  logic [LEN_W-1:0] mlen [1 << A];
  logic [P-1:0][A-1:0] prev;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  codeword_ram #(.P(P), .A(A), .CODE_W(CODE_W), .LEN_W(LEN_W)) dut (.*);

  initial begin
    for (int a = 0; a < (1 << A); a++) begin
      @(negedge clk);
      we = 1'b1; waddr = A'(a); wcode = CODE_W'($urandom); wlen = LEN_W'($urandom_range(16));
      mcode[a] = wcode; mlen[a] = wlen;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < int'(P); p++) raddr[p] = A'($urandom);
      prev = raddr;
      @(negedge clk);
      for (int p = 0; p < int'(P); p++) begin
        checks++;
        if (rcode[p] !== mcode[prev[p]] || rlen[p] !== mlen[prev[p]]) begin
          failures++;
          $display("FAIL port %0d addr %0d: %h/%0d expected %h/%0d", p, prev[p],
                   rcode[p], rlen[p], mcode[prev[p]], mlen[prev[p]]);
        end
      end
    end
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
