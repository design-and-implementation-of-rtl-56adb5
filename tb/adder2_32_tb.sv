// adder2_32_tb: random operands and carry-out corner cases; expected value
// is the low 32 bits of a 64-bit sum.
module adder2_32_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] a, b, sum;
  longint unsigned e;
  adder2_32 dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 300; n++) begin
      a = (n < 4) ? 32'hffffffff : $urandom;
      b = (n < 4) ? 32'(n) : $urandom;
      @(posedge clk);
      e = longint'(a) + longint'(b);
      checks++;
      if (sum !== e[31:0]) begin failures++; $display("FAIL %h + %h = %h", a, b, sum); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
