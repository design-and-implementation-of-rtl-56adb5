// adder3_32_tb: random operands and all-ones operands; expected value is the
// low 32 bits of a 64-bit sum.
module adder3_32_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] a, b, c, sum;
  longint unsigned e;
  adder3_32 dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 300; n++) begin
      a = (n < 2) ? '1 : $urandom; b = (n < 2) ? '1 : $urandom; c = (n < 1) ? '1 : $urandom;
      @(posedge clk);
      e = longint'(a) + longint'(b) + longint'(c);
      checks++;
      if (sum !== e[31:0]) begin failures++; $display("FAIL %h+%h+%h = %h", a, b, c, sum); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
