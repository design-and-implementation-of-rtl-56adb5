// addsub64_tb: random 64-bit additions and subtractions done as the block
// is used, low half in one cycle and high half in the next; the two halves
// are compared with 64-bit arithmetic, including carry/borrow corner cases.
module addsub64_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic enable, sub, upper;
  logic [31:0] data_in1, data_in2, data_out, lo;
  logic [63:0] a, b, e;
  addsub64 dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    enable = 0; sub = 0; upper = 0; data_in1 = 0; data_in2 = 0;
    @(negedge clk); rst = 0;
    for (int n = 0; n < 400; n++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (n % 5 == 1) a[31:0] = '1;
      if (n % 5 == 2) begin a = 64'h1_0000_0000; b = 64'h1; end
      sub = n[0];
      e = sub ? a - b : a + b;
      @(negedge clk);
      enable = 1; upper = 0; data_in1 = a[31:0]; data_in2 = b[31:0];
      #1 lo = data_out;
      @(negedge clk);
      upper = 1; data_in1 = a[63:32]; data_in2 = b[63:32];
      #1;
      checks++;
      if ({data_out, lo} !== e) begin failures++; $display("FAIL %h %s %h = %h%h", a, sub ? "-" : "+", b, data_out, lo); end
      @(negedge clk);
      enable = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
