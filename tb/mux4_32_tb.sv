// mux4_32_tb: random inputs, all four select values.
module mux4_32_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] in0, in1, in2, in3, out, v [4];
  logic [1:0] sel;
  mux4_32 dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      foreach (v[i]) v[i] = $urandom;
      {in0, in1, in2, in3} = {v[0], v[1], v[2], v[3]};
      sel = 2'(n);
      @(posedge clk);
      checks++;
      if (out !== v[n % 4]) begin failures++; $display("FAIL sel %0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
