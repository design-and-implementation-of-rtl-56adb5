// mux2_32_tb: random inputs, both select values.
module mux2_32_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] in0, in1, out;
  logic sel;
  mux2_32 dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      in0 = $urandom; in1 = $urandom; sel = n[0];
      @(posedge clk);
      checks++;
      if (out !== (n[0] ? in1 : in0)) begin failures++; $display("FAIL sel %0d", sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
