// cl_shifter_tb: random data and every shift amount 0..31; the expected
// rotation is built bit by bit (bit i goes to bit (i + s) mod 32).
module cl_shifter_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] din, dout, exp;
  logic [4:0]  s;
  cl_shifter dut (.data_in(din), .shift_amount(s), .data_out(dout));
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int k = 0; k < 32; k++) begin
        din = $urandom; s = 5'(k);
        @(posedge clk);
        for (int i = 0; i < 32; i++) exp[(i + k) % 32] = din[i];
        checks++;
        if (dout !== exp) begin failures++; $display("FAIL %h rol %0d = %h exp %h", din, k, dout, exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
