// shifter64_tb: random 64-bit words, every amount, both directions; the
// expected result is built bit by bit with zero fill.
module shifter64_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] data_in_lo, data_in_hi, data_out_lo, data_out_hi;
  logic [5:0] shift_amt;
  logic control;
  logic [63:0] din, exp;
  shifter64 dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 4; n++) begin
      for (int k = 0; k < 128; k++) begin
        din = {$urandom, $urandom};
        {data_in_hi, data_in_lo} = din;
        shift_amt = 6'(k); control = k[6];
        @(posedge clk);
        exp = '0;
        for (int i = 0; i < 64; i++) begin
          if (!control && i + (k % 64) < 64) exp[i + (k % 64)] = din[i];
          if (control && i - (k % 64) >= 0) exp[i - (k % 64)] = din[i];
        end
        checks++;
        if ({data_out_hi, data_out_lo} !== exp) begin failures++; $display("FAIL k %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
