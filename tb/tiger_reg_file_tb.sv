// tiger_reg_file_tb: reset clears all 28 registers; then random subsets of
// registers are written in the same cycle and all are compared with a shadow.
module tiger_reg_file_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en [28];
  logic [31:0] wr_data [28], rd_data [28], shadow [28];
  tiger_reg_file dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    foreach (wr_en[i]) begin wr_en[i] = 0; wr_data[i] = 0; shadow[i] = 0; end
    @(negedge clk); @(negedge clk); rst = 0;
    for (int n = 0; n < 300; n++) begin
      foreach (wr_en[i]) begin wr_en[i] = ($urandom_range(0, 2) == 0); wr_data[i] = $urandom; end
      @(posedge clk);
      foreach (wr_en[i]) if (wr_en[i]) shadow[i] = wr_data[i];
      @(negedge clk);
      foreach (rd_data[i]) begin
        checks++;
        if (rd_data[i] !== shadow[i]) begin failures++; $display("FAIL reg %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
