// sha_reg_file_tb: writes random words to random slots and reads all four
// ports at random slots, against a shadow array.
module sha_reg_file_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic write_enable;
  logic [3:0] reg_dst, wt_16_sel, wt_15_sel, wt_7_sel, wt_2_sel;
  logic [31:0] write_data, wt_16, wt_15, wt_7, wt_2, shadow [16];
  sha_reg_file dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    // fill every slot first so reads are defined
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      write_enable = 1; reg_dst = 4'(i); write_data = $urandom; shadow[i] = write_data;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (n > 0 && write_enable) shadow[reg_dst] = write_data;
      write_enable = $urandom_range(0, 1); reg_dst = 4'($urandom); write_data = $urandom;
      wt_16_sel = 4'($urandom); wt_15_sel = 4'($urandom); wt_7_sel = 4'($urandom); wt_2_sel = 4'($urandom);
      #1;
      checks += 4;
      if (wt_16 !== shadow[wt_16_sel]) begin failures++; $display("FAIL wt_16"); end
      if (wt_15 !== shadow[wt_15_sel]) begin failures++; $display("FAIL wt_15"); end
      if (wt_7  !== shadow[wt_7_sel])  begin failures++; $display("FAIL wt_7"); end
      if (wt_2  !== shadow[wt_2_sel])  begin failures++; $display("FAIL wt_2"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
