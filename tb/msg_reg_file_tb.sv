// msg_reg_file_tb: checks reset to zero, then writes random words through
// the single write port and reads them back through both read ports at
// random indices, against a shadow array; a disabled write must not change
// the store.
module msg_reg_file_tb;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] in_data, top_msg, bot_msg, shadow [16];
  logic reg_write;
  logic [3:0] word_index, top_msg_sel, bot_msg_sel;
  msg_reg_file dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    reg_write = 0; in_data = 0; word_index = 0; top_msg_sel = 0; bot_msg_sel = 0;
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int n = 0; n < 500; n++) begin
      reg_write = ($urandom_range(0, 3) != 0); word_index = 4'($urandom); in_data = $urandom;
      top_msg_sel = 4'($urandom); bot_msg_sel = 4'($urandom);
      #1;
      checks += 2;
      if (top_msg !== shadow[top_msg_sel]) begin failures++; $display("FAIL top %0d", top_msg_sel); end
      if (bot_msg !== shadow[bot_msg_sel]) begin failures++; $display("FAIL bot %0d", bot_msg_sel); end
      @(posedge clk);
      if (reg_write) shadow[word_index] = in_data;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
