// complement_block_tb: random data with control 0 (pass) and 1 (invert),
// checked bit by bit.
module complement_block_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] data_in, data_out;
  logic control;
  complement_block dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      data_in = $urandom; control = n[0];
      @(posedge clk);
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (data_out[i] !== (control ? !data_in[i] : data_in[i])) begin
          failures++; $display("FAIL bit %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
