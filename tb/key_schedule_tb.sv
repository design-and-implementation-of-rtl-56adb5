// key_schedule_tb: random message words through the key schedule, compared
// with the sequential reference of the Tiger definition.
module key_schedule_tb;
  import hash_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [63:0] x_in [8], x_out [8], e [8];
  key_schedule dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 300; n++) begin
      foreach (x_in[i]) x_in[i] = (n == 0) ? 64'h0 : {$urandom, $urandom};
      @(posedge clk);
      e = x_in;
      tiger_ks(e);
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (x_out[i] !== e[i]) begin failures++; $display("FAIL vec %0d x%0d", n, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
