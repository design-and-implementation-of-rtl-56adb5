// digest_gen_tb: random chaining variables for each algorithm; the expected
// digest is assembled byte by byte (low byte first for MD5 and RIPEMD-160,
// high byte first for SHA-256) with unused bits zero.
module digest_gen_tb;
  import hash_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  algo_e algo;
  logic [31:0] cvq [8];
  logic [255:0] digest, e;
  digest_gen dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      int nw, pos;
      algo = algo_e'(n % 4);
      foreach (cvq[i]) cvq[i] = $urandom;
      @(posedge clk);
      e = '0; pos = 255;
      nw = (algo == ALG_MD5) ? 4 : (algo == ALG_RMD160) ? 5 : (algo == ALG_SHA256) ? 8 : 0;
      for (int w = 0; w < nw; w++)
        for (int by = 0; by < 4; by++) begin
          e[pos -: 8] = (algo == ALG_SHA256) ? cvq[w][31 - 8*by -: 8] : cvq[w][8*by +: 8];
          pos -= 8;
        end
      checks++;
      if (digest !== e) begin failures++; $display("FAIL algo %0d", algo); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
