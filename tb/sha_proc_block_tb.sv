// sha_proc_block_tb: random schedule words against the SHA-256 expansion
// formula, plus the expansion of the padded message "abc", whose W[16] and
// W[17] are published (61626380 ... -> W16 = 61626380, W17 = 000f0000).
module sha_proc_block_tb;
  import hash_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] wt_16, wt_15, wt_7, wt_2, w, e;
  sha_proc_block dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 300; n++) begin
      wt_16 = $urandom; wt_15 = $urandom; wt_7 = $urandom; wt_2 = $urandom;
      @(posedge clk);
      e = (ror(wt_2, 17) ^ ror(wt_2, 19) ^ (wt_2 >> 10)) + wt_7 +
          (ror(wt_15, 7) ^ ror(wt_15, 18) ^ (wt_15 >> 3)) + wt_16;
      checks++;
      if (w !== e) begin failures++; $display("FAIL random %0d", n); end
    end
    // "abc": W0 = 61626380, W1..W14 = 0, W15 = 00000018
    wt_16 = 32'h61626380; wt_15 = 32'h0; wt_7 = 32'h0; wt_2 = 32'h0;      // W16
    @(posedge clk);
    checks++; if (w !== 32'h61626380) begin failures++; $display("FAIL W16 %h", w); end
    wt_16 = 32'h0; wt_15 = 32'h0; wt_7 = 32'h0; wt_2 = 32'h00000018;      // W17
    @(posedge clk);
    checks++; if (w !== 32'h000f0000) begin failures++; $display("FAIL W17 %h", w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
