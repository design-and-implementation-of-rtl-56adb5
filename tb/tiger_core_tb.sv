// tiger_core_tb: chains of random 512-bit blocks through the Tiger core with
// a random S-box table, compared with the reference compression function;
// checks the 29-cycle latency of each block and that `first` restarts from
// the IV.
module tiger_core_tb;
  import hash_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start, first, done;
  logic [511:0] block;
  logic [9:0] sbox_addr [8];
  logic [63:0] sbox_val [8], sbox [1024];
  logic [191:0] hash, ref_h;
  tiger_core dut (.*);
  always_comb for (int i = 0; i < 8; i++) sbox_val[i] = sbox[sbox_addr[i]];
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int cyc;
    for (int i = 0; i < 1024; i++) sbox[i] = {$urandom, $urandom};
    start = 0; first = 0; block = '0;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 16; i++) block[32*i +: 32] = $urandom;
      first = (n % 5 == 0);
      if (first) ref_h = {64'hF096A5B4C3B2E187, 64'hFEDCBA9876543210, 64'h0123456789ABCDEF};
      start = 1;
      @(negedge clk);
      start = 0; cyc = 1;
      while (!done && cyc < 200) begin @(negedge clk); cyc++; end
      ref_h = tiger_compress(ref_h, block, sbox);
      checks += 2;
      if (hash !== ref_h) begin failures++; $display("FAIL block %0d: %h exp %h", n, hash, ref_h); end
      if (cyc != 29) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
