// tiger_proc_block_tb: one Tiger round on random a, b, c, x and each
// multiplier, with a random S-box table answering the block's lookup
// addresses; compared with the reference round.
module tiger_proc_block_tb;
  import hash_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [63:0] a, b, c, x, a_out, b_out, c_out, ea, eb, ec;
  logic [1:0] mul_sel;
  logic [9:0] sbox_addr [8];
  logic [63:0] sbox_val [8], sbox [1024];
  tiger_proc_block dut (.*);
  always_comb for (int i = 0; i < 8; i++) sbox_val[i] = sbox[sbox_addr[i]];
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 1024; i++) sbox[i] = {$urandom, $urandom};
    for (int n = 0; n < 300; n++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom}; x = {$urandom, $urandom};
      mul_sel = 2'(n % 3);
      @(posedge clk);
      ea = a; eb = b; ec = c;
      tiger_round(ea, eb, ec, x, (n % 3 == 0) ? 5 : (n % 3 == 1) ? 7 : 9, sbox);
      checks += 3;
      if (a_out !== ea) begin failures++; $display("FAIL a %0d", n); end
      if (b_out !== eb) begin failures++; $display("FAIL b %0d", n); end
      if (c_out !== ec) begin failures++; $display("FAIL c %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
