// rom_table_tb: reads every constant through both ports and compares it with
// a value computed here: MD5 T[i] = floor(2^32 |sin i|), SHA-256 K[t] from
// the cube roots of the first 64 primes, RIPEMD-160 constants from square
// and cube roots of 2, 3, 5, 7. Addresses past the table read zero.
module rom_table_tb;
  import hash_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0]  address_1, address_2;
  logic [31:0] data_out_1, data_out_2, exp1, exp2;
  rom_table dut (.*);

  function automatic logic [31:0] expected(input int a);
    int pr [5] = '{0, 2, 3, 5, 7};
    if (a < 64)  return md5_t(a + 1);
    if (a < 128) return frac32($pow(real'(nth_prime(a - 64)), 1.0 / 3.0));
    if (a < 133) return 32'(longint'($floor($sqrt(real'(pr[a - 128])) * 1073741824.0)));
    if (a < 137) return 32'(longint'($floor($pow(real'(pr[a - 132]), 1.0 / 3.0) * 1073741824.0)));
    return 32'h0;
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 256; a++) begin
      address_1 = 8'(a); address_2 = 8'(255 - a);
      @(posedge clk);
      exp1 = expected(a); exp2 = expected(255 - a);
      checks += 2;
      if (data_out_1 !== exp1) begin failures++; $display("FAIL port1 %0d: %h exp %h", a, data_out_1, exp1); end
      if (data_out_2 !== exp2) begin failures++; $display("FAIL port2 %0d: %h exp %h", 255 - a, data_out_2, exp2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
