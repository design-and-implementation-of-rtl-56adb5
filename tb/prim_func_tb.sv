// prim_func_tb: every select on random inputs; the expected values use the
// textbook forms of the MD5, SHA-256 and RIPEMD-160 functions written with
// XOR/AND/OR in ways that differ from the RTL where the forms allow it.
module prim_func_tb;
  import hash_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] b, c, d, f, e;
  pf_sel_e sel;
  prim_func dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 100; n++) begin
      for (int k = 0; k < 7; k++) begin
        b = $urandom; c = $urandom; d = $urandom; sel = pf_sel_e'(k);
        @(posedge clk);
        case (k)
          0: e = b ^ c ^ d;
          1: e = (b & c) ^ (~b & d);
          2: e = ~(~b & c) ^ d;
          3: e = (b & d) ^ (c & ~d);
          4: e = b ^ ~(~c & d);
          5: e = c ^ ~(~b & d);
          default: e = (b & c) ^ (b & d) ^ (c & d);
        endcase
        checks++;
        if (f !== e) begin failures++; $display("FAIL sel %0d", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
