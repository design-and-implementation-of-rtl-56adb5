// cv_update_tb: for each algorithm, loads the IV (checked against the
// published initial values; F..H always load the SHA-256 IV) and then applies random end-of-block updates
// with random top and bottom working variables, compared with the
// feed-forward of MD5/SHA-256 and the RIPEMD-160 line combination.
module cv_update_tb;
  import hash_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  algo_e algo;
  logic cv_init, cv_write;
  logic [31:0] top [8], bot [5], cvq [8], e [8], t;
  cv_update dut (.*);
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    cv_init = 0; cv_write = 0; algo = ALG_MD5;
    foreach (top[i]) top[i] = 0;
    foreach (bot[i]) bot[i] = 0;
    @(negedge clk); rst = 0;
    for (int a = 0; a < 3; a++) begin
      algo = algo_e'(a);
      cv_init = 1;
      @(negedge clk);
      cv_init = 0;
      case (a)
        0: e = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476, 0, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
        1: e = '{32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
                 32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
        default: e = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476, 32'hc3d2e1f0,
                    32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
      endcase
      checks++;
      if (cvq !== e) begin failures++; $display("FAIL IV algo %0d", a); end
      for (int n = 0; n < 100; n++) begin
        foreach (top[i]) top[i] = $urandom;
        foreach (bot[i]) bot[i] = $urandom;
        cv_write = 1;
        if (a == 2) begin
          t = e[1] + top[2] + bot[3];
          e[1] = e[2] + top[3] + bot[4];
          e[2] = e[3] + top[4] + bot[0];
          e[3] = e[4] + top[0] + bot[1];
          e[4] = e[0] + top[1] + bot[2];
          e[0] = t;
          for (int i = 5; i < 8; i++) e[i] = e[i] + top[i];
        end else begin
          for (int i = 0; i < 8; i++) e[i] = e[i] + top[i];
        end
        @(negedge clk);
        cv_write = 0;
        checks++;
        if (cvq !== e) begin failures++; $display("FAIL update algo %0d n %0d", a, n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
