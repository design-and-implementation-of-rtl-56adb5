// pass_round_select_tb: for each pass and round, the expected argument order
// is taken from Tiger's listing: pass(a,b,c), pass(c,a,b), pass(b,c,a), each
// with rounds (1,2,3), (2,3,1), (3,1,2), (1,2,3), ... of its own order.
module pass_round_select_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] a, b, c, x, y, z, v [3], p [3];
  logic [1:0] pass;
  logic [2:0] round;
  pass_round_select dut (.*);
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 10; n++) begin
      for (int ps = 0; ps < 3; ps++) begin
        for (int r = 0; r < 8; r++) begin
          a = $urandom; b = $urandom; c = $urandom;
          pass = 2'(ps); round = 3'(r);
          @(posedge clk);
          if (ps == 0) p = '{a, b, c};
          else if (ps == 1) p = '{c, a, b};
          else p = '{b, c, a};
          case (r)
            0, 3, 6: v = '{p[0], p[1], p[2]};
            1, 4, 7: v = '{p[1], p[2], p[0]};
            default: v = '{p[2], p[0], p[1]};
          endcase
          checks++;
          if ({x, y, z} !== {v[0], v[1], v[2]}) begin failures++; $display("FAIL pass %0d round %0d", ps, r); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
