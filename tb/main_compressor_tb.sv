// main_compressor_tb: loads random chaining variables, then applies random
// steps of MD5 (all four functions), SHA-256 and the RIPEMD-160 left line
// with random message words, constants and shift amounts, comparing all
// eight working variables after each step with the step equations.
module main_compressor_tb;
  import hash_pkg::*;
  import hash_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  algo_e algo;
  logic init_work, step;
  logic [31:0] cv [8], work [8], msg, konst, e [8], o [8];
  logic [4:0] shift;
  pf_sel_e func;
  main_compressor dut (.*);

  function automatic logic [31:0] fval(input pf_sel_e s, input logic [31:0] x, y, z);
    case (s)
      PF_CH:   return (x & y) | (~x & z);
      PF_MUXZ: return (x & z) | (y & ~z);
      PF_XOR3: return x ^ y ^ z;
      PF_MD5I: return y ^ (x | ~z);
      PF_ORNX: return (x | ~y) ^ z;
      default: return x ^ (y | ~z);
    endcase
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    init_work = 0; step = 0; msg = 0; konst = 0; shift = 0; func = PF_XOR3; algo = ALG_MD5;
    foreach (cv[i]) cv[i] = $urandom;
    @(negedge clk); rst = 0;
    for (int a = 0; a < 3; a++) begin
      algo = algo_e'(a);
      init_work = 1;
      @(negedge clk);
      init_work = 0;
      checks++;
      if (work !== cv) begin failures++; $display("FAIL init"); end
      e = work;
      for (int n = 0; n < 200; n++) begin
        logic [31:0] t1, t2, nb;
        msg = $urandom; konst = $urandom; shift = 5'($urandom);
        step = 1;
        case (algo)
          ALG_MD5: begin
            func = pf_sel_e'((n % 4 == 0) ? PF_CH : (n % 4 == 1) ? PF_MUXZ : (n % 4 == 2) ? PF_XOR3 : PF_MD5I);
            nb = e[1] + rol(e[0] + fval(func, e[1], e[2], e[3]) + msg + konst, int'(shift));
            o = e;
            e[0] = o[3]; e[1] = nb; e[2] = o[1]; e[3] = o[2];
          end
          ALG_SHA256: begin
            func = PF_CH;
            t1 = e[7] + (ror(e[4], 6) ^ ror(e[4], 11) ^ ror(e[4], 25)) + ((e[4] & e[5]) ^ (~e[4] & e[6])) + konst + msg;
            t2 = (ror(e[0], 2) ^ ror(e[0], 13) ^ ror(e[0], 22)) + ((e[0] & e[1]) ^ (e[0] & e[2]) ^ (e[1] & e[2]));
            o = e;
            e[0] = t1 + t2; e[4] = o[3] + t1;
            for (int i = 1; i < 8; i++) if (i != 4) e[i] = o[i-1];
          end
          default: begin
            func = pf_sel_e'($urandom_range(0, 4));
            nb = rol(e[0] + fval(func, e[1], e[2], e[3]) + msg + konst, int'(shift)) + e[4];
            o = e;
            e[0] = o[4]; e[1] = nb; e[2] = o[1]; e[3] = rol(o[2], 10); e[4] = o[3];
          end
        endcase
        @(negedge clk);
        step = 0;
        checks++;
        if (work !== e) begin failures++; $display("FAIL algo %0d step %0d: %h %h %h %h exp %h %h %h %h", a, n, work[0], work[1], work[2], work[3], e[0], e[1], e[2], e[3]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
