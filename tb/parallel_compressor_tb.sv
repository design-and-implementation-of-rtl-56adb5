// parallel_compressor_tb: random chaining variables, then random right-line
// RIPEMD-160 steps (all five functions, random words, constants, shifts),
// compared with the step equation; a cycle without `step` must hold state.
module parallel_compressor_tb;
  import hash_pkg::*;
  import hash_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic init_work, step;
  logic [31:0] cv [5], work [5], msg, konst, e [5], o [5], nb;
  logic [4:0] shift;
  pf_sel_e func;
  parallel_compressor dut (.*);
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    init_work = 0; step = 0; msg = 0; konst = 0; shift = 0; func = PF_XOR3;
    foreach (cv[i]) cv[i] = $urandom;
    @(negedge clk); rst = 0;
    init_work = 1;
    @(negedge clk);
    init_work = 0;
    checks++; if (work !== cv) begin failures++; $display("FAIL init"); end
    e = work;
    for (int n = 0; n < 400; n++) begin
      msg = $urandom; konst = $urandom; shift = 5'($urandom);
      func = pf_sel_e'(n % 5);
      step = (n % 7 != 3);
      if (step) begin
        nb = rol(e[0] + rmd_f(16 * (n % 5), e[1], e[2], e[3]) + msg + konst, int'(shift)) + e[4];
        o = e;
        e[0] = o[4]; e[1] = nb; e[2] = o[1]; e[3] = rol(o[2], 10); e[4] = o[3];
      end
      @(negedge clk);
      checks++;
      if (work !== e) begin failures++; $display("FAIL step %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
