// microcode_cu_tb: drives the control unit through runs of 1 to 3 blocks for
// each algorithm, acting as the padding block (block_ready, then xfer_done
// 16 cycles after the transfer starts). Checks: IV load once per run; per
// block one working-variable load, exactly 64 (MD5, SHA-256) or 80
// (RIPEMD-160) step cycles right after it and one CV update right after the
// steps; every control word of a step against the algorithm's schedule
// (MD5 word order 1+5i, 5+3i, 7i mod 16, shift amounts and T address;
// SHA-256 K address, schedule slot and expansion flag; RIPEMD-160 word
// orders generated from the permutation rho and pi(i) = 9i + 5 mod 16,
// constant addresses and function order); digest_valid after the last
// block; error for the Tiger code.
module microcode_cu_tb;
  import hash_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  algo_e algo, cur_algo;
  logic restart_algo, block_ready, xfer_done, last_block, transfer, algo_512bit_over, digest_valid, error;
  ctrl_t ctrl;
  logic [6:0] step_cnt;
  microcode_cu dut (.*);

  int rho [16] = '{7, 4, 13, 1, 10, 6, 15, 3, 12, 0, 9, 5, 2, 14, 11, 8};
  int md5s [16] = '{7, 12, 17, 22, 5, 9, 14, 20, 4, 11, 16, 23, 6, 10, 15, 21};

  function automatic int rmd_word(input int t, input bit right);
    int w = t % 16;
    if (right) w = (9 * w + 5) % 16;
    for (int k = 0; k < t / 16; k++) w = rho[w];
    return w;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    restart_algo = 0; block_ready = 0; xfer_done = 0; last_block = 0; algo = ALG_MD5;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int a = 0; a < 3; a++) begin
      for (int nb = 1; nb <= 3; nb++) begin
        automatic int n_init = 0;
        algo = algo_e'(a); restart_algo = 1;
        @(negedge clk);
        restart_algo = 0;
        for (int b = 0; b < nb; b++) begin
          automatic int steps = 0;
          int nsteps;
          nsteps = (a == 2) ? 80 : 64;
          // be the padding block: block ready after a while
          repeat ($urandom_range(2, 30)) begin
            if (ctrl.cv_init) n_init++;
            @(negedge clk);
          end
          block_ready = 1;
          while (!transfer) @(negedge clk);
          @(negedge clk);
          block_ready = 0;
          repeat (15) @(negedge clk);
          xfer_done = 1; last_block = (b == nb - 1);
          @(negedge clk);
          xfer_done = 0;
          chk(ctrl.init_work && !ctrl.step, "init_work after transfer");
          @(negedge clk);
          while (ctrl.step) begin
            automatic int t = steps;
            chk(cur_algo == algo_e'(a), "algorithm latched");
            case (a)
              0: begin
                automatic int g = (t < 16) ? t : (t < 32) ? (1 + 5 * t) % 16 : (t < 48) ? (5 + 3 * t) % 16 : (7 * t) % 16;
                chk(int'(ctrl.top_msg_sel) == g, $sformatf("md5 word t=%0d", t));
                chk(int'(ctrl.top_shift) == md5s[4 * (t / 16) + t % 4], $sformatf("md5 shift t=%0d", t));
                chk(int'(ctrl.top_const) == t, $sformatf("md5 T address t=%0d", t));
              end
              1: begin
                chk(int'(ctrl.top_const) == 64 + t, $sformatf("sha K address t=%0d", t));
                chk(ctrl.sha_we && int'(ctrl.sha_dst) == t % 16, $sformatf("sha slot t=%0d", t));
                chk(ctrl.sha_expand == (t >= 16), $sformatf("sha expand t=%0d", t));
                chk(t >= 16 || int'(ctrl.top_msg_sel) == t, $sformatf("sha word t=%0d", t));
                chk(ctrl.top_func == PF_CH, "sha Ch");
              end
              default: begin
                chk(int'(ctrl.top_msg_sel) == rmd_word(t, 0), $sformatf("rmd left word t=%0d", t));
                chk(int'(ctrl.bot_msg_sel) == rmd_word(t, 1), $sformatf("rmd right word t=%0d", t));
                chk(int'(ctrl.top_const) == 128 + t / 16 && int'(ctrl.bot_const) == 133 + t / 16,
                    $sformatf("rmd K address t=%0d", t));
                chk(int'(ctrl.top_func) == int'(pf_sel_e'((t / 16 == 0) ? PF_XOR3 : (t / 16 == 1) ? PF_CH :
                    (t / 16 == 2) ? PF_ORNX : (t / 16 == 3) ? PF_MUXZ : PF_XORN)), "rmd left f");
                chk(int'(ctrl.bot_func) == int'(pf_sel_e'((t / 16 == 4) ? PF_XOR3 : (t / 16 == 3) ? PF_CH :
                    (t / 16 == 2) ? PF_ORNX : (t / 16 == 1) ? PF_MUXZ : PF_XORN)), "rmd right f");
              end
            endcase
            steps++;
            @(negedge clk);
          end
          chk(steps == nsteps, $sformatf("algo %0d: %0d steps", a, steps));
          chk(ctrl.cv_write && algo_512bit_over, "CV update after steps");
          @(negedge clk);
        end
        chk(n_init == 1, $sformatf("IV loaded %0d times", n_init));
        chk(digest_valid, "digest_valid after last block");
      end
    end
    algo = ALG_TIGER; restart_algo = 1;
    @(negedge clk);
    restart_algo = 0;
    chk(error && !transfer, "error for algo 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
