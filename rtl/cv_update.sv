// cv_update: chaining-variable (CV) updation block. Holds CVQ_A..CVQ_H.
// On `cv_init` each register loads the IV of the selected algorithm through a
// 4:1 multiplexer whose inputs are the MD5, SHA-256 and RIPEMD-160 IVs and the
// update value (CVQ_E takes 0 for MD5; CVQ_F..H use a 2:1 multiplexer since
// only SHA-256 has them). On `cv_write`, at the end of a block, each register
// takes the update value chosen by a 2:1 multiplexer:
//   MD5 / SHA-256: CVQ_x + x_top            (word-wise feed-forward)
//   RIPEMD-160:    A <- B + Ctt + Dtb, B <- C + Dtt + Etb, C <- D + Ett + Atb,
//                  D <- E + Att + Btb, E <- A + Btt + Ctb
// (tt = top/left line, tb = bottom/right line). The multiplexer and adder
// arrangement follows the document's CV-updation figure; the select timing
// is this design's. Both operations take one clock cycle.
module cv_update
  import hash_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  algo_e       algo,
  input  logic        cv_init,
  input  logic        cv_write,
  input  logic [31:0] top [8],
  input  logic [31:0] bot [5],
  output logic [31:0] cvq [8]
);
  logic        is_rmd;
  logic [1:0]  sel4;
  logic [31:0] upd_ff [5], upd_rmd [5], upd [5], nxt [8];
  logic [31:0] rmd_sum [5];

  always_comb begin
    is_rmd = (algo == ALG_RMD160);
    sel4   = cv_init ? 2'(algo) : 2'd3;
  end

  for (genvar i = 0; i < 5; i++) begin : g_abcde
    adder2_32 u_ff  (.a(cvq[i]), .b(top[i]), .sum(upd_ff[i]));
    adder3_32 u_rmd (.a(cvq[(i + 1) % 5]), .b(top[(i + 2) % 5]), .c(bot[(i + 3) % 5]),
                     .sum(rmd_sum[i]));
    assign upd_rmd[i] = rmd_sum[i];
    mux2_32 u_m2 (.in0(upd_ff[i]), .in1(upd_rmd[i]), .sel(is_rmd), .out(upd[i]));
    if (i < 4) begin : g_iv4
      mux4_32 u_m4 (.in0(MD5_IV[i]), .in1(SHA_IV[i]), .in2(RMD_IV[i]), .in3(upd[i]),
                    .sel(sel4), .out(nxt[i]));
    end else begin : g_iv_e
      mux4_32 u_m4 (.in0(32'd0), .in1(SHA_IV[4]), .in2(RMD_IV[4]), .in3(upd[4]),
                    .sel(sel4), .out(nxt[4]));
    end
  end

  for (genvar i = 5; i < 8; i++) begin : g_fgh
    logic [31:0] ff;
    adder2_32 u_ff (.a(cvq[i]), .b(top[i]), .sum(ff));
    mux2_32   u_m2 (.in0(ff), .in1(SHA_IV[i]), .sel(cv_init), .out(nxt[i]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) cvq[i] <= '0;
    end else if (cv_init || cv_write) begin
      cvq <= nxt;
    end
  end
endmodule
