// main_compressor: top datapath of the unified hash engine. Holds the eight
// working variables A..H (Att..Htt) and, when `step` is set, performs one
// compression step of the selected algorithm in one clock cycle:
//   MD5        A,B,C,D <- D, B + ((A + f(B,C,D) + X + T) <<< s), B, C
//   RIPEMD-160 left line: A,B,C,D,E <- E, ((A + f(B,C,D) + X + K) <<< s) + E,
//              B, C <<< 10, D
//   SHA-256    T1 = H + S1(E) + Ch(E,F,G) + K + W, T2 = S0(A) + Maj(A,B,C),
//              A..H <- T1+T2, A, B, C, D+T1, E, F, G
// MD5 and RIPEMD-160 share one path built from the primitive function block,
// a three-input adder, a two-input adder for the constant, the circular left
// shifter and a final two-input adder whose second operand is B (MD5) or
// E (RIPEMD-160). SHA-256 uses Ch on E,F,G through the same primitive function
// block, plus its own Maj, Sigma and adders. `init_work` loads the working
// variables from the chaining variables at the start of a block.
// The step equations are those of the algorithms; the sharing of the adders
// and the one-step-per-cycle timing are this design's reading of the
// document's datapath.
module main_compressor
  import hash_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  algo_e       algo,
  input  logic        init_work,
  input  logic        step,
  input  logic [31:0] cv [8],
  input  logic [31:0] msg,
  input  logic [31:0] konst,
  input  logic [4:0]  shift,
  input  pf_sel_e     func,
  output logic [31:0] work [8]
);
  logic [31:0] a, b, c, d, e, f, g, h;
  assign {a, b, c, d, e, f, g, h} = {work[0], work[1], work[2], work[3],
                                     work[4], work[5], work[6], work[7]};

  function automatic logic [31:0] rotr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // Shared MD5 / RIPEMD-160 path (and Ch for SHA-256)
  logic [31:0] pf_x, pf_y, pf_z, pf_out, sum3, sum_k, rot, add_base, new_val;
  logic        is_sha;
  always_comb begin
    is_sha = (algo == ALG_SHA256);
    pf_x = is_sha ? e : b;
    pf_y = is_sha ? f : c;
    pf_z = is_sha ? g : d;
    add_base = (algo == ALG_MD5) ? b : e;
  end

  prim_func u_pf (.b(pf_x), .c(pf_y), .d(pf_z), .sel(func), .f(pf_out));
  adder3_32 u_add3 (.a(a), .b(pf_out), .c(msg), .sum(sum3));
  adder2_32 u_addk (.a(sum3), .b(konst), .sum(sum_k));
  cl_shifter u_rot (.data_in(sum_k), .shift_amount(shift), .data_out(rot));
  adder2_32 u_addb (.a(rot), .b(add_base), .sum(new_val));

  // SHA-256 path
  logic [31:0] maj, big_s0, big_s1, t1, t2;
  prim_func u_maj (.b(a), .c(b), .d(c), .sel(PF_MAJ), .f(maj));
  always_comb begin
    big_s0 = rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22);
    big_s1 = rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25);
    t1 = h + big_s1 + pf_out + konst + msg;
    t2 = big_s0 + maj;
  end

  logic [31:0] nxt [8];
  always_comb begin
    nxt = work;
    unique case (algo)
      ALG_MD5: begin
        nxt[0] = d; nxt[1] = new_val; nxt[2] = b; nxt[3] = c;
      end
      ALG_SHA256: begin
        nxt[0] = t1 + t2; nxt[1] = a; nxt[2] = b; nxt[3] = c;
        nxt[4] = d + t1;  nxt[5] = e; nxt[6] = f; nxt[7] = g;
      end
      ALG_RMD160: begin
        nxt[0] = e; nxt[1] = new_val; nxt[2] = b; nxt[3] = {c[21:0], c[31:22]}; nxt[4] = d;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 8; i++) work[i] <= '0;
    end else if (init_work) begin
      work <= cv;
    end else if (step) begin
      work <= nxt;
    end
  end
endmodule
