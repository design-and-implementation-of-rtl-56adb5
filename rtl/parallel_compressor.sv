// parallel_compressor: bottom datapath of the unified hash engine, the
// duplicated resources that let the two RIPEMD-160 lines run side by side.
// Holds working variables Atb..Etb; `init_work` loads them from the chaining
// variables, and each cycle with `step` set performs one right-line step
//   A,B,C,D,E <- E, ((A + f(B,C,D) + X + K') <<< s) + E, B, C <<< 10, D
// built from the primitive function block, a three-input adder, a two-input
// adder for the constant, the circular left shifter and a two-input adder.
// The step equation is RIPEMD-160's; the one-step-per-cycle timing is this
// design's. MD5 and SHA-256 leave this block idle.
module parallel_compressor
  import hash_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        init_work,
  input  logic        step,
  input  logic [31:0] cv [5],
  input  logic [31:0] msg,
  input  logic [31:0] konst,
  input  logic [4:0]  shift,
  input  pf_sel_e     func,
  output logic [31:0] work [5]
);
  logic [31:0] pf_out, sum3, sum_k, rot, new_val;

  prim_func  u_pf   (.b(work[1]), .c(work[2]), .d(work[3]), .sel(func), .f(pf_out));
  adder3_32  u_add3 (.a(work[0]), .b(pf_out), .c(msg), .sum(sum3));
  adder2_32  u_addk (.a(sum3), .b(konst), .sum(sum_k));
  cl_shifter u_rot  (.data_in(sum_k), .shift_amount(shift), .data_out(rot));
  adder2_32  u_adde (.a(rot), .b(work[4]), .sum(new_val));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 5; i++) work[i] <= '0;
    end else if (init_work) begin
      work <= cv;
    end else if (step) begin
      work[0] <= work[4];
      work[1] <= new_val;
      work[2] <= work[1];
      work[3] <= {work[2][21:0], work[2][31:22]};
      work[4] <= work[3];
    end
  end
endmodule
