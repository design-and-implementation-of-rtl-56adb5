// sha_proc_block: SHA processing block. Computes the next SHA-256 schedule
// word W = s1(W[t-2]) + W[t-7] + s0(W[t-15]) + W[t-16] (mod 2^32) with
// s0(x) = ROTR7 ^ ROTR18 ^ SHR3 and s1(x) = ROTR17 ^ ROTR19 ^ SHR10, the
// SHA-256 definitions. The two logical right shifts use the 64-bit shifter
// block with only its lower 32 bits in use, as the document intends for the
// 32-bit algorithms; the rotations are fixed wiring. Combinational.
module sha_proc_block (
  input  logic [31:0] wt_16,
  input  logic [31:0] wt_15,
  input  logic [31:0] wt_7,
  input  logic [31:0] wt_2,
  output logic [31:0] w
);
  function automatic logic [31:0] rotr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  logic [31:0] shr3, shr10, hi3_unused, hi10_unused;

  shifter64 u_shr3 (
    .data_in_lo(wt_15), .data_in_hi(32'h0), .shift_amt(6'd3), .control(1'b1),
    .data_out_lo(shr3), .data_out_hi(hi3_unused));
  shifter64 u_shr10 (
    .data_in_lo(wt_2), .data_in_hi(32'h0), .shift_amt(6'd10), .control(1'b1),
    .data_out_lo(shr10), .data_out_hi(hi10_unused));

  logic [31:0] s0, s1;
  always_comb begin
    s0 = rotr(wt_15, 7) ^ rotr(wt_15, 18) ^ shr3;
    s1 = rotr(wt_2, 17) ^ rotr(wt_2, 19) ^ shr10;
    w  = s1 + wt_7 + s0 + wt_16;
  end
endmodule
