// key_schedule: Tiger key schedule, the invertible mixing of the eight 64-bit
// message words between passes:
//   x0 -= x7 ^ A5A5..A5; x1 ^= x0; x2 += x1; x3 -= x2 ^ (~x1 << 19);
//   x4 ^= x3; x5 += x4; x6 -= x5 ^ (~x4 >> 23); x7 ^= x6; x0 += x7;
//   x1 -= x0 ^ (~x7 << 19); x2 ^= x1; x3 += x2; x4 -= x3 ^ (~x2 >> 23);
//   x5 ^= x4; x6 += x5; x7 -= x6 ^ 0123456789ABCDEF
// The four shifted complements use complementing blocks and 64-bit shifter
// blocks; shifts are logical. The operations follow the document's key
// schedule; computing all sixteen in one combinational cycle is this design's
// choice. Words are little-endian 64-bit values, x[0] = x0.
module key_schedule (
  input  logic [63:0] x_in  [8],
  output logic [63:0] x_out [8]
);
  // stage values needed by the shifters
  logic [63:0] s1, s2, s3, s4;          // shifted complements
  logic [63:0] v0, v1, v2, v3, v4, v5, v6, v7, w0, w1, w2, w3, w4;
  logic [63:0] n1, n4, n7, n2;          // complemented words
  logic [31:0] n_lo [4], n_hi [4];

  // first half of the schedule
  always_comb begin
    v0 = x_in[0] - (x_in[7] ^ 64'hA5A5A5A5A5A5A5A5);
    v1 = x_in[1] ^ v0;
    v2 = x_in[2] + v1;
  end
  complement_block u_c1l (.data_in(v1[31:0]),  .control(1'b1), .data_out(n_lo[0]));
  complement_block u_c1h (.data_in(v1[63:32]), .control(1'b1), .data_out(n_hi[0]));
  assign n1 = {n_hi[0], n_lo[0]};
  shifter64 u_sh1 (.data_in_lo(n1[31:0]), .data_in_hi(n1[63:32]), .shift_amt(6'd19), .control(1'b0),
                   .data_out_lo(s1[31:0]), .data_out_hi(s1[63:32]));
  always_comb begin
    v3 = x_in[3] - (v2 ^ s1);
    v4 = x_in[4] ^ v3;
    v5 = x_in[5] + v4;
  end
  complement_block u_c4l (.data_in(v4[31:0]),  .control(1'b1), .data_out(n_lo[1]));
  complement_block u_c4h (.data_in(v4[63:32]), .control(1'b1), .data_out(n_hi[1]));
  assign n4 = {n_hi[1], n_lo[1]};
  shifter64 u_sh2 (.data_in_lo(n4[31:0]), .data_in_hi(n4[63:32]), .shift_amt(6'd23), .control(1'b1),
                   .data_out_lo(s2[31:0]), .data_out_hi(s2[63:32]));
  always_comb begin
    v6 = x_in[6] - (v5 ^ s2);
    v7 = x_in[7] ^ v6;
    w0 = v0 + v7;
  end
  // second half
  complement_block u_c7l (.data_in(v7[31:0]),  .control(1'b1), .data_out(n_lo[2]));
  complement_block u_c7h (.data_in(v7[63:32]), .control(1'b1), .data_out(n_hi[2]));
  assign n7 = {n_hi[2], n_lo[2]};
  shifter64 u_sh3 (.data_in_lo(n7[31:0]), .data_in_hi(n7[63:32]), .shift_amt(6'd19), .control(1'b0),
                   .data_out_lo(s3[31:0]), .data_out_hi(s3[63:32]));
  always_comb begin
    w1 = v1 - (w0 ^ s3);
    w2 = v2 ^ w1;
    w3 = v3 + w2;
  end
  complement_block u_c2l (.data_in(w2[31:0]),  .control(1'b1), .data_out(n_lo[3]));
  complement_block u_c2h (.data_in(w2[63:32]), .control(1'b1), .data_out(n_hi[3]));
  assign n2 = {n_hi[3], n_lo[3]};
  shifter64 u_sh4 (.data_in_lo(n2[31:0]), .data_in_hi(n2[63:32]), .shift_amt(6'd23), .control(1'b1),
                   .data_out_lo(s4[31:0]), .data_out_hi(s4[63:32]));
  always_comb begin
    w4 = v4 - (w3 ^ s4);
    x_out[0] = w0;
    x_out[1] = w1;
    x_out[2] = w2;
    x_out[3] = w3;
    x_out[4] = w4;
    x_out[5] = v5 ^ w4;
    x_out[6] = v6 + (v5 ^ w4);
    x_out[7] = v7 - ((v6 + (v5 ^ w4)) ^ 64'h0123456789ABCDEF);
  end
endmodule
