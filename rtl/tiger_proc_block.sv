// tiger_proc_block: one Tiger round, round(a, b, c, x, mul):
//   c ^= x;
//   a -= t1[c_0] ^ t2[c_2] ^ t3[c_4] ^ t4[c_6];
//   b += t4[c_1] ^ t3[c_3] ^ t2[c_5] ^ t1[c_7];
//   b *= mul   (mul = 5, 7 or 9, done as (b << 2) + b, (b << 3) - b, (b << 3) + b)
// The eight S-box lookups leave through sbox_addr: lookup i reads byte c_i of
// the new c in S-box table tsel(i) = 1,4,2,3,3,2,4,1 (i = 0..7), as the
// 10-bit address {table - 1, c_i}; the 64-bit results come back on sbox_val
// in the same cycle. The round equations follow the document; the lookup port
// arrangement is this design's. Combinational. The two table-number bits of
// each address are constant (each lookup always uses the same table); they
// are kept so that one shared 1024-entry table can answer all eight ports.
module tiger_proc_block (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic [63:0] c,
  input  logic [63:0] x,
  input  logic [1:0]  mul_sel,      // 0: x5, 1: x7, 2: x9
  output logic [9:0]  sbox_addr [8],
  input  logic [63:0] sbox_val  [8],
  output logic [63:0] a_out,
  output logic [63:0] b_out,
  output logic [63:0] c_out
);
  localparam logic [1:0] TSEL [8] = '{2'd0, 2'd3, 2'd1, 2'd2, 2'd2, 2'd1, 2'd3, 2'd0};
  logic [63:0] b_add;
  always_comb begin
    c_out = c ^ x;
    for (int i = 0; i < 8; i++) sbox_addr[i] = {TSEL[i], c_out[8*i +: 8]};
    a_out = a - (sbox_val[0] ^ sbox_val[2] ^ sbox_val[4] ^ sbox_val[6]);
    b_add = b + (sbox_val[1] ^ sbox_val[3] ^ sbox_val[5] ^ sbox_val[7]);
    unique case (mul_sel)
      2'd1:    b_out = (b_add << 3) - b_add;
      2'd2:    b_out = (b_add << 3) + b_add;
      default: b_out = (b_add << 2) + b_add;
    endcase
  end
endmodule
