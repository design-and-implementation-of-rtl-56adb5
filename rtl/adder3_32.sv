// adder3_32: three-input adder, modulo 2^32 (carries out of bit 31 are
// dropped). Combinational.
module adder3_32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  output logic [31:0] sum
);
  always_comb sum = a + b + c;
endmodule
