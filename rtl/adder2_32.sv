// adder2_32: two-input adder, modulo 2^32 (the carry out is dropped).
// Combinational.
module adder2_32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] sum
);
  always_comb sum = a + b;
endmodule
