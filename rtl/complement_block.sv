// complement_block: 32 two-input XOR gates used as programmable NOT gates.
// data_out = data_in when control is 0, ~data_in when control is 1.
// Combinational; as described in the document.
module complement_block (
  input  logic [31:0] data_in,
  input  logic        control,
  output logic [31:0] data_out
);
  always_comb data_out = data_in ^ {32{control}};
endmodule
