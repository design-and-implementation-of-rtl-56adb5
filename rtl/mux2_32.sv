// mux2_32: 32-bit 2:1 multiplexer (Two_Input_Mux_32). out = sel ? in1 : in0.
// Combinational; port names follow the printed block symbol.
module mux2_32 (
  input  logic [31:0] in0,
  input  logic [31:0] in1,
  input  logic        sel,
  output logic [31:0] out
);
  always_comb out = sel ? in1 : in0;
endmodule
