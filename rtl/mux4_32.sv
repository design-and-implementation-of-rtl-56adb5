// mux4_32: 32-bit 4:1 multiplexer (Four_Input_Mux_32). out = in[sel].
// Combinational; port names follow the printed block symbol.
module mux4_32 (
  input  logic [31:0] in0,
  input  logic [31:0] in1,
  input  logic [31:0] in2,
  input  logic [31:0] in3,
  input  logic [1:0]  sel,
  output logic [31:0] out
);
  always_comb begin
    unique case (sel)
      2'd0: out = in0;
      2'd1: out = in1;
      2'd2: out = in2;
      default: out = in3;
    endcase
  end
endmodule
