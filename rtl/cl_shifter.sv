// cl_shifter: 32-bit circular left shifter (barrel shifter).
// DataOut is DataIn rotated left by ShiftAmount (0..31). Purely combinational.
// Follows the document's circular left shift block; the 5-bit amount width is
// this design's choice (the shift amounts of the algorithms are below 32).
module cl_shifter (
  input  logic [31:0] data_in,
  input  logic [4:0]  shift_amount,
  output logic [31:0] data_out
);
  always_comb begin
    data_out = (data_in << shift_amount) | (data_in >> (6'd32 - 6'(shift_amount)));
  end
endmodule
