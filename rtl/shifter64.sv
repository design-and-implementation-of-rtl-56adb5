// shifter64: 64-bit logical shifter, left when control = 0 and right when
// control = 1, by shift_amt (0..63), zeros shifted in. The word is carried as
// two 32-bit halves, as in the document's shifter block; the 32-bit algorithms
// would use only the low halves. This design's shifter is combinational (the
// document's symbol also shows a clock) so that the Tiger key schedule
// completes in one cycle.
module shifter64 (
  input  logic [31:0] data_in_lo,
  input  logic [31:0] data_in_hi,
  input  logic [5:0]  shift_amt,
  input  logic        control,
  output logic [31:0] data_out_lo,
  output logic [31:0] data_out_hi
);
  logic [63:0] r;
  always_comb begin
    r = control ? ({data_in_hi, data_in_lo} >> shift_amt) : ({data_in_hi, data_in_lo} << shift_amt);
    {data_out_hi, data_out_lo} = r;
  end
endmodule
