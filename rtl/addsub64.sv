// addsub64: 64-bit adder/subtractor that works on 32-bit halves over two
// clock cycles. In the first cycle (upper = 0) it adds the low halves,
// data_in1 + data_in2 (or data_in1 + ~data_in2 + 1 when sub = 1, the
// complement coming from a complementing block), and stores the carry out in
// a flip-flop; in the second cycle (upper = 1) it adds the high halves plus
// the stored carry. data_out is the 32-bit half result of the current cycle
// (combinational); the carry flip-flop updates on the clock edge when
// `enable` is set. Reset clears the carry.
// Two-cycle operation on 32-bit halves, the carry flip-flop and the
// carry-in of 1 for subtraction follow the document; the single 33-bit add in
// place of its two- and three-input adder pair is this design's simplification.
module addsub64 (
  input  logic        clk,
  input  logic        rst,
  input  logic        enable,
  input  logic        sub,
  input  logic        upper,
  input  logic [31:0] data_in1,
  input  logic [31:0] data_in2,
  output logic [31:0] data_out
);
  logic        carry_q, cin;
  logic [31:0] b_eff;
  logic [32:0] full;

  complement_block u_cmp (.data_in(data_in2), .control(sub), .data_out(b_eff));

  always_comb begin
    cin      = upper ? carry_q : sub;
    full     = {1'b0, data_in1} + {1'b0, b_eff} + 33'(cin);
    data_out = full[31:0];
  end

  always_ff @(posedge clk) begin
    if (rst) carry_q <= 1'b0;
    else if (enable) carry_q <= full[32];
  end
endmodule
