// pass_round_select: orders the Tiger registers a, b, c for the current pass
// and round. Tiger's pass(a,b,c) runs round(a,b,c), round(b,c,a),
// round(c,a,b), ... and the three passes start from (a,b,c), (c,a,b) and
// (b,c,a). A first multiplexer level picks the pass order, a second the
// rotation for round mod 3. One instance handles one 32-bit half, so two are
// used. Outputs x/y/z are the registers playing the roles of the round's
// first, second and third argument. Combinational.
module pass_round_select (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  input  logic [1:0]  pass,
  input  logic [2:0]  round,
  output logic [31:0] x,
  output logic [31:0] y,
  output logic [31:0] z
);
  logic [31:0] p0, p1, p2;
  logic [1:0]  rot;
  always_comb begin
    unique case (pass)
      2'd1:    {p0, p1, p2} = {c, a, b};
      2'd2:    {p0, p1, p2} = {b, c, a};
      default: {p0, p1, p2} = {a, b, c};
    endcase
    rot = 2'(round % 3);
    unique case (rot)
      2'd1:    {x, y, z} = {p1, p2, p0};
      2'd2:    {x, y, z} = {p2, p0, p1};
      default: {x, y, z} = {p0, p1, p2};
    endcase
  end
endmodule
