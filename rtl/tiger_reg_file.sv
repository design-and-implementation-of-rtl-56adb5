// tiger_reg_file: Tiger register file of 28 x 32 bits holding x0..x7, a, b, c
// and the saved aa, bb, cc, each 64-bit word as two 32-bit halves. Every
// register has its own write enable and write data, and every register is
// readable at all times, so one round, a key schedule or a feedforward can
// update all the words it changes in a single cycle. Index map (low half at
// the even index): x_i at 2i, 2i+1; a, b, c at 16..21; aa, bb, cc at 22..27.
// Size and content follow the document; the per-register ports are this
// design's reading of "individual read and write enable signals" (reads are
// always enabled). Reset clears all registers.
module tiger_reg_file (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en   [28],
  input  logic [31:0] wr_data [28],
  output logic [31:0] rd_data [28]
);
  logic [31:0] regs [28];
  always_ff @(posedge clk) begin
    for (int i = 0; i < 28; i++) begin
      if (rst) regs[i] <= '0;
      else if (wr_en[i]) regs[i] <= wr_data[i];
    end
  end
  assign rd_data = regs;
endmodule
