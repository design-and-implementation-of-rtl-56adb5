// sha_reg_file: SHA register file, a 16 x 32 store of the SHA-256 message
// schedule used as a circular window: slot t mod 16 holds W[t]. One
// synchronous write port (WriteEnable, RegDst, WriteData) and four
// asynchronous read ports that return W[t-16], W[t-15], W[t-7] and W[t-2]
// for the SHA processing block. Port set follows the document's SHA_Reg_File
// symbol; the circular use of the 16 slots is this design's choice.
module sha_reg_file (
  input  logic        clk,
  input  logic        write_enable,
  input  logic [3:0]  reg_dst,
  input  logic [31:0] write_data,
  input  logic [3:0]  wt_16_sel,
  input  logic [3:0]  wt_15_sel,
  input  logic [3:0]  wt_7_sel,
  input  logic [3:0]  wt_2_sel,
  output logic [31:0] wt_16,
  output logic [31:0] wt_15,
  output logic [31:0] wt_7,
  output logic [31:0] wt_2
);
  logic [31:0] regs [16];

  always_ff @(posedge clk) begin
    if (write_enable) regs[reg_dst] <= write_data;
  end

  always_comb begin
    wt_16 = regs[wt_16_sel];
    wt_15 = regs[wt_15_sel];
    wt_7  = regs[wt_7_sel];
    wt_2  = regs[wt_2_sel];
  end
endmodule
