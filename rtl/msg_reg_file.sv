// msg_reg_file: message register file, 16 words of 32 bits holding the
// current 512-bit block. One synchronous write port (RegWrite, WordIndex,
// InData_From_Buffer) and two asynchronous read ports, one for the top and
// one for the bottom datapath, so that both RIPEMD-160 lines read their word
// in the same cycle. Reset clears all words. Port set follows the document's
// Register_File symbol; the read/write timing is this design's.
module msg_reg_file (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] in_data,
  input  logic        reg_write,
  input  logic [3:0]  word_index,
  input  logic [3:0]  top_msg_sel,
  input  logic [3:0]  bot_msg_sel,
  output logic [31:0] top_msg,
  output logic [31:0] bot_msg
);
  logic [31:0] words [16];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) words[i] <= '0;
    end else if (reg_write) begin
      words[word_index] <= in_data;
    end
  end

  always_comb begin
    top_msg = words[top_msg_sel];
    bot_msg = words[bot_msg_sel];
  end
endmodule
