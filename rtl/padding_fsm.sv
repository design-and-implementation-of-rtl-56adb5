// padding_fsm: padding block and FSM controller. It reads the message from
// an external memory bank one byte per read: it raises mem_rd for one cycle
// and waits for mem_ack with the byte on mem_data. A byte of 00H marks the
// end of the message (so the message holds no zero bytes, and its length is a
// whole number of bytes). Bytes are packed into a 16-word block buffer, little
// endian within a word for MD5 and RIPEMD-160 and big endian for SHA-256.
// After the last byte it appends 80H, zero bytes up to byte 56 of a block
// (opening one extra block when fewer than 8 bytes remain) and the 64-bit
// message length in bits (little endian for MD5/RIPEMD-160, big endian for
// SHA-256), one byte per cycle.
// When the buffer holds a full block, block_ready is raised; while the
// control unit answers with `transfer`, the 16 words are written into the
// message register file one per cycle (reg_write, word_index, in_data), and
// xfer_done marks the last one, with last_block set for the final block.
// Reading of the next block then continues while the datapath hashes.
// The byte interface, the 00H terminator and the endian rules follow the
// document; the buffering and the exact state sequence are this design's.
module padding_fsm
  import hash_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  algo_e       algo,
  input  logic        start,
  output logic        mem_rd,
  input  logic        mem_ack,
  input  logic [7:0]  mem_data,
  output logic        block_ready,
  input  logic        transfer,
  output logic        reg_write,
  output logic [3:0]  word_index,
  output logic [31:0] in_data,
  output logic        xfer_done,
  output logic        last_block,
  output logic [2:0]  fsm_state
);
  typedef enum logic [2:0] {P_IDLE, P_READ, P_WAIT, P_ZERO, P_LEN, P_FULL, P_XFER, P_DONE} pstate_e;
  pstate_e     state, resume;
  logic [5:0]  pos;          // byte position within the block
  logic [63:0] bit_len;      // message length in bits
  logic [31:0] buffer [16];
  logic        big_endian, final_q;
  logic [3:0]  xcnt;
  logic [2:0]  len_idx;

  assign fsm_state = 3'(state);

  // Store one byte at the current position
  function automatic logic [31:0] put_byte(input logic [31:0] w, input logic [1:0] lane,
                                           input logic be, input logic [7:0] b);
    logic [31:0] r;
    logic [4:0]  sh;
    r  = w;
    sh = be ? 5'(8 * (3 - int'(lane))) : 5'(8 * int'(lane));
    r  = (r & ~(32'hff << sh)) | (32'(b) << sh);
    return r;
  endfunction

  logic       wr_byte;
  logic [7:0] byte_val;

  always_comb begin
    wr_byte  = 1'b0;
    byte_val = 8'h00;
    unique case (state)
      P_WAIT: if (mem_ack) begin
        wr_byte  = 1'b1;
        byte_val = (mem_data == 8'h00) ? 8'h80 : mem_data;
      end
      P_ZERO: begin
        wr_byte  = 1'b1;
        byte_val = 8'h00;
      end
      P_LEN: begin
        wr_byte  = 1'b1;
        byte_val = big_endian ? bit_len[63 - 8*len_idx -: 8] : bit_len[8*len_idx +: 8];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= P_IDLE;
      resume     <= P_IDLE;
      pos        <= '0;
      bit_len    <= '0;
      big_endian <= 1'b0;
      final_q    <= 1'b0;
      xcnt       <= '0;
      len_idx    <= '0;
      for (int i = 0; i < 16; i++) buffer[i] <= '0;
    end else begin
      if (wr_byte) begin
        buffer[pos[5:2]] <= put_byte(buffer[pos[5:2]], pos[1:0], big_endian, byte_val);
        pos <= pos + 6'd1;
      end
      unique case (state)
        P_IDLE, P_DONE: if (start) begin
          big_endian <= (algo == ALG_SHA256);
          bit_len    <= '0;
          pos        <= '0;
          final_q    <= 1'b0;
          state      <= P_READ;
        end
        P_READ: state <= P_WAIT;
        P_WAIT: if (mem_ack) begin
          if (mem_data != 8'h00) begin
            bit_len <= bit_len + 64'd8;
            if (pos == 6'd63) begin
              resume <= P_READ;
              state  <= P_FULL;
            end else begin
              state <= P_READ;
            end
          end else begin
            // end of message: 80H written at pos; choose what follows
            if (pos == 6'd55) begin
              len_idx <= '0;
              state   <= P_LEN;
            end else if (pos == 6'd63) begin
              resume <= P_ZERO;
              state  <= P_FULL;
            end else begin
              state <= P_ZERO;
            end
          end
        end
        P_ZERO: begin
          if (pos == 6'd55) begin
            len_idx <= '0;
            state   <= P_LEN;
          end else if (pos == 6'd63) begin
            resume <= P_ZERO;
            state  <= P_FULL;
          end
        end
        P_LEN: begin
          len_idx <= len_idx + 3'd1;
          if (len_idx == 3'd7) begin
            final_q <= 1'b1;
            resume  <= P_DONE;
            state   <= P_FULL;
          end
        end
        P_FULL: if (transfer) begin
          xcnt  <= '0;
          state <= P_XFER;
        end
        P_XFER: begin
          xcnt <= xcnt + 4'd1;
          if (xcnt == 4'd15) state <= resume;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  always_comb begin
    mem_rd      = (state == P_READ);
    block_ready = (state == P_FULL);
    reg_write   = (state == P_XFER);
    word_index  = xcnt;
    in_data     = buffer[xcnt];
    xfer_done   = (state == P_XFER) && (xcnt == 4'd15);
    last_block  = final_q;
  end
endmodule
