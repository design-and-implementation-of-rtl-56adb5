// microcode_cu: microprogrammed control unit. It sequences one hash run and
// issues a control word (hash_pkg::ctrl_t) every cycle. The control store is
// a table with one entry per step of each algorithm (64 for MD5 and SHA-256,
// 80 for RIPEMD-160), addressed by {algorithm, step}; it is written here as a
// constant function of the step that synthesizes to that ROM. Each entry
// gives the message word of each datapath, the ROM addresses of the
// constants, the circular shift amounts, the primitive functions and the SHA
// register file write.
// Sequence: RestartAlgo latches Algo and the next cycle loads the IV
// (IDLE -> LOADIV -> WAIT_BLK); in WAIT_BLK the unit
// asks the padding block to transfer its buffered 512-bit block into the
// register file (Transfer_BufferToRegFile, 16 cycles); then one cycle loads the
// working variables, one cycle per step runs the rounds, and one cycle adds
// the result into the chaining variables (Algo_512Bit_Over). After the last
// block the digest is valid until the next restart. Algo = 3 (Tiger) is not
// run by this datapath and raises Error.
// MD5 message orders and the RIPEMD-160 line structure follow the document;
// the MD5 and RIPEMD-160 shift amounts and RIPEMD-160 word orders are those of
// the algorithm definitions. The encoding of the control word is this design's.
module microcode_cu
  import hash_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  algo_e algo,
  input  logic  restart_algo,
  input  logic  block_ready,     // padding block holds a full block
  input  logic  xfer_done,       // last word of the transfer written
  input  logic  last_block,      // the transferred block is the final one
  output logic  transfer,        // Transfer_BufferToRegFile
  output logic  algo_512bit_over,
  output logic  digest_valid,
  output logic  error,
  output ctrl_t ctrl,
  output logic [6:0] step_cnt,
  output algo_e cur_algo         // algorithm latched at RestartAlgo
);
  typedef enum logic [3:0] {S_IDLE, S_LOADIV, S_WAIT_BLK, S_XFER, S_INIT, S_ROUNDS, S_CVUPD, S_DONE, S_ERROR} state_e;
  state_e state;
  logic   last_q;
  algo_e  algo_q;

  localparam logic [4:0] MD5_S [16] = '{7, 12, 17, 22, 5, 9, 14, 20, 4, 11, 16, 23, 6, 10, 15, 21};
  localparam logic [3:0] RMD_R [80] = '{
    0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15,
    7, 4, 13, 1, 10, 6, 15, 3, 12, 0, 9, 5, 2, 14, 11, 8,
    3, 10, 14, 4, 9, 15, 8, 1, 2, 7, 0, 6, 13, 11, 5, 12,
    1, 9, 11, 10, 0, 8, 12, 4, 13, 3, 7, 15, 14, 5, 6, 2,
    4, 0, 5, 9, 7, 12, 2, 10, 14, 1, 3, 8, 11, 6, 15, 13};
  localparam logic [3:0] RMD_RP [80] = '{
    5, 14, 7, 0, 9, 2, 11, 4, 13, 6, 15, 8, 1, 10, 3, 12,
    6, 11, 3, 7, 0, 13, 5, 10, 14, 15, 8, 12, 4, 9, 1, 2,
    15, 5, 1, 3, 7, 14, 6, 9, 11, 8, 12, 2, 10, 0, 4, 13,
    8, 6, 4, 1, 3, 11, 15, 0, 5, 12, 2, 13, 9, 7, 10, 14,
    12, 15, 10, 4, 1, 5, 8, 7, 6, 2, 13, 14, 0, 3, 9, 11};
  localparam logic [4:0] RMD_S [80] = '{
    11, 14, 15, 12, 5, 8, 7, 9, 11, 13, 14, 15, 6, 7, 9, 8,
    7, 6, 8, 13, 11, 9, 7, 15, 7, 12, 15, 9, 11, 7, 13, 12,
    11, 13, 6, 7, 14, 9, 13, 15, 14, 8, 13, 6, 5, 12, 7, 5,
    11, 12, 14, 15, 14, 15, 9, 8, 9, 14, 5, 6, 8, 6, 5, 12,
    9, 15, 5, 11, 6, 8, 13, 12, 5, 12, 13, 14, 11, 8, 5, 6};
  localparam logic [4:0] RMD_SP [80] = '{
    8, 9, 9, 11, 13, 15, 15, 5, 7, 7, 8, 11, 14, 14, 12, 6,
    9, 13, 15, 7, 12, 8, 9, 11, 7, 7, 12, 7, 6, 15, 13, 11,
    9, 7, 15, 11, 8, 6, 6, 14, 12, 13, 5, 14, 13, 13, 7, 5,
    15, 5, 8, 11, 14, 14, 6, 14, 6, 9, 12, 9, 12, 5, 15, 8,
    8, 5, 12, 9, 12, 5, 14, 6, 8, 13, 6, 5, 15, 13, 11, 11};
  localparam pf_sel_e MD5_F [4] = '{PF_CH, PF_MUXZ, PF_XOR3, PF_MD5I};
  localparam pf_sel_e RMD_F [5] = '{PF_XOR3, PF_CH, PF_ORNX, PF_MUXZ, PF_XORN};

  // Control store entry for step t of algorithm a.
  function automatic ctrl_t ucode(input algo_e a, input logic [6:0] t);
    ctrl_t       c;
    logic [3:0]  i;
    logic [2:0]  rnd;
    c   = '0;
    c.top_func = PF_XOR3;
    c.bot_func = PF_XOR3;
    c.step = 1'b1;
    i   = t[3:0];
    rnd = 3'(t >> 4);
    unique case (a)
      ALG_MD5: begin
        unique case (rnd[1:0])
          2'd0: c.top_msg_sel = i;
          2'd1: c.top_msg_sel = 4'(1 + 5 * i);
          2'd2: c.top_msg_sel = 4'(5 + 3 * i);
          default: c.top_msg_sel = 4'(7 * i);
        endcase
        c.top_const = 8'(ROM_MD5_BASE + int'(t));
        c.top_shift = MD5_S[{rnd[1:0], i[1:0]}];
        c.top_func  = MD5_F[rnd[1:0]];
      end
      ALG_SHA256: begin
        c.top_msg_sel = i;
        c.top_const   = 8'(ROM_SHA_BASE + int'(t));
        c.top_func    = PF_CH;
        c.sha_expand  = (t >= 7'd16);
        c.sha_we      = 1'b1;
        c.sha_dst     = i;
      end
      ALG_RMD160: begin
        c.top_msg_sel = RMD_R[t];
        c.bot_msg_sel = RMD_RP[t];
        c.top_shift   = RMD_S[t];
        c.bot_shift   = RMD_SP[t];
        c.top_const   = 8'(ROM_RMDL_BASE + int'(rnd));
        c.bot_const   = 8'(ROM_RMDR_BASE + int'(rnd));
        c.top_func    = RMD_F[rnd];
        c.bot_func    = RMD_F[3'd4 - rnd];
      end
      default: c = '0;
    endcase
    return c;
  endfunction

  function automatic logic [6:0] last_step(input algo_e a);
    return (a == ALG_RMD160) ? 7'd79 : 7'd63;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      step_cnt <= '0;
      last_q   <= 1'b0;
      algo_q   <= ALG_MD5;
    end else begin
      unique case (state)
        S_IDLE, S_DONE, S_ERROR:
          if (restart_algo) begin
            algo_q <= algo;
            state  <= (algo == ALG_TIGER) ? S_ERROR : S_LOADIV;
          end
        S_LOADIV:   state <= S_WAIT_BLK;
        S_WAIT_BLK: if (block_ready) state <= S_XFER;
        S_XFER: if (xfer_done) begin
          last_q <= last_block;
          state  <= S_INIT;
        end
        S_INIT: begin
          step_cnt <= '0;
          state    <= S_ROUNDS;
        end
        S_ROUNDS:
          if (step_cnt == last_step(algo_q)) state <= S_CVUPD;
          else step_cnt <= step_cnt + 7'd1;
        S_CVUPD: state <= last_q ? S_DONE : S_WAIT_BLK;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign cur_algo = algo_q;

  always_comb begin
    ctrl             = '0;
    ctrl.top_func    = PF_XOR3;
    ctrl.bot_func    = PF_XOR3;
    transfer         = (state == S_WAIT_BLK) || (state == S_XFER);
    algo_512bit_over = (state == S_CVUPD);
    digest_valid     = (state == S_DONE);
    error            = (state == S_ERROR);
    unique case (state)
      S_LOADIV: ctrl.cv_init = 1'b1;
      S_INIT:   ctrl.init_work = 1'b1;
      S_ROUNDS: ctrl = ucode(algo_q, step_cnt);
      S_CVUPD:  ctrl.cv_write = 1'b1;
      default: ;
    endcase
  end
endmodule
