// hash_chip: unified hash engine for MD5, SHA-256 and RIPEMD-160, with the
// Tiger datapath beside it.
// A message is read byte by byte from an external memory bank by the padding
// block, which pads it and hands complete 512-bit blocks to the message
// register file. The microcode control unit then steps the datapath once per
// clock: the top (main) compressor runs MD5, SHA-256 or the left RIPEMD-160
// line, the bottom (parallel) compressor runs the right RIPEMD-160 line in the
// same cycle. Constants come from the dual-port ROM, SHA-256 schedule words
// from the SHA processing block and SHA register file. At the end of each
// block the CV updation block adds the result into the chaining variables,
// and the digest generation block orders the bytes of the final digest.
// Interface: pulse `restart` with `algo` set; the chip reads bytes with
// mem_rd / mem_ack / mem_data until a 00H byte; `digest_valid` then holds with
// the digest (first byte in bits 255:248) until the next restart. With
// algo = 3 the 32-bit engine raises `error`.
// Tiger (64-bit) has its own datapath (tiger_core): a padded 512-bit block and
// a start pulse in, 192-bit chaining value out, S-box lookups through ports
// (bits 9:8 of each lookup address name its table and are constant per port).
// Timing: 1 cycle IV load, then per block 16 transfer cycles, 1 cycle to load
// the working variables, 64 (MD5, SHA-256) or 80 (RIPEMD-160) step cycles and
// 1 CV update cycle; reading the next block (2 cycles per byte) overlaps.
module hash_chip
  import hash_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic [1:0]   algo,
  input  logic         restart,
  output logic         mem_rd,
  input  logic         mem_ack,
  input  logic [7:0]   mem_data,
  output logic [255:0] digest,
  output logic         digest_valid,
  output logic         error,
  output logic         block_done,
  output logic [2:0]   pad_fsm_state,   // padding FSM state, for observation
  output logic [6:0]   ucode_step,      // current microcode step, for observation
  // Tiger datapath
  input  logic         tiger_start,
  input  logic         tiger_first,
  input  logic [511:0] tiger_block,
  output logic [9:0]   tiger_sbox_addr [8],
  input  logic [63:0]  tiger_sbox_val [8],
  output logic [191:0] tiger_hash,
  output logic         tiger_done
);
  ctrl_t       ctrl;
  algo_e       cur_algo;
  logic        block_ready, transfer, reg_write, xfer_done, last_block;
  logic [3:0]  word_index;
  logic [31:0] in_data, top_msg, bot_msg, top_k, bot_k, sha_w, top_w;
  logic [31:0] wt_16, wt_15, wt_7, wt_2;
  logic [31:0] work_t [8], work_b [5], cvq [8], cv5 [5];

  microcode_cu u_cu (
    .clk, .rst, .algo(algo_e'(algo)), .restart_algo(restart), .block_ready, .xfer_done,
    .last_block, .transfer, .algo_512bit_over(block_done), .digest_valid, .error,
    .ctrl, .step_cnt(ucode_step), .cur_algo);

  padding_fsm u_pad (
    .clk, .rst, .algo(algo_e'(algo)), .start(restart && algo != 2'(ALG_TIGER)),
    .mem_rd, .mem_ack, .mem_data,
    .block_ready, .transfer, .reg_write, .word_index, .in_data, .xfer_done, .last_block,
    .fsm_state(pad_fsm_state));

  msg_reg_file u_rf (
    .clk, .rst, .in_data, .reg_write, .word_index,
    .top_msg_sel(ctrl.top_msg_sel), .bot_msg_sel(ctrl.bot_msg_sel), .top_msg, .bot_msg);

  rom_table u_rom (
    .address_1(ctrl.top_const), .address_2(ctrl.bot_const), .data_out_1(top_k), .data_out_2(bot_k));

  // SHA-256 message schedule: slot t mod 16 of the SHA register file holds W[t]
  sha_reg_file u_sha_rf (
    .clk, .write_enable(ctrl.sha_we), .reg_dst(ctrl.sha_dst), .write_data(top_w),
    .wt_16_sel(ctrl.sha_dst), .wt_15_sel(ctrl.sha_dst + 4'd1),
    .wt_7_sel(ctrl.sha_dst + 4'd9), .wt_2_sel(ctrl.sha_dst + 4'd14),
    .wt_16, .wt_15, .wt_7, .wt_2);

  sha_proc_block u_sha_pb (.wt_16, .wt_15, .wt_7, .wt_2, .w(sha_w));

  mux2_32 u_wsel (.in0(top_msg), .in1(sha_w), .sel(ctrl.sha_expand), .out(top_w));

  main_compressor u_main (
    .clk, .rst, .algo(cur_algo), .init_work(ctrl.init_work), .step(ctrl.step), .cv(cvq),
    .msg(top_w), .konst(top_k), .shift(ctrl.top_shift), .func(ctrl.top_func), .work(work_t));

  assign cv5 = '{cvq[0], cvq[1], cvq[2], cvq[3], cvq[4]};

  parallel_compressor u_par (
    .clk, .rst, .init_work(ctrl.init_work), .step(ctrl.step && cur_algo == ALG_RMD160),
    .cv(cv5), .msg(bot_msg), .konst(bot_k), .shift(ctrl.bot_shift), .func(ctrl.bot_func),
    .work(work_b));

  cv_update u_cv (
    .clk, .rst, .algo(cur_algo), .cv_init(ctrl.cv_init), .cv_write(ctrl.cv_write),
    .top(work_t), .bot(work_b), .cvq);

  digest_gen u_dg (.algo(cur_algo), .cvq, .digest);

  tiger_core u_tiger (
    .clk, .rst, .start(tiger_start), .first(tiger_first), .block(tiger_block),
    .sbox_addr(tiger_sbox_addr), .sbox_val(tiger_sbox_val), .hash(tiger_hash), .done(tiger_done));
endmodule
