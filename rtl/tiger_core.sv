// tiger_core: Tiger compression of one 512-bit block, built from the Tiger
// register file, two pass/round select blocks (one per 32-bit half), the
// Tiger processing block, the key schedule block and two 64-bit
// adder/subtractors for the feedforward.
// A `start` pulse loads x0..x7 from `block` (x_i = block[64*i +: 64], the
// message bytes in little-endian order), loads a, b, c from the Tiger IV when
// `first` is set (otherwise it keeps the previous result as chaining value)
// and saves them as aa, bb, cc. Then it runs one round per cycle:
// pass 0 (mul 5), key schedule, pass 1 (mul 7), key schedule, pass 2 (mul 9),
// each pass eight rounds, and a two-cycle feedforward a ^= aa, b -= bb,
// c += cc on the low then the high 32-bit halves. `done` pulses when `hash`
// ({c, b, a} = bits 191:128, 127:64, 63:0) holds the new chaining value.
// Latency: 1 (load) + 24 (rounds) + 2 (key schedules) + 2 (feedforward) = 29 cycles.
// S-box lookups go out on sbox_addr and their values must return in the
// same cycle on sbox_val (the S-box contents are outside this block); the
// table-number bits 9:8 of each address are constant per lookup port.
// The step order and equations are Tiger's as given in the document; the
// controller and the cycle plan are this design's.
module tiger_core
  import hash_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         first,
  input  logic [511:0] block,
  output logic [9:0]   sbox_addr [8],
  input  logic [63:0]  sbox_val  [8],
  output logic [191:0] hash,
  output logic         done
);
  typedef enum logic [2:0] {T_IDLE, T_ROUND, T_KS, T_FF_LO, T_FF_HI} tstate_e;
  tstate_e    state;
  logic [1:0] pass;
  logic [2:0] round;

  logic        wr_en   [28];
  logic [31:0] wr_data [28];
  logic [31:0] rd      [28];

  tiger_reg_file u_rf (.clk, .rst, .wr_en, .wr_data, .rd_data(rd));

  // current words
  logic [63:0] xw [8], abc [3], saved [3];
  always_comb begin
    for (int i = 0; i < 8; i++) xw[i] = {rd[2*i+1], rd[2*i]};
    for (int i = 0; i < 3; i++) begin
      abc[i]   = {rd[17 + 2*i], rd[16 + 2*i]};
      saved[i] = {rd[23 + 2*i], rd[22 + 2*i]};
    end
  end
  assign hash = {abc[2], abc[1], abc[0]};

  // role ordering for this pass and round
  logic [31:0] rx_lo, ry_lo, rz_lo, rx_hi, ry_hi, rz_hi;
  pass_round_select u_prs_lo (.a(abc[0][31:0]), .b(abc[1][31:0]), .c(abc[2][31:0]),
                              .pass, .round, .x(rx_lo), .y(ry_lo), .z(rz_lo));
  pass_round_select u_prs_hi (.a(abc[0][63:32]), .b(abc[1][63:32]), .c(abc[2][63:32]),
                              .pass, .round, .x(rx_hi), .y(ry_hi), .z(rz_hi));

  logic [63:0] ra, rb, rc;
  tiger_proc_block u_proc (
    .a({rx_hi, rx_lo}), .b({ry_hi, ry_lo}), .c({rz_hi, rz_lo}), .x(xw[round]), .mul_sel(pass),
    .sbox_addr, .sbox_val, .a_out(ra), .b_out(rb), .c_out(rc));

  // physical register (0 = a, 1 = b, 2 = c) playing role j this round
  function automatic int phys(input logic [1:0] p, input logic [2:0] r, input int j);
    int start_idx;
    start_idx = (p == 2'd1) ? 2 : (p == 2'd2) ? 1 : 0;
    return (start_idx + int'(r) % 3 + j) % 3;
  endfunction

  logic [63:0] ks_out [8];
  key_schedule u_ks (.x_in(xw), .x_out(ks_out));

  // feedforward: b -= bb, c += cc over two cycles
  logic        ff_hi, ff_en;
  logic [31:0] b_ff, c_ff;
  assign ff_hi = (state == T_FF_HI);
  assign ff_en = (state == T_FF_LO) || (state == T_FF_HI);
  addsub64 u_ffb (.clk, .rst, .enable(ff_en), .sub(1'b1), .upper(ff_hi),
                  .data_in1(ff_hi ? abc[1][63:32] : abc[1][31:0]),
                  .data_in2(ff_hi ? saved[1][63:32] : saved[1][31:0]), .data_out(b_ff));
  addsub64 u_ffc (.clk, .rst, .enable(ff_en), .sub(1'b0), .upper(ff_hi),
                  .data_in1(ff_hi ? abc[2][63:32] : abc[2][31:0]),
                  .data_in2(ff_hi ? saved[2][63:32] : saved[2][31:0]), .data_out(c_ff));

  // register file writes
  always_comb begin
    logic [63:0] nabc [3];
    for (int i = 0; i < 28; i++) begin
      wr_en[i]   = 1'b0;
      wr_data[i] = rd[i];
    end
    nabc = abc;
    unique case (state)
      T_IDLE: if (start) begin
        for (int i = 0; i < 8; i++) begin
          wr_en[2*i] = 1'b1;   wr_data[2*i]   = block[64*i +: 32];
          wr_en[2*i+1] = 1'b1; wr_data[2*i+1] = block[64*i+32 +: 32];
        end
        for (int i = 0; i < 3; i++) begin
          nabc[i] = first ? TIGER_IV[i] : abc[i];
          wr_en[16+2*i] = 1'b1; wr_data[16+2*i] = nabc[i][31:0];
          wr_en[17+2*i] = 1'b1; wr_data[17+2*i] = nabc[i][63:32];
          wr_en[22+2*i] = 1'b1; wr_data[22+2*i] = nabc[i][31:0];
          wr_en[23+2*i] = 1'b1; wr_data[23+2*i] = nabc[i][63:32];
        end
      end
      T_ROUND: begin
        nabc[phys(pass, round, 0)] = ra;
        nabc[phys(pass, round, 1)] = rb;
        nabc[phys(pass, round, 2)] = rc;
        for (int i = 0; i < 3; i++) begin
          wr_en[16+2*i] = 1'b1; wr_data[16+2*i] = nabc[i][31:0];
          wr_en[17+2*i] = 1'b1; wr_data[17+2*i] = nabc[i][63:32];
        end
      end
      T_KS: begin
        for (int i = 0; i < 8; i++) begin
          wr_en[2*i] = 1'b1;   wr_data[2*i]   = ks_out[i][31:0];
          wr_en[2*i+1] = 1'b1; wr_data[2*i+1] = ks_out[i][63:32];
        end
      end
      T_FF_LO, T_FF_HI: begin
        for (int h = 0; h < 2; h++) begin
          if (int'(ff_hi) == h) begin
            wr_en[16+h] = 1'b1; wr_data[16+h] = rd[16+h] ^ rd[22+h];
            wr_en[18+h] = 1'b1; wr_data[18+h] = b_ff;
            wr_en[20+h] = 1'b1; wr_data[20+h] = c_ff;
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= T_IDLE;
      pass  <= '0;
      round <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          pass  <= '0;
          round <= '0;
          state <= T_ROUND;
        end
        T_ROUND: begin
          round <= round + 3'd1;
          if (round == 3'd7) state <= (pass == 2'd2) ? T_FF_LO : T_KS;
        end
        T_KS: begin
          pass  <= pass + 2'd1;
          state <= T_ROUND;
        end
        T_FF_LO: state <= T_FF_HI;
        T_FF_HI: begin
          done  <= 1'b1;
          state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
