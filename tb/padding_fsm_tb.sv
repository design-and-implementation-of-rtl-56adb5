// padding_fsm_tb: a behavioural memory bank answers each read with the next
// message byte one cycle later (00H after the end). For random messages of
// every length 0..140 and each algorithm the test collects the 16 words of
// each transferred block and compares them with the padded message packed
// little endian (MD5, RIPEMD-160) or big endian (SHA-256); it also checks the
// number of blocks, last_block on the final block only, and that no byte
// past the terminator is read. The transfer request is given after a random
// delay, as the control unit would when busy.
module padding_fsm_tb;
  import hash_pkg::*;
  import hash_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  algo_e algo;
  logic start, mem_rd, mem_ack, block_ready, transfer, reg_write, xfer_done, last_block;
  logic [7:0] mem_data;
  logic [3:0] word_index;
  logic [31:0] in_data;
  logic [2:0] fsm_state;
  padding_fsm dut (.*);

  bytes_t mem;
  int rd_ptr;
  always_ff @(posedge clk) begin
    mem_ack  <= mem_rd;
    mem_data <= (mem_rd && rd_ptr < mem.size()) ? mem[rd_ptr] : 8'h00;
    if (mem_rd) rd_ptr <= rd_ptr + 1;
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    start = 0; transfer = 0; algo = ALG_MD5;
    @(negedge clk); @(negedge clk); rst = 0;
    for (int a = 0; a < 3; a++) begin
      for (int len = 0; len <= 140; len++) begin
        bytes_t p;
        logic [31:0] got [16];
        int nblk, blk;
        bit be, fin;
        mem = {};
        for (int i = 0; i < len; i++) mem.push_back(8'($urandom_range(1, 255)));
        be = (a == 1);
        p = pad(mem, be);
        nblk = p.size() / 64;
        rd_ptr = 0;
        algo = algo_e'(a); start = 1;
        @(negedge clk);
        start = 0;
        fin = 0;
        for (blk = 0; !fin && blk < 10; blk++) begin
          while (!block_ready) @(negedge clk);
          repeat ($urandom_range(0, 40)) @(negedge clk);
          transfer = 1;
          for (int w = 0; w < 16; w++) begin
            @(posedge clk);
            while (!reg_write) @(posedge clk);
            got[word_index] = in_data;
            if (w == 15) begin
              fin = last_block;
              checks++;
              if (!xfer_done) begin failures++; $display("FAIL no xfer_done"); end
            end
          end
          @(negedge clk);
          transfer = 0;
          for (int w = 0; w < 16; w++) begin
            logic [31:0] ew;
            automatic int o = 64 * blk + 4 * w;
            ew = be ? {p[o], p[o+1], p[o+2], p[o+3]} : {p[o+3], p[o+2], p[o+1], p[o]};
            checks++;
            if (got[w] !== ew) begin failures++; $display("FAIL algo %0d len %0d blk %0d w %0d: %h exp %h", a, len, blk, w, got[w], ew); end
          end
        end
        checks += 2;
        if (blk != nblk) begin failures++; $display("FAIL len %0d: %0d blocks, expected %0d", len, blk, nblk); end
        if (rd_ptr != len + 1) begin failures++; $display("FAIL len %0d: read %0d bytes", len, rd_ptr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
