// hash_chip_tb: end-to-end test of the unified hash engine at its default
// parameters. A behavioural memory bank answers each one-cycle read request
// with the next message byte one cycle later and with 00H after the end of
// the message. Messages: the standard short test strings, whose digests are
// known, and random messages of lengths chosen to hit every padding case
// (padding fits in the last block, padding opens an extra block, the message
// fills whole blocks, multi-block messages), for MD5, SHA-256 and RIPEMD-160,
// compared with behavioural reference models. The Tiger datapath is run on
// chained blocks against its reference with a random S-box table.
// Mechanisms counted: multi-block messages, extra padding blocks, the
// invalid-algorithm error, Tiger chaining, and memory wait cycles (every other
// random message is read from a memory that answers after 1 to 4 cycles). The cycle count per message is
// checked against this design's timing: at most 2 cycles per byte read plus
// per block the transfer, rounds and update. The message sizes the original
// engine was characterised with (0, 206, 740 bytes and a 1023-byte message,
// the largest its memory bank held) are run for all three algorithms, and
// MD5 must finish within the cycle counts reported for that engine.
module hash_chip_tb;
  import hash_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [1:0]   algo;
  logic         restart, mem_rd, mem_ack, digest_valid, error, block_done;
  logic [7:0]   mem_data;
  logic [255:0] digest;
  logic [2:0]   pad_fsm_state;
  logic [6:0]   ucode_step;
  logic         tiger_start, tiger_first, tiger_done;
  logic [511:0] tiger_block;
  logic [9:0]   tiger_sbox_addr [8];
  logic [63:0]  tiger_sbox_val [8];
  logic [191:0] tiger_hash;

  hash_chip dut (.*);

  int checks = 0, failures = 0;
  int n_multiblock = 0, n_extra_pad = 0, n_error = 0, n_tiger_chain = 0, n_blocks = 0;

  // memory bank model: answers a read after 1 + (0..max_lat) cycles
  bytes_t mem;
  int     rd_ptr;
  int     max_lat = 0, wcnt = 0, n_mem_wait = 0;
  logic   pend = 1'b0;
  function automatic logic [7:0] mem_byte(input int p);
    return (p < mem.size()) ? mem[p] : 8'h00;
  endfunction
  always_ff @(posedge clk) begin
    automatic int lat = (max_lat == 0) ? 0 : int'($urandom_range(0, max_lat));
    mem_ack <= 1'b0;
    if (mem_rd && lat == 0) begin
      mem_ack  <= 1'b1;
      mem_data <= mem_byte(rd_ptr);
      rd_ptr   <= rd_ptr + 1;
    end else if (mem_rd) begin
      pend <= 1'b1;
      wcnt <= lat;
    end else if (pend) begin
      n_mem_wait <= n_mem_wait + 1;
      if (wcnt == 1) begin
        pend     <= 1'b0;
        mem_ack  <= 1'b1;
        mem_data <= mem_byte(rd_ptr);
        rd_ptr   <= rd_ptr + 1;
      end else wcnt <= wcnt - 1;
    end
  end
  always_ff @(posedge clk) if (block_done) n_blocks++;

  // Tiger S-box model: random table
  logic [63:0] sbox [1024];
  always_comb for (int i = 0; i < 8; i++) tiger_sbox_val[i] = sbox[tiger_sbox_addr[i]];

  task automatic check(input string what, input logic [255:0] got, input logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic bytes_t str2bytes(input string s);
    bytes_t r;
    for (int i = 0; i < s.len(); i++) r.push_back(s[i]);
    return r;
  endfunction

  function automatic logic [255:0] ref_hash(input int a, input bytes_t m);
    case (a)
      0: return md5(m);
      1: return sha256(m);
      default: return rmd160(m);
    endcase
  endfunction

  task automatic run_msg(input int a, input bytes_t m, output logic [255:0] d, output int cycles);
    int blocks, bound;
    mem = m;
    @(negedge clk);
    rd_ptr  = 0;
    algo    = 2'(a);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    cycles  = 1;
    while (!digest_valid && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    d = digest;
    blocks = (m.size() + 8) / 64 + 1;
    // 2 cycles per byte read (message + terminator), 1 per padding byte,
    // per block 16 transfer + 1 load + steps + 1 update, small slack
    bound = (2 + max_lat) * (m.size() + 1) + 64 + blocks * (18 + ((a == 2) ? 80 : 64)) + 8;
    checks++;
    if (cycles > bound) begin
      failures++;
      $display("FAIL cycles algo %0d len %0d: %0d > %0d", a, m.size(), cycles, bound);
    end
    if (blocks > 1) n_multiblock++;
    if (m.size() % 64 >= 56) n_extra_pad++;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] d;
    int cyc;
    bytes_t m;
    int lens [] = '{0, 1, 3, 55, 56, 60, 63, 64, 100, 119, 120, 128, 206};
    int wl_len [] = '{0, 206, 740, 1023};
    int wl_cyc [] = '{240, 1140, 3490, 0};
    logic [191:0] tref;
    algo = 0; restart = 0; tiger_start = 0; tiger_first = 0; tiger_block = '0;
    for (int i = 0; i < 1024; i++) sbox[i] = {$urandom, $urandom};
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // reference models against published digests
    check("ref md5 abc", md5(str2bytes("abc")), {128'h900150983cd24fb0d6963f7d28e17f72, 128'h0});
    check("ref sha abc", sha256(str2bytes("abc")), 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad);
    check("ref rmd abc", rmd160(str2bytes("abc")), {160'h8eb208f7e05d987a9b044a8e98c6b087f15a0bfc, 96'h0});
    check("ref md5 empty", md5(str2bytes("")), {128'hd41d8cd98f00b204e9800998ecf8427e, 128'h0});
    check("ref rmd empty", rmd160(str2bytes("")), {160'h9c1185a5c5e9fc54612808977ee8f548b2258d31, 96'h0});

    // the chip on the published vectors
    run_msg(0, str2bytes("abc"), d, cyc);
    check("md5 abc", d, {128'h900150983cd24fb0d6963f7d28e17f72, 128'h0});
    run_msg(1, str2bytes("abc"), d, cyc);
    check("sha256 abc", d, 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad);
    run_msg(2, str2bytes("abc"), d, cyc);
    check("rmd160 abc", d, {160'h8eb208f7e05d987a9b044a8e98c6b087f15a0bfc, 96'h0});
    run_msg(1, str2bytes(""), d, cyc);
    check("sha256 empty", d, 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855);
    run_msg(0, str2bytes("message digest"), d, cyc);
    check("md5 message digest", d, {128'hf96b697d7cb7938d525a2f31aaf161d0, 128'h0});

    // random messages (no zero bytes: 00H ends a message)
    for (int a = 0; a < 3; a++) begin
      foreach (lens[li]) begin
        m = {};
        for (int i = 0; i < lens[li]; i++) m.push_back(8'($urandom_range(1, 255)));
        max_lat = (li % 2 == 1) ? 3 : 0;   // every other message sees a slow memory
        run_msg(a, m, d, cyc);
        max_lat = 0;
        check($sformatf("algo %0d len %0d", a, lens[li]), d, ref_hash(a, m));
        if (a == 0 && lens[li] == 206) $display("MD5 of 206 bytes took %0d cycles", cyc);
      end
    end

    // message sizes used to characterise the original engine: the empty
    // message, 206 and 740 bytes (MD5 there took about 240, 1140 and 3490
    // cycles), and the largest message its memory bank held (1023 bytes).
    // This engine must hash each correctly and, for MD5, in no more cycles.
    for (int a = 0; a < 3; a++) begin
      foreach (wl_len[wi]) begin
        m = {};
        for (int i = 0; i < wl_len[wi]; i++) m.push_back(8'($urandom_range(1, 255)));
        run_msg(a, m, d, cyc);
        check($sformatf("workload algo %0d len %0d", a, wl_len[wi]), d, ref_hash(a, m));
        $display("workload algo %0d: %0d bytes in %0d cycles", a, wl_len[wi], cyc);
        if (a == 0 && wl_cyc[wi] > 0) begin
          checks++;
          if (cyc > wl_cyc[wi]) begin
            failures++;
            $display("FAIL MD5 %0d bytes took %0d cycles, more than %0d", wl_len[wi], cyc, wl_cyc[wi]);
          end
        end
      end
    end

    // invalid algorithm on the 32-bit engine
    @(negedge clk);
    algo = 2'd3; restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    @(negedge clk);
    checks++;
    if (error) n_error++; else begin failures++; $display("FAIL no error for algo 3"); end

    // Tiger datapath: three chained blocks
    tref = {TIGER_IV_C, TIGER_IV_B, TIGER_IV_A};
    for (int blk = 0; blk < 3; blk++) begin
      logic [511:0] bl;
      int tc;
      for (int i = 0; i < 16; i++) bl[32*i +: 32] = $urandom;
      @(negedge clk);
      tiger_block = bl; tiger_first = (blk == 0); tiger_start = 1'b1;
      @(negedge clk);
      tiger_start = 1'b0;
      tc = 1;
      while (!tiger_done && tc < 1000) begin @(negedge clk); tc++; end
      tref = tiger_compress(tref, bl, sbox);
      check($sformatf("tiger block %0d", blk), {64'h0, tiger_hash}, {64'h0, tref});
      checks++;
      if (tc != 29) begin failures++; $display("FAIL tiger latency %0d", tc); end
      if (blk > 0) n_tiger_chain++;
    end

    // every mechanism must have happened
    checks++; if (n_multiblock == 0) begin failures++; $display("FAIL no multi-block message"); end
    checks++; if (n_extra_pad == 0) begin failures++; $display("FAIL no extra padding block"); end
    checks++; if (n_error == 0) begin failures++; $display("FAIL no error case"); end
    checks++; if (n_mem_wait == 0) begin failures++; $display("FAIL memory never stalled"); end
    checks++; if (n_tiger_chain == 0) begin failures++; $display("FAIL no tiger chaining"); end
    $display("mechanisms: multiblock=%0d extra_pad=%0d error=%0d tiger_chain=%0d mem_wait=%0d blocks=%0d",
             n_multiblock, n_extra_pad, n_error, n_tiger_chain, n_mem_wait, n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [63:0] TIGER_IV_A = 64'h0123456789ABCDEF;
  localparam logic [63:0] TIGER_IV_B = 64'hFEDCBA9876543210;
  localparam logic [63:0] TIGER_IV_C = 64'hF096A5B4C3B2E187;
endmodule
