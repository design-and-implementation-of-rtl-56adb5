// rom_table: dual-port constant ROM. Each port returns the 32-bit constant at
// its address in the same cycle (asynchronous read), so the top and the bottom
// datapath each get their constant for the current step.
// Contents: MD5 T[i] = floor(2^32 * |sin(i)|) for i = 1..64 at 0..63,
// SHA-256 K[t] (first 32 bits of the fractional parts of the cube roots of the
// first 64 primes) at 64..127, RIPEMD-160 left constants floor(2^30 * sqrt(p))
// for p = 0,2,3,5,7 at 128..132 and right constants floor(2^30 * cbrt(p)) for
// p = 2,3,5,7 then 0 at 133..137.
// The document keeps all constants in one two-port ROM with 7-bit addresses;
// 64 + 64 + 10 constants need 8 address bits, which this design uses.
module rom_table
  import hash_pkg::*;
#(
  parameter int ADDR_W = 8
) (
  input  logic [ADDR_W-1:0] address_1,
  input  logic [ADDR_W-1:0] address_2,
  output logic [31:0]       data_out_1,
  output logic [31:0]       data_out_2
);
  localparam logic [31:0] ROM [ROM_DEPTH] = '{
    // MD5 T[1..64]
    32'hd76aa478, 32'he8c7b756, 32'h242070db, 32'hc1bdceee, 32'hf57c0faf, 32'h4787c62a, 32'ha8304613, 32'hfd469501,
    32'h698098d8, 32'h8b44f7af, 32'hffff5bb1, 32'h895cd7be, 32'h6b901122, 32'hfd987193, 32'ha679438e, 32'h49b40821,
    32'hf61e2562, 32'hc040b340, 32'h265e5a51, 32'he9b6c7aa, 32'hd62f105d, 32'h02441453, 32'hd8a1e681, 32'he7d3fbc8,
    32'h21e1cde6, 32'hc33707d6, 32'hf4d50d87, 32'h455a14ed, 32'ha9e3e905, 32'hfcefa3f8, 32'h676f02d9, 32'h8d2a4c8a,
    32'hfffa3942, 32'h8771f681, 32'h6d9d6122, 32'hfde5380c, 32'ha4beea44, 32'h4bdecfa9, 32'hf6bb4b60, 32'hbebfbc70,
    32'h289b7ec6, 32'heaa127fa, 32'hd4ef3085, 32'h04881d05, 32'hd9d4d039, 32'he6db99e5, 32'h1fa27cf8, 32'hc4ac5665,
    32'hf4292244, 32'h432aff97, 32'hab9423a7, 32'hfc93a039, 32'h655b59c3, 32'h8f0ccc92, 32'hffeff47d, 32'h85845dd1,
    32'h6fa87e4f, 32'hfe2ce6e0, 32'ha3014314, 32'h4e0811a1, 32'hf7537e82, 32'hbd3af235, 32'h2ad7d2bb, 32'heb86d391,
    // SHA-256 K[0..63]
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2,
    // RIPEMD-160 left line K[0..4]
    32'h00000000, 32'h5a827999, 32'h6ed9eba1, 32'h8f1bbcdc, 32'ha953fd4e,
    // RIPEMD-160 right line K'[0..4]
    32'h50a28be6, 32'h5c4dd124, 32'h6d703ef3, 32'h7a6d76e9, 32'h00000000
  };

  function automatic logic [31:0] lookup(input logic [ADDR_W-1:0] a);
    return (int'(a) < ROM_DEPTH) ? ROM[int'(a)] : 32'h0;
  endfunction

  always_comb begin
    data_out_1 = lookup(address_1);
    data_out_2 = lookup(address_2);
  end
endmodule
