// hash_ref_pkg: behavioural reference models of MD5, SHA-256, RIPEMD-160 and
// the Tiger compression function, written from the algorithm definitions for
// checking the RTL. MD5's T table is computed from sin(), SHA-256's K from
// the cube roots of the first 64 primes, RIPEMD-160's constants from square
// and cube roots, so none of them is copied from the RTL's constant ROM.
// Tiger's S-boxes are not part of this model: the caller passes a table.
package hash_ref_pkg;
  typedef byte unsigned bytes_t [$];

  function automatic logic [31:0] rol(input logic [31:0] x, input int n);
    return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
  endfunction
  function automatic logic [31:0] ror(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // padded message: 1 bit, zeros, 64-bit bit length (big or little endian)
  function automatic bytes_t pad(input bytes_t m, input bit be);
    bytes_t r = m;
    longint unsigned bl = 64'(m.size()) * 8;
    r.push_back(8'h80);
    while (r.size() % 64 != 56) r.push_back(8'h00);
    for (int i = 0; i < 8; i++) r.push_back(be ? bl[63 - 8*i -: 8] : bl[8*i +: 8]);
    return r;
  endfunction

  function automatic logic [31:0] md5_t(input int i);  // i = 1..64
    real v = $sin(real'(i));
    if (v < 0) v = -v;
    return 32'(longint'($floor(v * 4294967296.0)));
  endfunction

  function automatic logic [31:0] frac32(input real v);
    real f = v - $floor(v);
    return 32'(longint'($floor(f * 4294967296.0)));
  endfunction

  function automatic int nth_prime(input int n);
    int cnt = 0;
    for (int p = 2; ; p++) begin
      bit isp = 1;
      for (int d = 2; d * d <= p; d++) if (p % d == 0) isp = 0;
      if (isp) begin
        if (cnt == n) return p;
        cnt++;
      end
    end
  endfunction

  function automatic logic [255:0] md5(input bytes_t m);
    bytes_t p = pad(m, 0);
    logic [31:0] h [4] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476};
    int s [16] = '{7, 12, 17, 22, 5, 9, 14, 20, 4, 11, 16, 23, 6, 10, 15, 21};
    for (int blk = 0; blk < p.size() / 64; blk++) begin
      logic [31:0] x [16], a, b, c, d, f, tmp;
      int g;
      for (int i = 0; i < 16; i++)
        x[i] = {p[64*blk+4*i+3], p[64*blk+4*i+2], p[64*blk+4*i+1], p[64*blk+4*i]};
      a = h[0]; b = h[1]; c = h[2]; d = h[3];
      for (int t = 0; t < 64; t++) begin
        case (t / 16)
          0: begin f = (b & c) | (~b & d); g = t; end
          1: begin f = (d & b) | (~d & c); g = (5 * t + 1) % 16; end
          2: begin f = b ^ c ^ d;          g = (3 * t + 5) % 16; end
          default: begin f = c ^ (b | ~d); g = (7 * t) % 16; end
        endcase
        tmp = d; d = c; c = b;
        b = b + rol(a + f + md5_t(t + 1) + x[g], s[(t / 16) * 4 + t % 4]);
        a = tmp;
      end
      h[0] += a; h[1] += b; h[2] += c; h[3] += d;
    end
    md5 = '0;
    for (int i = 0; i < 4; i++) md5[255 - 32*i -: 32] = {h[i][7:0], h[i][15:8], h[i][23:16], h[i][31:24]};
  endfunction

  function automatic logic [255:0] sha256(input bytes_t m);
    bytes_t p = pad(m, 1);
    logic [31:0] h [8], k [64];
    for (int i = 0; i < 8; i++) h[i] = frac32($sqrt(real'(nth_prime(i))));
    for (int i = 0; i < 64; i++) k[i] = frac32($pow(real'(nth_prime(i)), 1.0 / 3.0));
    for (int blk = 0; blk < p.size() / 64; blk++) begin
      logic [31:0] w [64], a, b, c, d, e, f, g, hh, t1, t2;
      for (int i = 0; i < 16; i++)
        w[i] = {p[64*blk+4*i], p[64*blk+4*i+1], p[64*blk+4*i+2], p[64*blk+4*i+3]};
      for (int i = 16; i < 64; i++)
        w[i] = (ror(w[i-2], 17) ^ ror(w[i-2], 19) ^ (w[i-2] >> 10)) + w[i-7] +
               (ror(w[i-15], 7) ^ ror(w[i-15], 18) ^ (w[i-15] >> 3)) + w[i-16];
      a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4]; f = h[5]; g = h[6]; hh = h[7];
      for (int t = 0; t < 64; t++) begin
        t1 = hh + (ror(e, 6) ^ ror(e, 11) ^ ror(e, 25)) + ((e & f) ^ (~e & g)) + k[t] + w[t];
        t2 = (ror(a, 2) ^ ror(a, 13) ^ ror(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
        hh = g; g = f; f = e; e = d + t1; d = c; c = b; b = a; a = t1 + t2;
      end
      h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e; h[5] += f; h[6] += g; h[7] += hh;
    end
    for (int i = 0; i < 8; i++) sha256[255 - 32*i -: 32] = h[i];
  endfunction

  function automatic logic [31:0] rmd_f(input int j, input logic [31:0] x, y, z);
    case (j / 16)
      0: return x ^ y ^ z;
      1: return (x & y) | (~x & z);
      2: return (x | ~y) ^ z;
      3: return (x & z) | (y & ~z);
      default: return x ^ (y | ~z);
    endcase
  endfunction

  function automatic logic [255:0] rmd160(input bytes_t m);
    bytes_t p = pad(m, 0);
    int r  [80] = '{0,1,2,3,4,5,6,7,8,9,10,11,12,13,14,15, 7,4,13,1,10,6,15,3,12,0,9,5,2,14,11,8,
                    3,10,14,4,9,15,8,1,2,7,0,6,13,11,5,12, 1,9,11,10,0,8,12,4,13,3,7,15,14,5,6,2,
                    4,0,5,9,7,12,2,10,14,1,3,8,11,6,15,13};
    int rp [80] = '{5,14,7,0,9,2,11,4,13,6,15,8,1,10,3,12, 6,11,3,7,0,13,5,10,14,15,8,12,4,9,1,2,
                    15,5,1,3,7,14,6,9,11,8,12,2,10,0,4,13, 8,6,4,1,3,11,15,0,5,12,2,13,9,7,10,14,
                    12,15,10,4,1,5,8,7,6,2,13,14,0,3,9,11};
    int s  [80] = '{11,14,15,12,5,8,7,9,11,13,14,15,6,7,9,8, 7,6,8,13,11,9,7,15,7,12,15,9,11,7,13,12,
                    11,13,6,7,14,9,13,15,14,8,13,6,5,12,7,5, 11,12,14,15,14,15,9,8,9,14,5,6,8,6,5,12,
                    9,15,5,11,6,8,13,12,5,12,13,14,11,8,5,6};
    int sp [80] = '{8,9,9,11,13,15,15,5,7,7,8,11,14,14,12,6, 9,13,15,7,12,8,9,11,7,7,12,7,6,15,13,11,
                    9,7,15,11,8,6,6,14,12,13,5,14,13,13,7,5, 15,5,8,11,14,14,6,14,6,9,12,9,12,5,15,8,
                    8,5,12,9,12,5,14,6,8,13,6,5,15,13,11,11};
    int pr [5] = '{0, 2, 3, 5, 7};
    logic [31:0] kl [5], kr [5];
    logic [31:0] h [5] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476, 32'hc3d2e1f0};
    for (int i = 0; i < 5; i++) begin
      kl[i] = 32'(longint'($floor($sqrt(real'(pr[i])) * 1073741824.0)));
      kr[i] = (i == 4) ? 32'h0 : 32'(longint'($floor($pow(real'(pr[i+1]), 1.0/3.0) * 1073741824.0)));
    end
    for (int blk = 0; blk < p.size() / 64; blk++) begin
      logic [31:0] x [16], al, bl, cl, dl, el, ar, br, cr, dr, er, t;
      for (int i = 0; i < 16; i++)
        x[i] = {p[64*blk+4*i+3], p[64*blk+4*i+2], p[64*blk+4*i+1], p[64*blk+4*i]};
      al = h[0]; bl = h[1]; cl = h[2]; dl = h[3]; el = h[4];
      ar = h[0]; br = h[1]; cr = h[2]; dr = h[3]; er = h[4];
      for (int j = 0; j < 80; j++) begin
        t = rol(al + rmd_f(j, bl, cl, dl) + x[r[j]] + kl[j/16], s[j]) + el;
        al = el; el = dl; dl = rol(cl, 10); cl = bl; bl = t;
        t = rol(ar + rmd_f(79 - j, br, cr, dr) + x[rp[j]] + kr[j/16], sp[j]) + er;
        ar = er; er = dr; dr = rol(cr, 10); cr = br; br = t;
      end
      t = h[1] + cl + dr; h[1] = h[2] + dl + er; h[2] = h[3] + el + ar;
      h[3] = h[4] + al + br; h[4] = h[0] + bl + cr; h[0] = t;
    end
    rmd160 = '0;
    for (int i = 0; i < 5; i++) rmd160[255 - 32*i -: 32] = {h[i][7:0], h[i][15:8], h[i][23:16], h[i][31:24]};
  endfunction

  // Tiger round with a caller-supplied S-box table (sbox[256*(t-1) + v] = t_t[v])
  function automatic void tiger_round(ref logic [63:0] a, ref logic [63:0] b, ref logic [63:0] c,
                                      input logic [63:0] x, input int mul,
                                      const ref logic [63:0] sbox [1024]);
    c ^= x;
    a -= sbox[c[7:0]] ^ sbox[256 + c[23:16]] ^ sbox[512 + c[39:32]] ^ sbox[768 + c[55:48]];
    b += sbox[768 + c[15:8]] ^ sbox[512 + c[31:24]] ^ sbox[256 + c[47:40]] ^ sbox[c[63:56]];
    b *= 64'(mul);
  endfunction

  function automatic void tiger_pass(ref logic [63:0] a, ref logic [63:0] b, ref logic [63:0] c,
                                     ref logic [63:0] x [8], input int mul,
                                     const ref logic [63:0] sbox [1024]);
    tiger_round(a, b, c, x[0], mul, sbox);
    tiger_round(b, c, a, x[1], mul, sbox);
    tiger_round(c, a, b, x[2], mul, sbox);
    tiger_round(a, b, c, x[3], mul, sbox);
    tiger_round(b, c, a, x[4], mul, sbox);
    tiger_round(c, a, b, x[5], mul, sbox);
    tiger_round(a, b, c, x[6], mul, sbox);
    tiger_round(b, c, a, x[7], mul, sbox);
  endfunction

  function automatic void tiger_ks(ref logic [63:0] x [8]);
    x[0] -= x[7] ^ 64'hA5A5A5A5A5A5A5A5; x[1] ^= x[0]; x[2] += x[1];
    x[3] -= x[2] ^ ((~x[1]) << 19); x[4] ^= x[3]; x[5] += x[4];
    x[6] -= x[5] ^ ((~x[4]) >> 23); x[7] ^= x[6]; x[0] += x[7];
    x[1] -= x[0] ^ ((~x[7]) << 19); x[2] ^= x[1]; x[3] += x[2];
    x[4] -= x[3] ^ ((~x[2]) >> 23); x[5] ^= x[4]; x[6] += x[5];
    x[7] -= x[6] ^ 64'h0123456789ABCDEF;
  endfunction

  // Tiger compression of one block; abc = {c, b, a}
  function automatic logic [191:0] tiger_compress(input logic [191:0] abc, input logic [511:0] blk,
                                                  const ref logic [63:0] sbox [1024]);
    logic [63:0] a, b, c, aa, bb, cc, x [8];
    a = abc[63:0]; b = abc[127:64]; c = abc[191:128];
    for (int i = 0; i < 8; i++) x[i] = blk[64*i +: 64];
    aa = a; bb = b; cc = c;
    tiger_pass(a, b, c, x, 5, sbox);
    tiger_ks(x);
    tiger_pass(c, a, b, x, 7, sbox);
    tiger_ks(x);
    tiger_pass(b, c, a, x, 9, sbox);
    a ^= aa; b -= bb; c += cc;
    return {c, b, a};
  endfunction
endpackage
