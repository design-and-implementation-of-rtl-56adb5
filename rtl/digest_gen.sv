// digest_gen: digest generation block. Turns the chaining variables into the
// message digest, a 256-bit word whose bits 255:248 are the first digest
// byte. MD5 and RIPEMD-160 store their words little endian, so each word is
// byte-reversed ([7:0][15:8][23:16][31:24]); SHA-256 words are output as they
// are ([31:24]..[7:0]). MD5 fills the top 128 bits and RIPEMD-160 the top 160,
// the rest reads as zero. The per-word byte multiplexers follow the document's
// digest generation figure; the output packing is this design's. Combinational.
module digest_gen
  import hash_pkg::*;
(
  input  algo_e        algo,
  input  logic [31:0]  cvq [8],
  output logic [255:0] digest
);
  function automatic logic [31:0] bswap(input logic [31:0] x);
    return {x[7:0], x[15:8], x[23:16], x[31:24]};
  endfunction

  always_comb begin
    digest = '0;
    unique case (algo)
      ALG_MD5:    for (int i = 0; i < 4; i++) digest[255 - 32*i -: 32] = bswap(cvq[i]);
      ALG_RMD160: for (int i = 0; i < 5; i++) digest[255 - 32*i -: 32] = bswap(cvq[i]);
      ALG_SHA256: for (int i = 0; i < 8; i++) digest[255 - 32*i -: 32] = cvq[i];
      default:    digest = '0;
    endcase
  end
endmodule
