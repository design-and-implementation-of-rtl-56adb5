// prim_func: primitive function block. Produces one of seven Boolean
// functions of the three 32-bit inputs B, C, D, chosen by Sel, covering the
// round functions of MD5 (F, G, H, I), SHA-256 (Ch, Maj) and RIPEMD-160
// (f1..f5); functions shared between algorithms use one encoding. The set of
// seven and the 3-bit select follow the document; the encoding (hash_pkg::pf_sel_e)
// is this design's. Combinational.
module prim_func
  import hash_pkg::*;
(
  input  logic [31:0] b,
  input  logic [31:0] c,
  input  logic [31:0] d,
  input  pf_sel_e     sel,
  output logic [31:0] f
);
  always_comb begin
    unique case (sel)
      PF_XOR3: f = b ^ c ^ d;
      PF_CH:   f = (b & c) | (~b & d);
      PF_ORNX: f = (b | ~c) ^ d;
      PF_MUXZ: f = (b & d) | (c & ~d);
      PF_XORN: f = b ^ (c | ~d);
      PF_MD5I: f = c ^ (b | ~d);
      PF_MAJ:  f = (b & c) | (b & d) | (c & d);
      default: f = '0;
    endcase
  end
endmodule
