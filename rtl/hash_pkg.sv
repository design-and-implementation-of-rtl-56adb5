// hash_pkg: types and constants shared by the unified hash datapath.
// Holds the algorithm encoding, the selects of the primitive function block,
// the initial values of MD5, SHA-256, RIPEMD-160 and Tiger, and the control
// word that the microcode control unit drives into the datapath every cycle.
// The IVs and the Tiger multipliers are those of the algorithm definitions;
// the encodings and the control word layout are this design's own.
package hash_pkg;

  typedef enum logic [1:0] {
    ALG_MD5    = 2'd0,
    ALG_SHA256 = 2'd1,
    ALG_RMD160 = 2'd2,
    ALG_TIGER  = 2'd3
  } algo_e;

  // Boolean functions of the primitive function block (7 in use).
  typedef enum logic [2:0] {
    PF_XOR3  = 3'd0,  // x ^ y ^ z           : MD5 H, RIPEMD f1
    PF_CH    = 3'd1,  // (x & y) | (~x & z)  : MD5 F, SHA Ch, RIPEMD f2
    PF_ORNX  = 3'd2,  // (x | ~y) ^ z        : RIPEMD f3
    PF_MUXZ  = 3'd3,  // (x & z) | (y & ~z)  : MD5 G, RIPEMD f4
    PF_XORN  = 3'd4,  // x ^ (y | ~z)        : RIPEMD f5
    PF_MD5I  = 3'd5,  // y ^ (x | ~z)        : MD5 I
    PF_MAJ   = 3'd6   // majority            : SHA Maj
  } pf_sel_e;

  localparam logic [31:0] MD5_IV [4] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476};
  localparam logic [31:0] SHA_IV [8] = '{32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
                                         32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
  localparam logic [31:0] RMD_IV [5] = '{32'h67452301, 32'hefcdab89, 32'h98badcfe, 32'h10325476,
                                         32'hc3d2e1f0};
  localparam logic [63:0] TIGER_IV [3] = '{64'h0123456789ABCDEF, 64'hFEDCBA9876543210,
                                           64'hF096A5B4C3B2E187};

  // Constant ROM layout: MD5 T[1..64] at 0..63, SHA-256 K[0..63] at 64..127,
  // RIPEMD-160 left K[0..4] at 128..132 and right K'[0..4] at 133..137.
  localparam int ROM_MD5_BASE  = 0;
  localparam int ROM_SHA_BASE  = 64;
  localparam int ROM_RMDL_BASE = 128;
  localparam int ROM_RMDR_BASE = 133;
  localparam int ROM_DEPTH     = 138;

  // Control word issued by the microcode control unit for one cycle.
  typedef struct packed {
    logic        step;        // working variables take one compression step
    logic        init_work;   // working variables load from the chaining variables
    logic        cv_init;     // chaining variables load the IV
    logic        cv_write;    // chaining variables add the working variables
    logic [3:0]  top_msg_sel; // message word of the top datapath
    logic [3:0]  bot_msg_sel; // message word of the bottom datapath
    logic [7:0]  top_const;   // ROM address, top datapath
    logic [7:0]  bot_const;   // ROM address, bottom datapath
    logic [4:0]  top_shift;   // circular left shift, top datapath
    logic [4:0]  bot_shift;   // circular left shift, bottom datapath
    pf_sel_e     top_func;    // primitive function, top datapath
    pf_sel_e     bot_func;    // primitive function, bottom datapath
    logic        sha_expand;  // SHA-256 uses the expanded word (t >= 16)
    logic        sha_we;      // SHA register file write
    logic [3:0]  sha_dst;     // SHA register file slot (t mod 16)
  } ctrl_t;

endpackage
