// cipher_pkg: types and constants shared by the Speck and Simon cores.
//
// The cores are iterative: they compute one round per clock cycle on a
// 64-bit word datapath. This package holds the parts both of them need:
//   * the key-size selector of the Speck core (2, 3 or 4 key words),
//   * the five Simon configurations the flexible Simon core supports
//     (block/key sizes 64/128, 96/144, 128/128, 128/192, 128/256),
//   * round counts and the Simon round-constant sequences z2, z3, z4,
//   * rotate helpers for a word whose active width n (32, 48 or 64) is
//     chosen at run time; bits above n are kept at zero.
// The block and key sizes come from the design description; round counts,
// rotation amounts and z sequences are the published cipher definitions.
package cipher_pkg;

  localparam int unsigned WORD_W  = 64;   // widest word, n = 64
  localparam int unsigned BLOCK_W = 128;  // widest block, 2n
  localparam int unsigned KEY_W   = 256;  // widest key, 4n
  localparam int unsigned RND_W   = 7;    // round counter, up to 72 rounds

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [RND_W-1:0]  rnd_t;

  // Speck key length in words (m).
  typedef enum logic [1:0] {
    SPECK_KEY_2W = 2'd0,
    SPECK_KEY_3W = 2'd1,
    SPECK_KEY_4W = 2'd2
  } speck_key_e;

  // Simon block/key configuration.
  typedef enum logic [2:0] {
    SIMON_64_128  = 3'd0,   // n=32, m=4, T=44, z3
    SIMON_96_144  = 3'd1,   // n=48, m=3, T=54, z3
    SIMON_128_128 = 3'd2,   // n=64, m=2, T=68, z2
    SIMON_128_192 = 3'd3,   // n=64, m=3, T=69, z3
    SIMON_128_256 = 3'd4    // n=64, m=4, T=72, z4
  } simon_mode_e;

  // Runtime word sizes of the Simon datapath.
  typedef enum logic [1:0] {
    W32 = 2'd0,
    W48 = 2'd1,
    W64 = 2'd2
  } wsize_e;

  typedef enum logic {
    ALG_SPECK = 1'b0,
    ALG_SIMON = 1'b1
  } alg_e;

  // Simon round-constant sequences, bit i is element i of the sequence.
  localparam logic [61:0] SIMON_Z2 = 62'h3369f885192c0ef5;
  localparam logic [61:0] SIMON_Z3 = 62'h3c2ce51207a635db;
  localparam logic [61:0] SIMON_Z4 = 62'h3dc94c3a046d678b;

  function automatic int unsigned speck_m(speck_key_e k);
    case (k)
      SPECK_KEY_2W: return 2;
      SPECK_KEY_3W: return 3;
      default:      return 4;
    endcase
  endfunction

  // Speck round count T for word size n and m key words.
  function automatic int unsigned speck_rounds(int unsigned n, int unsigned m);
    case (n)
      16:      return 22;
      24:      return (m == 3) ? 22 : 23;
      32:      return (m == 3) ? 26 : 27;
      48:      return (m == 2) ? 28 : 29;
      default: return 30 + m;             // n = 64: 32, 33, 34
    endcase
  endfunction

  function automatic int unsigned speck_alpha(int unsigned n);
    return (n == 16) ? 7 : 8;
  endfunction

  function automatic int unsigned speck_beta(int unsigned n);
    return (n == 16) ? 2 : 3;
  endfunction

  function automatic wsize_e simon_wsize(simon_mode_e md);
    case (md)
      SIMON_64_128: return W32;
      SIMON_96_144: return W48;
      default:      return W64;
    endcase
  endfunction

  function automatic int unsigned simon_m(simon_mode_e md);
    case (md)
      SIMON_64_128, SIMON_128_256: return 4;
      SIMON_128_128:               return 2;
      default:                     return 3;
    endcase
  endfunction

  function automatic rnd_t simon_rounds(simon_mode_e md);
    case (md)
      SIMON_64_128:  return rnd_t'(44);
      SIMON_96_144:  return rnd_t'(54);
      SIMON_128_128: return rnd_t'(68);
      SIMON_128_192: return rnd_t'(69);
      default:       return rnd_t'(72);
    endcase
  endfunction

  function automatic logic [61:0] simon_z(simon_mode_e md);
    case (md)
      SIMON_128_128: return SIMON_Z2;
      SIMON_128_256: return SIMON_Z4;
      default:       return SIMON_Z3;
    endcase
  endfunction

  function automatic word_t wmask(wsize_e w);
    case (w)
      W32:     return word_t'({32{1'b1}});
      W48:     return word_t'({48{1'b1}});
      default: return '1;
    endcase
  endfunction

  // Rotate left by a constant r inside the low n bits (n from w).
  function automatic word_t rotl_w(word_t x, int unsigned r, wsize_e w);
    logic [31:0] x32, r32;
    logic [47:0] x48, r48;
    x32 = x[31:0];
    x48 = x[47:0];
    r32 = (x32 << r) | (x32 >> (32 - r));
    r48 = (x48 << r) | (x48 >> (48 - r));
    case (w)
      W32:     return word_t'(r32);
      W48:     return word_t'(r48);
      default: return (x << r) | (x >> (64 - r));
    endcase
  endfunction

  // Rotate right by a constant r inside the low n bits (n from w).
  function automatic word_t rotr_w(word_t x, int unsigned r, wsize_e w);
    logic [31:0] x32, r32;
    logic [47:0] x48, r48;
    x32 = x[31:0];
    x48 = x[47:0];
    r32 = (x32 >> r) | (x32 << (32 - r));
    r48 = (x48 >> r) | (x48 << (48 - r));
    case (w)
      W32:     return word_t'(r32);
      W48:     return word_t'(r48);
      default: return (x >> r) | (x << (64 - r));
    endcase
  endfunction

endpackage
