// sha2_pkg: types, constants and round functions shared by the SHA-2 core.
//
// The core handles the four SHA-2 variants. SHA-224/256 work on 32-bit words,
// 512-bit blocks and 64 rounds; SHA-384/512 on 64-bit words, 1024-bit blocks
// and 80 rounds. Datapath words are carried as 64 bits throughout; for the
// 32-bit variants only bits [31:0] are meaningful and the round functions
// below operate on those bits alone.
//
// Constant tables follow the SHA-2 standard (FIPS 180-4):
//   K64[i]   = first 64 bits of the fractional part of cbrt(p_i), p_i the
//              i-th prime, i = 0..79. The 32-bit round constants of
//              SHA-224/256 are the upper halves K64[i][63:32].
//   IV_LO[i] = first 64 bits of the fractional part of sqrt(p_i), i = 0..7
//              (SHA-512); SHA-256 uses the upper halves.
//   IV_HI[i] = the same for p_8..p_15 (SHA-384); SHA-224 uses the lower halves.
package sha2_pkg;

  typedef enum logic [1:0] {
    SHA224 = 2'd0,
    SHA256 = 2'd1,
    SHA384 = 2'd2,
    SHA512 = 2'd3
  } sha2_variant_e;

  typedef logic [63:0] word_t;

  function automatic bit is_wide(sha2_variant_e v);
    return (v == SHA384) || (v == SHA512);
  endfunction

  // Word size in bits, block size in bytes, rounds per block, length-field
  // size in bytes and digest size in bits of each variant.
  function automatic int word_bits(sha2_variant_e v);
    return is_wide(v) ? 64 : 32;
  endfunction

  function automatic int block_bytes(sha2_variant_e v);
    return is_wide(v) ? 128 : 64;
  endfunction

  function automatic int num_rounds(sha2_variant_e v);
    return is_wide(v) ? 80 : 64;
  endfunction

  function automatic int len_bytes(sha2_variant_e v);
    return is_wide(v) ? 16 : 8;
  endfunction

  function automatic int digest_bits(sha2_variant_e v);
    case (v)
      SHA224:  return 224;
      SHA256:  return 256;
      SHA384:  return 384;
      default: return 512;
    endcase
  endfunction

  localparam int MAX_ROUNDS = 80;

  localparam word_t K64 [MAX_ROUNDS] = '{
    64'h428a2f98d728ae22,
    64'h7137449123ef65cd,
    64'hb5c0fbcfec4d3b2f,
    64'he9b5dba58189dbbc,
    64'h3956c25bf348b538,
    64'h59f111f1b605d019,
    64'h923f82a4af194f9b,
    64'hab1c5ed5da6d8118,
    64'hd807aa98a3030242,
    64'h12835b0145706fbe,
    64'h243185be4ee4b28c,
    64'h550c7dc3d5ffb4e2,
    64'h72be5d74f27b896f,
    64'h80deb1fe3b1696b1,
    64'h9bdc06a725c71235,
    64'hc19bf174cf692694,
    64'he49b69c19ef14ad2,
    64'hefbe4786384f25e3,
    64'h0fc19dc68b8cd5b5,
    64'h240ca1cc77ac9c65,
    64'h2de92c6f592b0275,
    64'h4a7484aa6ea6e483,
    64'h5cb0a9dcbd41fbd4,
    64'h76f988da831153b5,
    64'h983e5152ee66dfab,
    64'ha831c66d2db43210,
    64'hb00327c898fb213f,
    64'hbf597fc7beef0ee4,
    64'hc6e00bf33da88fc2,
    64'hd5a79147930aa725,
    64'h06ca6351e003826f,
    64'h142929670a0e6e70,
    64'h27b70a8546d22ffc,
    64'h2e1b21385c26c926,
    64'h4d2c6dfc5ac42aed,
    64'h53380d139d95b3df,
    64'h650a73548baf63de,
    64'h766a0abb3c77b2a8,
    64'h81c2c92e47edaee6,
    64'h92722c851482353b,
    64'ha2bfe8a14cf10364,
    64'ha81a664bbc423001,
    64'hc24b8b70d0f89791,
    64'hc76c51a30654be30,
    64'hd192e819d6ef5218,
    64'hd69906245565a910,
    64'hf40e35855771202a,
    64'h106aa07032bbd1b8,
    64'h19a4c116b8d2d0c8,
    64'h1e376c085141ab53,
    64'h2748774cdf8eeb99,
    64'h34b0bcb5e19b48a8,
    64'h391c0cb3c5c95a63,
    64'h4ed8aa4ae3418acb,
    64'h5b9cca4f7763e373,
    64'h682e6ff3d6b2b8a3,
    64'h748f82ee5defb2fc,
    64'h78a5636f43172f60,
    64'h84c87814a1f0ab72,
    64'h8cc702081a6439ec,
    64'h90befffa23631e28,
    64'ha4506cebde82bde9,
    64'hbef9a3f7b2c67915,
    64'hc67178f2e372532b,
    64'hca273eceea26619c,
    64'hd186b8c721c0c207,
    64'heada7dd6cde0eb1e,
    64'hf57d4f7fee6ed178,
    64'h06f067aa72176fba,
    64'h0a637dc5a2c898a6,
    64'h113f9804bef90dae,
    64'h1b710b35131c471b,
    64'h28db77f523047d84,
    64'h32caab7b40c72493,
    64'h3c9ebe0a15c9bebc,
    64'h431d67c49c100d4c,
    64'h4cc5d4becb3e42b6,
    64'h597f299cfc657e2a,
    64'h5fcb6fab3ad6faec,
    64'h6c44198c4a475817
  };

  localparam word_t IV_LO [8] = '{
    64'h6a09e667f3bcc908, 64'hbb67ae8584caa73b, 64'h3c6ef372fe94f82b, 64'ha54ff53a5f1d36f1,
    64'h510e527fade682d1, 64'h9b05688c2b3e6c1f, 64'h1f83d9abfb41bd6b, 64'h5be0cd19137e2179
  };

  localparam word_t IV_HI [8] = '{
    64'hcbbb9d5dc1059ed8, 64'h629a292a367cd507, 64'h9159015a3070dd17, 64'h152fecd8f70e5939,
    64'h67332667ffc00b31, 64'h8eb44a8768581511, 64'hdb0c2e0d64f98fa7, 64'h47b5481dbefa4fa4
  };

  // Round constant of round t for variant v.
  function automatic word_t round_const(sha2_variant_e v, int unsigned t);
    word_t k;
    k = K64[t % MAX_ROUNDS];
    return is_wide(v) ? k : {32'd0, k[63:32]};
  endfunction

  // Initial hash value H(0)[i] of variant v.
  function automatic word_t init_hash(sha2_variant_e v, int unsigned i);
    case (v)
      SHA224:  return {32'd0, IV_HI[i % 8][31:0]};
      SHA256:  return {32'd0, IV_LO[i % 8][63:32]};
      SHA384:  return IV_HI[i % 8];
      default: return IV_LO[i % 8];
    endcase
  endfunction

  // Rotate right within the variant's word width.
  function automatic word_t rotr(sha2_variant_e v, word_t x, int unsigned n);
    logic [31:0] x32;
    x32 = x[31:0];
    if (is_wide(v)) return (x >> n) | (x << (64 - n));
    return {32'd0, (x32 >> n) | (x32 << (32 - n))};
  endfunction

  function automatic word_t shr(sha2_variant_e v, word_t x, int unsigned n);
    return is_wide(v) ? (x >> n) : {32'd0, x[31:0] >> n};
  endfunction

  function automatic word_t mask(sha2_variant_e v, word_t x);
    return is_wide(v) ? x : {32'd0, x[31:0]};
  endfunction

  function automatic word_t add(sha2_variant_e v, word_t x, word_t y);
    return mask(v, x + y);
  endfunction

  function automatic word_t ch(word_t x, word_t y, word_t z);
    return (x & y) ^ (~x & z);
  endfunction

  function automatic word_t maj(word_t x, word_t y, word_t z);
    return (x & y) ^ (x & z) ^ (y & z);
  endfunction

  // Upper-case Sigma functions of the compression round.
  function automatic word_t bsig0(sha2_variant_e v, word_t x);
    if (is_wide(v)) return rotr(v, x, 28) ^ rotr(v, x, 34) ^ rotr(v, x, 39);
    return rotr(v, x, 2) ^ rotr(v, x, 13) ^ rotr(v, x, 22);
  endfunction

  function automatic word_t bsig1(sha2_variant_e v, word_t x);
    if (is_wide(v)) return rotr(v, x, 14) ^ rotr(v, x, 18) ^ rotr(v, x, 41);
    return rotr(v, x, 6) ^ rotr(v, x, 11) ^ rotr(v, x, 25);
  endfunction

  // Lower-case sigma functions of the message expansion.
  function automatic word_t ssig0(sha2_variant_e v, word_t x);
    if (is_wide(v)) return rotr(v, x, 1) ^ rotr(v, x, 8) ^ shr(v, x, 7);
    return rotr(v, x, 7) ^ rotr(v, x, 18) ^ shr(v, x, 3);
  endfunction

  function automatic word_t ssig1(sha2_variant_e v, word_t x);
    if (is_wide(v)) return rotr(v, x, 19) ^ rotr(v, x, 61) ^ shr(v, x, 6);
    return rotr(v, x, 17) ^ rotr(v, x, 19) ^ shr(v, x, 10);
  endfunction

  // The eight working variables a..h (also used for the hash value H0..H7).
  typedef struct packed {
    word_t a, b, c, d, e, f, g, h;
  } state_t;

  function automatic state_t init_state(sha2_variant_e v);
    state_t s;
    s.a = init_hash(v, 0); s.b = init_hash(v, 1);
    s.c = init_hash(v, 2); s.d = init_hash(v, 3);
    s.e = init_hash(v, 4); s.f = init_hash(v, 5);
    s.g = init_hash(v, 6); s.h = init_hash(v, 7);
    return s;
  endfunction

  function automatic state_t state_add(sha2_variant_e v, state_t x, state_t y);
    state_t s;
    s.a = add(v, x.a, y.a); s.b = add(v, x.b, y.b);
    s.c = add(v, x.c, y.c); s.d = add(v, x.d, y.d);
    s.e = add(v, x.e, y.e); s.f = add(v, x.f, y.f);
    s.g = add(v, x.g, y.g); s.h = add(v, x.h, y.h);
    return s;
  endfunction

endpackage
