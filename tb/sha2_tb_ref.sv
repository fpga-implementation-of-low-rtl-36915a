// sha2_tb_ref: plain reference model of SHA-256 for the unit testbenches.
//
// Written directly from the SHA-256 definition on 32-bit words, without the
// design's package, so that the testbenches compare against an independent
// implementation: message expansion of one 512-bit block and the 64 rounds.
package sha2_tb_ref;

  typedef logic [31:0] w32_t;

  localparam w32_t K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2
  };

  localparam w32_t IV [8] = '{
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  function automatic w32_t ror(w32_t x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // W[0..63] of a block given as 64 bytes, byte 0 first.
  function automatic void expand(input logic [7:0] blk [64], output w32_t w [64]);
    for (int j = 0; j < 16; j++)
      w[j] = {blk[4*j], blk[4*j+1], blk[4*j+2], blk[4*j+3]};
    for (int j = 16; j < 64; j++)
      w[j] = (ror(w[j-2], 17) ^ ror(w[j-2], 19) ^ (w[j-2] >> 10)) + w[j-7]
           + (ror(w[j-15], 7) ^ ror(w[j-15], 18) ^ (w[j-15] >> 3)) + w[j-16];
  endfunction

  // One block: h is updated in place.
  function automatic void compress(inout w32_t h [8], input w32_t w [64]);
    w32_t a, b, c, d, e, f, g, hh, t1, t2;
    a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4]; f = h[5]; g = h[6]; hh = h[7];
    for (int t = 0; t < 64; t++) begin
      t1 = hh + (ror(e, 6) ^ ror(e, 11) ^ ror(e, 25)) + ((e & f) ^ (~e & g)) + K[t] + w[t];
      t2 = (ror(a, 2) ^ ror(a, 13) ^ ror(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
      hh = g; g = f; f = e; e = d + t1; d = c; c = b; b = a; a = t1 + t2;
    end
    h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e; h[5] += f; h[6] += g; h[7] += hh;
  endfunction

endpackage
