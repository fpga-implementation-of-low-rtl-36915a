// sha2_compression: the compression function of the SHA-2 core.
//
// One SHA-2 round per cycle on the working variables a..h:
//   T1 = h + K[t] + W[t] + Sigma1(e) + Ch(e,f,g)
//   T2 = Sigma0(a) + Maj(a,b,c)
//   a..h <= T1+T2, a, b, c, d+T1, e, f, g
// Two features shorten the schedule:
//  * Precomputation (round pipelining with data forwarding): the term
//    h + K[t] + W[t] is summed one round ahead into the register hkw. During
//    round t the next round's h is already known (it is the current g), and
//    W[t+1] comes from the scheduler, so only three operands remain in T1.
//  * Embedded digest update: in the final round the block result is added
//    into the hash value in the same cycle (hash_new = H + new a..h), and a..h
//    are loaded with that sum, ready for the next block. No separate
//    finalisation cycle is needed, so back-to-back blocks run without a gap.
// On load the working variables and H take the initial hash value (first
// block of a message) or the current H; in a final round H is first updated.
//
// Interface: control inputs from sha2_control, words from the scheduler.
// hash_new is combinational and valid in the final round (fin); the caller
// registers it as the digest. All registers are on the gated core clock.
// Word sizes follow VARIANT; for SHA-224/256 bits [63:32] stay zero.
//
// One round per cycle and the digest folded into the final round follow the
// design description; the form of the round pipelining (this one-round-ahead
// precomputation) is a choice of this implementation.
module sha2_compression
  import sha2_pkg::*;
#(
  parameter sha2_variant_e VARIANT = SHA256
) (
  input  logic       clk,         // gated core clock
  input  logic       rst_n,
  input  logic       load,
  input  logic       load_first,
  input  logic       run,
  input  logic [6:0] t,
  input  logic       fin,
  input  word_t      w_t,         // W[t]
  input  word_t      w_next,      // W[t+1]
  input  word_t      blk_w0,      // W[0] of the block being loaded
  output state_t     hash,        // current hash value H0..H7
  output state_t     hash_new     // H + result of the final round
);

  state_t s, s_next, base;
  word_t  hkw;                    // h + K[t] + W[t] for the current round
  word_t  t1, t2, hkw_next, hkw_load;

  always_comb begin
    t1 = add(VARIANT, add(VARIANT, hkw, bsig1(VARIANT, s.e)), ch(s.e, s.f, s.g));
    t2 = add(VARIANT, bsig0(VARIANT, s.a), maj(s.a, s.b, s.c));
    s_next.a = add(VARIANT, t1, t2);
    s_next.b = s.a;
    s_next.c = s.b;
    s_next.d = s.c;
    s_next.e = add(VARIANT, s.d, t1);
    s_next.f = s.e;
    s_next.g = s.f;
    s_next.h = s.g;
    hash_new = state_add(VARIANT, hash, s_next);
    // forwarded h + K + W of the next round
    hkw_next = add(VARIANT, add(VARIANT, s.g, round_const(VARIANT, 32'(t) + 1)), w_next);
    // starting value of a block: IV, the hash just finished, or the held hash
    if (load_first)  base = init_state(VARIANT);
    else if (fin)    base = hash_new;
    else             base = hash;
    hkw_load = add(VARIANT, add(VARIANT, base.h, round_const(VARIANT, 0)), blk_w0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s    <= init_state(VARIANT);
      hash <= init_state(VARIANT);
      hkw  <= '0;
    end else if (load) begin
      s    <= base;
      hash <= base;
      hkw  <= hkw_load;
    end else if (fin) begin
      s    <= hash_new;
      hash <= hash_new;
    end else if (run) begin
      s    <= s_next;
      hkw  <= hkw_next;
    end
  end

  // The precomputed term must equal h + K[t] + W[t] in every round.
  a_hkw_forwarded: assert property (
    @(posedge clk) disable iff (!rst_n)
      run |-> hkw == add(VARIANT, add(VARIANT, s.h, round_const(VARIANT, 32'(t))), w_t));

endmodule
