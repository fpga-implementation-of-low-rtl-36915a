// sha2_core: streaming SHA-2 hash core (SHA-224, SHA-256, SHA-384, SHA-512).
//
// The user hands over the message one byte per cycle, flags the final byte
// with in_last, and waits for digest_valid. Nothing else is asked of the
// user: the core pads the message itself, and within a message no byte ever
// has to wait, because each block is compressed while the next one is read.
//
// Structure (the four units of the classic SHA-2 architecture):
//   sha2_padder         forwards the bytes and appends the padding
//   sha2_msg_scheduler  block buffer (write pointer) + 16-word expansion window
//   sha2_compression    one round per cycle, digest update in the final round
//   sha2_control        round counter and block sequencing
// plus sha2_clock_gate, a latch-based gate that stops the clock of the round
// datapath (expansion window, working variables, hash value) whenever no
// block is being loaded or compressed, to save dynamic power.
//
// Timing, SHA-256 (VARIANT = SHA256): a block is 64 bytes, so 64 input
// cycles, and its compression is 64 rounds, one per cycle, that start the
// cycle after its last byte leaves the padder. The padder adds one cycle of
// latency. If the padder emits the last byte of a message's final block in
// cycle n, the rounds run in cycles n+1..n+64 and digest/digest_valid are
// registered at the end of cycle n+64, i.e. visible in cycle n+65. In_ready
// drops while the padding is
// generated; the next message may start right after, even while the previous
// one is still being compressed. SHA-384/512 use 128-byte blocks and 80
// rounds. The digest is H0 || H1 || ... truncated to 224/256/384/512 bits,
// H0 in the most significant bits.
//
// From the original design description: the four units, a message passed
// in chunks with no pauses and no manual padding, reading one block while
// compressing the previous one, and the digest folded into the last round.
// Choices of this implementation: the byte-wide valid/ready interface, the
// VARIANT parameter, the digest format and where the clock gate sits.
module sha2_core
  import sha2_pkg::*;
#(
  parameter sha2_variant_e VARIANT = SHA256,
  localparam int DB   = digest_bits(VARIANT),
  localparam int IDXW = $clog2(block_bytes(VARIANT))
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_en,       // forces the gated clock on
  input  logic          in_valid,
  input  logic [7:0]    in_data,
  input  logic          in_last,
  output logic          in_ready,
  output logic [DB-1:0] digest,
  output logic          digest_valid
);

  // padded stream
  logic            p_valid, p_blk_end, p_blk_first, p_msg_end;
  logic [7:0]      p_data;
  logic [IDXW-1:0] p_idx;

  // control
  logic       load, load_first, run, fin, fin_last, core_en;
  logic [6:0] t;

  // datapath
  logic   core_clk;
  word_t  w_t, w_next, blk_w0;
  state_t hash_new;

  sha2_padder #(.VARIANT(VARIANT)) u_padder (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (in_valid),
    .in_data      (in_data),
    .in_last      (in_last),
    .in_ready     (in_ready),
    .out_valid    (p_valid),
    .out_data     (p_data),
    .out_idx      (p_idx),
    .out_blk_end  (p_blk_end),
    .out_blk_first(p_blk_first),
    .out_msg_end  (p_msg_end)
  );

  sha2_control #(.VARIANT(VARIANT)) u_control (
    .clk        (clk),
    .rst_n      (rst_n),
    .blk_done   (p_valid && p_blk_end),
    .blk_first  (p_blk_first),
    .blk_last   (p_msg_end),
    .load       (load),
    .load_first (load_first),
    .run        (run),
    .t          (t),
    .fin        (fin),
    .fin_last   (fin_last),
    .core_en    (core_en)
  );

  sha2_clock_gate u_cg (
    .clk    (clk),
    .en     (core_en),
    .test_en(test_en),
    .gclk   (core_clk)
  );

  sha2_msg_scheduler #(.VARIANT(VARIANT)) u_sched (
    .clk       (clk),
    .core_clk  (core_clk),
    .rst_n     (rst_n),
    .byte_valid(p_valid),
    .byte_data (p_data),
    .byte_idx  (p_idx),
    .load      (load),
    .advance   (run),
    .w_t       (w_t),
    .w_next    (w_next),
    .blk_w0    (blk_w0)
  );

  sha2_compression #(.VARIANT(VARIANT)) u_comp (
    .clk       (core_clk),
    .rst_n     (rst_n),
    .load      (load),
    .load_first(load_first),
    .run       (run),
    .t         (t),
    .fin       (fin),
    .w_t       (w_t),
    .w_next    (w_next),
    .blk_w0    (blk_w0),
    .hash      (),                 // the held hash is not needed here
    .hash_new  (hash_new)
  );

  // H0 || ... || H7 of the finished message, each word at its variant width.
  logic [511:0] full;
  always_comb begin
    if (word_bits(VARIANT) == 64)
      full = {hash_new.a, hash_new.b, hash_new.c, hash_new.d,
              hash_new.e, hash_new.f, hash_new.g, hash_new.h};
    else
      full = {hash_new.a[31:0], hash_new.b[31:0], hash_new.c[31:0], hash_new.d[31:0],
              hash_new.e[31:0], hash_new.f[31:0], hash_new.g[31:0], hash_new.h[31:0],
              256'd0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      digest       <= '0;
      digest_valid <= 1'b0;
    end else begin
      digest_valid <= fin_last;
      if (fin_last) digest <= full[511 -: DB];
    end
  end

endmodule
