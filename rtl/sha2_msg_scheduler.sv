// sha2_msg_scheduler: the message scheduler of the SHA-2 core.
//
// Two parts, so that one block is expanded while the next one is read:
//  * a block buffer of BB bytes (512 bits for SHA-224/256, 1024 for
//    SHA-384/512), written byte by byte at the position the padder gives
//    (a write pointer, not a shift chain), clocked by the free-running clock;
//  * a window of 16 words, W[t..t+15], clocked by the gated core clock. On
//    load it takes the whole block, including the byte arriving in that same
//    cycle, as big-endian words W[0..15]. On each advance it shifts by one word
//    and appends W[t+16] = ssig1(W[t+14]) + W[t+9] + ssig0(W[t+1]) + W[t].
//
// The expansion thus costs no cycles of its own: W[t] is always at the head
// of the window in round t, and W[t+1] is offered one round early for the
// precomputation in the compression function. Word sizes follow VARIANT;
// for SHA-224/256 only bits [31:0] of each word are used.
//
// Timing: load and advance act at the rising edge of core_clk; w_t/w_next are
// register outputs. blk_w0 is combinational (word 0 of the block being
// loaded) and is used in the load cycle only.
//
// The 512-bit buffer with a pointer, filled while the previous block is
// expanded, follows the design description; keeping the 16-word window as a
// separate register is a choice of this implementation.
module sha2_msg_scheduler
  import sha2_pkg::*;
#(
  parameter sha2_variant_e VARIANT = SHA256,
  localparam int BB   = block_bytes(VARIANT),
  localparam int WB   = word_bits(VARIANT) / 8,
  localparam int IDXW = $clog2(BB)
) (
  input  logic            clk,        // free-running: block buffer
  input  logic            core_clk,   // gated: expansion window
  input  logic            rst_n,
  // padded byte stream
  input  logic            byte_valid,
  input  logic [7:0]      byte_data,
  input  logic [IDXW-1:0] byte_idx,
  // from the control unit
  input  logic            load,       // take the completed block into the window
  input  logic            advance,    // one round done: shift the window
  // to the compression function
  output word_t           w_t,        // W[t]
  output word_t           w_next,     // W[t+1]
  output word_t           blk_w0      // W[0] of the block being loaded
);

  logic [7:0] buffer [BB];
  logic [7:0] blk    [BB];   // buffer with the byte of this cycle merged in
  word_t      blk_w  [16];
  word_t      win    [16];

  always_ff @(posedge clk) begin
    if (byte_valid) buffer[byte_idx] <= byte_data;
  end

  always_comb begin
    for (int i = 0; i < BB; i++) begin
      blk[i] = (byte_valid && (byte_idx == IDXW'(i))) ? byte_data : buffer[i];
    end
    for (int j = 0; j < 16; j++) begin
      blk_w[j] = '0;
      for (int k = 0; k < WB; k++) begin
        blk_w[j] = (blk_w[j] << 8) | word_t'(blk[j*WB + k]);
      end
    end
  end

  word_t w_new;
  assign w_new = add(VARIANT, add(VARIANT, ssig1(VARIANT, win[14]), win[9]),
                     add(VARIANT, ssig0(VARIANT, win[1]), win[0]));

  always_ff @(posedge core_clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) win[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < 16; i++) win[i] <= blk_w[i];
    end else if (advance) begin
      for (int i = 0; i < 15; i++) win[i] <= win[i+1];
      win[15] <= w_new;
    end
  end

  assign w_t    = win[0];
  assign w_next = win[1];
  assign blk_w0 = blk_w[0];

endmodule
