// sha2_padder: the padder unit of the SHA-2 core.
//
// The user streams the message in, one byte per accepted cycle, and flags the
// final byte with in_last. The padder forwards every byte unchanged and, once
// the message has ended, generates the SHA-2 padding itself: one 0x80 byte
// (the single 1 bit followed by zeros), as many 0x00 bytes as needed, and the
// message length in bits as a big-endian field of 8 bytes (SHA-224/256) or
// 16 bytes (SHA-384/512) that ends the last block. The user never pads.
//
// Output: a registered byte stream, one byte per cycle at most, with the
// byte's position inside its block (out_idx) and block flags valid on every
// byte: out_blk_end marks the byte that completes a block, out_blk_first
// marks bytes of a message's first block, out_msg_end marks bytes of the
// block that ends the message (it is high on the padding bytes of the final
// block; it is only sampled together with out_blk_end).
//
// Timing: a byte accepted in cycle n appears at the output in cycle n+1.
// in_ready is high while a message is being accepted and low while padding
// is generated (9 to 72 cycles for SHA-256), after which the next message may
// start at once. Messages are whole bytes and shorter than 2^61 bytes
// (2^64 bits), so a 61-bit byte counter suffices.
//
// The padding rule is the SHA-2 standard's, as the design description asks;
// the registered output, its flags and byte granularity are choices of this
// implementation.
module sha2_padder
  import sha2_pkg::*;
#(
  parameter sha2_variant_e VARIANT = SHA256,
  localparam int BB   = block_bytes(VARIANT),
  localparam int LB   = len_bytes(VARIANT),
  localparam int IDXW = $clog2(BB)
) (
  input  logic            clk,
  input  logic            rst_n,
  // user side
  input  logic            in_valid,
  input  logic [7:0]      in_data,
  input  logic            in_last,
  output logic            in_ready,
  // padded stream
  output logic            out_valid,
  output logic [7:0]      out_data,
  output logic [IDXW-1:0] out_idx,
  output logic            out_blk_end,
  output logic            out_blk_first,
  output logic            out_msg_end
);

  typedef enum logic [1:0] {
    P_MSG   = 2'd0,   // forwarding message bytes
    P_ONE   = 2'd1,   // emitting the 0x80 byte
    P_ZERO  = 2'd2,   // emitting zero bytes
    P_LEN   = 2'd3    // emitting the length field
  } pad_state_e;

  pad_state_e      state;
  logic [IDXW-1:0] pos;        // position of the next byte in its block
  logic [60:0]     nbytes;     // message bytes accepted so far
  logic [127:0]    len_sr;     // length field, shifted out MSB first
  logic            blk_first;  // the block being formed is a message's first

  localparam logic [IDXW-1:0] LEN_POS  = IDXW'(BB - LB);
  localparam logic [IDXW-1:0] LAST_POS = IDXW'(BB - 1);

  logic [IDXW-1:0] pos_nx;
  logic            take;
  logic [7:0]      len_byte;

  assign pos_nx   = pos + 1'b1;          // wraps at the block size (power of 2)
  assign take     = in_valid && (state == P_MSG);
  assign in_ready = (state == P_MSG);
  assign len_byte = (LB == 16) ? len_sr[127:120] : len_sr[63:56];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= P_MSG;
      pos           <= '0;
      nbytes        <= '0;
      len_sr        <= '0;
      blk_first     <= 1'b1;
      out_valid     <= 1'b0;
      out_data      <= '0;
      out_idx       <= '0;
      out_blk_end   <= 1'b0;
      out_blk_first <= 1'b0;
      out_msg_end   <= 1'b0;
    end else begin
      out_valid   <= 1'b0;
      out_blk_end <= 1'b0;
      out_msg_end <= 1'b0;
      unique case (state)
        P_MSG: begin
          if (take) begin
            out_valid     <= 1'b1;
            out_data      <= in_data;
            out_idx       <= pos;
            out_blk_end   <= (pos == LAST_POS);
            out_blk_first <= blk_first;
            pos           <= pos_nx;
            if (pos == LAST_POS) blk_first <= 1'b0;
            if (in_last) begin
              state  <= P_ONE;
              // length in bits = (bytes accepted including this one) * 8
              len_sr <= {64'd0, nbytes + 61'd1, 3'b000};
              nbytes <= '0;
            end else begin
              nbytes <= nbytes + 61'd1;
            end
          end
        end
        P_ONE, P_ZERO: begin
          out_valid     <= 1'b1;
          out_data      <= (state == P_ONE) ? 8'h80 : 8'h00;
          out_idx       <= pos;
          out_blk_end   <= (pos == LAST_POS);
          out_blk_first <= blk_first;
          // a block that leaves room for the length field is the last one
          out_msg_end   <= (pos < LEN_POS);
          pos           <= pos_nx;
          if (pos == LAST_POS) blk_first <= 1'b0;
          state         <= (pos_nx == LEN_POS) ? P_LEN : P_ZERO;
        end
        P_LEN: begin
          out_valid     <= 1'b1;
          out_data      <= len_byte;
          out_idx       <= pos;
          out_blk_end   <= (pos == LAST_POS);
          out_blk_first <= blk_first;
          out_msg_end   <= 1'b1;
          len_sr        <= len_sr << 8;
          pos           <= pos_nx;
          if (pos == LAST_POS) begin
            state     <= P_MSG;
            blk_first <= 1'b1;
          end
        end
        default: state <= P_MSG;
      endcase
    end
  end

endmodule
