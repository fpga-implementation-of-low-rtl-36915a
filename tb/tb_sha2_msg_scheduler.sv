// tb_sha2_msg_scheduler: unit test of the message scheduler (SHA-256).
//
// Writes random blocks into the block buffer byte by byte (in scrambled
// byte order for the first block, to exercise the write pointer), loads each
// block in the cycle of its final byte, and then advances the window 64
// times. In every round W[t] and W[t+1] are compared with the reference
// expansion. While a block is being expanded the next block's bytes are
// already written into the buffer, as in the core, without disturbing it.
module tb_sha2_msg_scheduler;
  import sha2_pkg::*;
  import sha2_tb_ref::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       byte_valid, load, advance;
  logic [7:0] byte_data;
  logic [5:0] byte_idx;
  word_t      w_t, w_next, blk_w0;

  sha2_msg_scheduler #(.VARIANT(SHA256)) dut (
    .clk, .core_clk(clk), .rst_n, .byte_valid, .byte_data, .byte_idx,
    .load, .advance, .w_t, .w_next, .blk_w0
  );

  localparam int NB = 4;
  logic [7:0] blk [NB][64];
  w32_t       wref [NB][64];
  int checks = 0, failures = 0;

  task automatic check(string what, word_t got, w32_t exp);
    checks++;
    if (got != {32'd0, exp}) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    byte_valid = 0; load = 0; advance = 0; byte_data = 0; byte_idx = 0;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 64; i++) blk[b][i] = 8'($urandom);
      expand(blk[b], wref[b]);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // block 0: bytes written in scrambled order (index 37*i mod 64), then
    // loaded with its final byte
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      byte_valid = 1;
      byte_idx   = 6'((37 * i + 11) % 64);
      byte_data  = blk[0][byte_idx];
      load       = (i == 63);
      if (i == 63) check("blk_w0", blk_w0, wref[0][0]);
    end
    // blocks 1..NB-1 stream in one byte per round of the previous block
    for (int b = 1; b <= NB; b++) begin
      for (int t = 0; t < 64; t++) begin
        @(negedge clk);
        check($sformatf("blk %0d W[%0d]", b - 1, t), w_t, wref[b-1][t]);
        if (t < 63) check($sformatf("blk %0d W[%0d+1]", b - 1, t), w_next, wref[b-1][t+1]);
        if (b < NB) begin
          byte_valid = 1;
          byte_idx   = 6'(t);
          byte_data  = blk[b][t];
          load       = (t == 63);
          advance    = (t != 63);
          if (t == 63) check("blk_w0", blk_w0, wref[b][0]);
        end else begin
          byte_valid = 0;
          load       = 0;
          advance    = 1;
        end
      end
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule
