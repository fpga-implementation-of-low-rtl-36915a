// tb_sha2_compression: unit test of the compression function (SHA-256).
//
// The testbench plays the control unit and the scheduler: it feeds W[t] and
// W[t+1] from the reference expansion and the control signals round by round.
// Five blocks are processed:
//   0  "abc", padded, first block of a message, started from idle
//   1  random block, first block of a message, started from idle
//   2  random block, same message, loaded in the final round of block 1
//   3  random block, first block of a new message, loaded in the final round
//      of block 2 (the previous message's digest must still come out)
//   4  random block, same message, started from idle after a pause
// At every final round hash_new is compared with the reference chaining
// value, and for block 0 also with the standard's digest of "abc".
module tb_sha2_compression;
  import sha2_pkg::*;
  import sha2_tb_ref::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       load, load_first, run, fin;
  logic [6:0] t;
  word_t      w_t, w_next, blk_w0;
  state_t     hash, hash_new;

  sha2_compression #(.VARIANT(SHA256)) dut (
    .clk, .rst_n, .load, .load_first, .run, .t, .fin,
    .w_t, .w_next, .blk_w0, .hash, .hash_new
  );

  localparam int NB = 5;
  localparam bit FIRST [NB] = '{1, 1, 0, 1, 0};
  localparam bit B2B   [NB] = '{0, 0, 1, 1, 0};   // loaded in previous final round
  logic [7:0] blk [NB][64];
  w32_t       w [NB][64];
  w32_t       href [NB][8];
  int checks = 0, failures = 0;

  function automatic logic [255:0] pack(state_t s);
    return {s.a[31:0], s.b[31:0], s.c[31:0], s.d[31:0], s.e[31:0], s.f[31:0], s.g[31:0], s.h[31:0]};
  endfunction

  function automatic logic [255:0] pack_ref(w32_t h [8]);
    return {h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7]};
  endfunction

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s:\n  got %h\n  exp %h", what, got, exp);
    end
  endtask

  initial begin
    w32_t h [8];
    load = 0; load_first = 0; run = 0; fin = 0; t = 0; w_t = 0; w_next = 0; blk_w0 = 0;
    // block 0: "abc" padded
    for (int i = 0; i < 64; i++) blk[0][i] = 8'h00;
    blk[0][0] = 8'h61; blk[0][1] = 8'h62; blk[0][2] = 8'h63; blk[0][3] = 8'h80;
    blk[0][63] = 8'h18;
    for (int b = 1; b < NB; b++) for (int i = 0; i < 64; i++) blk[b][i] = 8'($urandom);
    for (int b = 0; b < NB; b++) begin
      expand(blk[b], w[b]);
      if (FIRST[b]) h = IV;
      compress(h, w[b]);
      href[b] = h;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      if (!B2B[b]) begin
        // idle cycles, then load from idle
        repeat (3) begin
          @(negedge clk);
          load = 0; run = 0; fin = 0;
        end
        @(negedge clk);
        run = 0; fin = 0;
      end
      // load cycle (in the previous block's final round when B2B)
      load = 1; load_first = FIRST[b]; blk_w0 = {32'd0, w[b][0]};
      for (int r = 0; r < 64; r++) begin
        @(negedge clk);
        load = 0; load_first = 0;
        run = 1; t = 7'(r); fin = (r == 63);
        w_t = {32'd0, w[b][r]};
        w_next = (r < 63) ? {32'd0, w[b][r+1]} : '0;
        if (r == 63) begin
          #1;
          check($sformatf("hash_new block %0d", b), pack(hash_new), pack_ref(href[b]));
          if (b == 0)
            check("SHA-256(abc)", pack(hash_new),
                  256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad);
        end
      end
    end
    @(negedge clk);
    load = 0; run = 0; fin = 0;
    @(negedge clk);
    check("held hash", pack(hash), pack_ref(href[NB-1]));
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
