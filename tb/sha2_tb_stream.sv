// sha2_tb_stream: stimulus and checker for one SHA-2 core.
//
// Plays the user process: streams the NMSG test messages of sha2_tb_vectors
// into the core, one byte per cycle, and checks every digest against the
// expected value. The messages are sent in three manners:
//   * after waiting for all earlier digests (core idle)       k in WAIT set
//   * with random idle cycles between bytes (user stalls)     k in STALL set
//   * back to back, as soon as in_ready returns               all others
// For each digest it also checks the latency from the cycle the final
// message byte is accepted to the cycle digest_valid is seen:
//   padding bytes + rounds + 2
// (one cycle in the padder, one in the digest register).
module sha2_tb_stream
  import sha2_pkg::*;
  import sha2_tb_vectors::*;
#(
  parameter sha2_variant_e VARIANT = SHA256,
  parameter int unsigned   SEED    = 1,
  localparam int DB = digest_bits(VARIANT)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          in_valid,
  output logic [7:0]    in_data,
  output logic          in_last,
  input  logic          in_ready,
  input  logic [DB-1:0] digest,
  input  logic          digest_valid,
  output int            checks,
  output int            failures,
  output int            stall_cycles,
  output int            digests,
  output logic          done
);

  int cyc;
  int last_acc [NMSG];     // cycle in which message k's final byte was accepted
  int sent;

  function automatic bit waits(int k);
    return (k <= 3) || (k == 10) || (k == 15);
  endfunction

  function automatic bit stalls(int k);
    return (k == 8) || (k == 9) || (k == 11) || (k == 14) || (k == 17);
  endfunction

  initial begin
    int unsigned r;
    in_valid     = 1'b0;
    in_data      = '0;
    in_last      = 1'b0;
    stall_cycles = 0;
    sent         = 0;
    r = $urandom(SEED);
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    for (int k = 0; k < NMSG; k++) begin
      if (waits(k)) begin
        while (digests < k) @(posedge clk);
      end
      for (int i = 0; i < MSG_LEN[k]; i++) begin
        @(negedge clk);
        if (stalls(k)) begin
          while ($urandom % 4 == 0) begin
            in_valid = 1'b0;
            stall_cycles++;
            @(negedge clk);
          end
        end
        in_valid = 1'b1;
        in_data  = msg_byte(k, i);
        in_last  = (i == MSG_LEN[k] - 1);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (in_last) last_acc[k] = cyc;
      end
      @(negedge clk);
      in_valid = 1'b0;
      in_last  = 1'b0;
      sent = k + 1;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc      <= 0;
      checks   <= 0;
      failures <= 0;
      digests  <= 0;
    end else begin
      cyc <= cyc + 1;
      if (digest_valid) begin
        automatic int k = digests;
        automatic logic [511:0] got = 512'(digest) << (512 - DB);
        automatic int lat_exp = padded_len(VARIANT, MSG_LEN[k]) - MSG_LEN[k]
                                + num_rounds(VARIANT) + 2;
        digests <= digests + 1;
        if (k >= NMSG) begin
          failures <= failures + 1;
          checks   <= checks + 1;
          $display("FAIL %s: unexpected digest", VARIANT.name());
        end else begin
          checks <= checks + 2;
          if (got != expected(VARIANT, k) || sent <= k) begin
            failures <= failures + 1 + ((cyc - last_acc[k] != lat_exp) ? 1 : 0);
            $display("FAIL %s msg %0d len %0d: got %h", VARIANT.name(), k, MSG_LEN[k], digest);
          end else if (cyc - last_acc[k] != lat_exp) begin
            failures <= failures + 1;
            $display("FAIL %s msg %0d: latency %0d, expected %0d", VARIANT.name(), k,
                     cyc - last_acc[k], lat_exp);
          end
        end
      end
    end
  end

  assign done = (digests >= NMSG);

endmodule
