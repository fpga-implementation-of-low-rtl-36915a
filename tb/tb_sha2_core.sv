// tb_sha2_core: end-to-end test of the SHA-256 core at its default parameters.
//
// Streams 19 messages (1 to 1000 bytes, including "abc" and every length
// around the block and padding boundaries) through sha2_core, checks each
// digest and its latency (sha2_tb_stream), and additionally checks:
//   * the gated core clock pulses exactly in the cycles its enable is high;
//   * that every mechanism of the design happened at least once:
//     back-to-back blocks (a block loaded in the final round of the previous
//     one, i.e. a 64-cycle block period), a block started from idle, padding
//     spilling into an extra block, message bytes accepted while a block is
//     being compressed, a new message started before the previous digest,
//     user stall cycles, and gated (idle) core-clock cycles.
module tb_sha2_core;
  import sha2_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid, in_last, in_ready, digest_valid;
  logic [7:0]  in_data;
  logic [255:0] digest;

  int checks_s, failures_s, stall_cycles, digests;
  logic done;

  always #5 clk = ~clk;

  sha2_core dut (
    .clk         (clk),
    .rst_n       (rst_n),
    .test_en     (1'b0),
    .in_valid    (in_valid),
    .in_data     (in_data),
    .in_last     (in_last),
    .in_ready    (in_ready),
    .digest      (digest),
    .digest_valid(digest_valid)
  );

  sha2_tb_stream #(.VARIANT(SHA256), .SEED(7)) u_stream (
    .clk, .rst_n, .in_valid, .in_data, .in_last, .in_ready, .digest, .digest_valid,
    .checks(checks_s), .failures(failures_s), .stall_cycles, .digests, .done
  );

  // mechanism counters
  int n_b2b, n_idle_start, n_spill, n_overlap, n_msg_overlap, n_gated;
  int n_en, n_gclk;
  int pending;   // messages whose final byte was accepted, digest not yet out

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.load && dut.fin)  n_b2b++;
      if (dut.load && !dut.run) n_idle_start++;
      if (dut.u_padder.state == 2'd1 && int'(dut.u_padder.pos) >= 64 - 8) n_spill++;
      if (in_valid && in_ready && dut.run) n_overlap++;
      if (in_valid && in_ready && dut.u_padder.pos == 0 && dut.u_padder.nbytes == 0
          && pending > 0) n_msg_overlap++;
      if (!dut.core_en) n_gated++;
      if (dut.core_en)  n_en++;
      pending <= pending + ((in_valid && in_ready && in_last) ? 1 : 0)
                         - (digest_valid ? 1 : 0);
    end else begin
      pending <= 0;
    end
  end

  always @(posedge dut.core_clk) if (rst_n) n_gclk++;

  int checks, failures;

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-36s %0d", what, n);
    end
  endtask

  initial begin
    n_b2b = 0; n_idle_start = 0; n_spill = 0; n_overlap = 0; n_msg_overlap = 0;
    n_gated = 0; n_en = 0; n_gclk = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    checks   = checks_s;
    failures = failures_s;
    need("back-to-back blocks", n_b2b);
    need("block started from idle", n_idle_start);
    need("padding spilled to extra block", n_spill);
    need("bytes read during compression", n_overlap);
    need("message started before digest", n_msg_overlap);
    need("user stall cycles", stall_cycles);
    need("gated core-clock cycles", n_gated);
    checks++;
    if (n_gclk != n_en) begin
      failures++;
      $display("FAIL gated clock pulses %0d, enabled cycles %0d", n_gclk, n_en);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks_s + 1, failures_s + 1);
    $finish;
  end

endmodule
