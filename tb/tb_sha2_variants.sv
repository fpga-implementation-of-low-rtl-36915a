// tb_sha2_variants: end-to-end test of the SHA-224, SHA-384 and SHA-512
// configurations of the core.
//
// Three cores, one per variant, each streamed the 19 test messages by its own
// sha2_tb_stream (digest and latency checks; back-to-back messages, stalls
// and waits). The SHA-256 configuration is covered by tb_sha2_core.
module tb_sha2_variants;
  import sha2_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   checks [3];
  int   failures [3];
  int   stalls [3];
  int   digests [3];
  logic done [3];

  for (genvar g = 0; g < 3; g++) begin : g_v
    localparam sha2_variant_e V = (g == 0) ? SHA224 : (g == 1) ? SHA384 : SHA512;
    localparam int DB = digest_bits(V);

    logic          in_valid, in_last, in_ready, digest_valid;
    logic [7:0]    in_data;
    logic [DB-1:0] digest;

    sha2_core #(.VARIANT(V)) dut (
      .clk, .rst_n, .test_en(1'b0), .in_valid, .in_data, .in_last, .in_ready,
      .digest, .digest_valid
    );

    sha2_tb_stream #(.VARIANT(V), .SEED(g + 3)) u_stream (
      .clk, .rst_n, .in_valid, .in_data, .in_last, .in_ready, .digest, .digest_valid,
      .checks(checks[g]), .failures(failures[g]), .stall_cycles(stalls[g]),
      .digests(digests[g]), .done(done[g])
    );
  end

  initial begin
    int c, f;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!(done[0] && done[1] && done[2])) @(posedge clk);
    repeat (2) @(posedge clk);
    c = 0; f = 0;
    for (int g = 0; g < 3; g++) begin
      c += checks[g] + 1;
      f += failures[g] + ((stalls[g] == 0) ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + 1, failures[0] + 1);
    $finish;
  end

endmodule
