// tb_sha2_control: unit test of the control unit (SHA-256 and SHA-512).
//
// Sends block-done pulses at random spacings of at least the round count
// (exactly the round count for back-to-back blocks) with random first/last
// flags, and compares every output in every cycle with a cycle model: a block
// loaded in cycle c has rounds t = 0..NR-1 in cycles c+1..c+NR, fin in the
// last of them, fin_last when the block ends a message, and core_en high in
// load and round cycles only.
module tb_sha2_control;
  import sha2_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks [2];
  int failures [2];
  int b2b [2];
  logic done [2];

  for (genvar g = 0; g < 2; g++) begin : g_v
    localparam sha2_variant_e V = (g == 0) ? SHA256 : SHA512;
    localparam int NR = num_rounds(V);

    logic       blk_done, blk_first, blk_last;
    logic       load, load_first, run, fin, fin_last, core_en;
    logic [6:0] t;

    sha2_control #(.VARIANT(V)) dut (
      .clk, .rst_n, .blk_done, .blk_first, .blk_last,
      .load, .load_first, .run, .t, .fin, .fin_last, .core_en
    );

    // model
    int  m_t;      // current round, -1 when idle
    bit  m_last;

    initial begin
      checks[g] = 0; failures[g] = 0; b2b[g] = 0; done[g] = 0;
      blk_done = 0; blk_first = 0; blk_last = 0;
      m_t = -1; m_last = 0;
      while (!rst_n) @(posedge clk);
      for (int n = 0; n < 40; n++) begin
        int gap;
        gap = ($urandom % 3 == 0) ? int'($urandom % 20) : 0;
        // wait for the model to reach the final round (or idle), then gap
        while (m_t != -1 && m_t != NR - 1) @(negedge clk);
        repeat (gap) @(negedge clk);
        blk_done  = 1;
        blk_first = 1'($urandom);
        blk_last  = 1'($urandom);
        if (m_t == NR - 1) b2b[g]++;
        @(negedge clk);
        blk_done = 0;
      end
      while (m_t != -1) @(negedge clk);
      done[g] = 1;
    end

    // compare just before each rising edge
    always @(negedge clk) begin
      if (rst_n) begin
        #4;
        checks[g]++;
        if (load != blk_done || load_first != (blk_done && blk_first)
            || run != (m_t >= 0) || (m_t >= 0 && int'(t) != m_t)
            || fin != (m_t == NR - 1) || fin_last != (m_t == NR - 1 && m_last)
            || core_en != (blk_done || m_t >= 0)) begin
          failures[g]++;
          $display("FAIL v%0d: model t %0d: load %b run %b t %0d fin %b fin_last %b en %b",
                   g, m_t, load, run, t, fin, fin_last, core_en);
        end
      end
    end

    always @(posedge clk) begin
      if (rst_n) begin
        if (blk_done) begin
          m_t    <= 0;
          m_last <= blk_last;
        end else if (m_t == NR - 1) begin
          m_t    <= -1;
        end else if (m_t >= 0) begin
          m_t    <= m_t + 1;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!(done[0] && done[1])) @(posedge clk);
    if (b2b[0] == 0 || b2b[1] == 0) begin
      failures[0]++;
      $display("FAIL no back-to-back block");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + 1,
             failures[0] + failures[1] + 1);
    $finish;
  end

endmodule
