// tb_sha2_padder: unit test of the padder for SHA-256 and SHA-512.
//
// For each message length, the padded stream leaving the padder is collected
// and compared byte by byte with a reference padding built here: message,
// 0x80, zeros, bit length big-endian in the last 8 (SHA-256) or 16 (SHA-512)
// bytes. Also checked on every byte: block position, block-end, first-block
// and (at block ends) message-end flags; and that in_ready stays low for
// exactly as many cycles as padding bytes are generated. Messages are sent
// back to back with random stalls.
module tb_sha2_padder;
  import sha2_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NL = 10;
  localparam int LENS [NL] = '{1, 3, 55, 56, 63, 64, 111, 112, 128, 300};

  int checks [2];
  int failures [2];
  logic done [2];

  for (genvar g = 0; g < 2; g++) begin : g_v
    localparam sha2_variant_e V = (g == 0) ? SHA256 : SHA512;
    localparam int BB = block_bytes(V);
    localparam int LB = len_bytes(V);
    localparam int IW = $clog2(BB);

    logic          in_valid, in_last, in_ready;
    logic [7:0]    in_data;
    logic          o_valid, o_blk_end, o_blk_first, o_msg_end;
    logic [7:0]    o_data;
    logic [IW-1:0] o_idx;

    sha2_padder #(.VARIANT(V)) dut (
      .clk, .rst_n, .in_valid, .in_data, .in_last, .in_ready,
      .out_valid(o_valid), .out_data(o_data), .out_idx(o_idx),
      .out_blk_end(o_blk_end), .out_blk_first(o_blk_first), .out_msg_end(o_msg_end)
    );

    int nout;          // bytes of the current message seen at the output
    int cur_len, cur_pl;
    int busy_cycles;   // cycles with in_ready low

    function automatic logic [7:0] mbyte(int l, int i);
      return 8'(i * 13 + l * 7 + 1);
    endfunction

    function automatic logic [7:0] ref_byte(int l, int pl, int j);
      longint unsigned bits;
      int k;
      bits = longint'(l) * 8;
      if (j < l) return mbyte(l, j);
      if (j == l) return 8'h80;
      k = j - (pl - LB);                  // index into the length field
      if (k < 0) return 8'h00;
      if (k < LB - 8) return 8'h00;       // upper half of a 128-bit length
      return 8'(bits >> (8 * (LB - 1 - k)));
    endfunction

    always @(posedge clk) begin
      if (rst_n) begin
        if (!in_ready) busy_cycles++;
        if (o_valid) begin
          automatic int j = nout;
          automatic bit ok;
          ok = (o_data == ref_byte(cur_len, cur_pl, j))
            && (int'(o_idx) == j % BB)
            && (o_blk_end == (j % BB == BB - 1))
            && (o_blk_first == (j < BB))
            && (!o_blk_end || (o_msg_end == (j >= cur_pl - BB)));
          checks[g]++;
          if (!ok) begin
            failures[g]++;
            $display("FAIL v%0d len %0d byte %0d: %h idx %0d end %b first %b msg %b", g,
                     cur_len, j, o_data, o_idx, o_blk_end, o_blk_first, o_msg_end);
          end
          nout++;
        end
      end
    end

    initial begin
      checks[g] = 0; failures[g] = 0; done[g] = 1'b0;
      in_valid = 1'b0; in_last = 1'b0; in_data = '0;
      nout = 0; busy_cycles = 0; cur_len = 0; cur_pl = 0;
      while (!rst_n) @(posedge clk);
      for (int m = 0; m < NL; m++) begin
        @(negedge clk);
        // the previous message is complete once all its bytes came out
        while (nout < cur_pl) @(negedge clk);
        checks[g]++;
        if (m > 0 && busy_cycles != cur_pl - cur_len) begin
          failures[g]++;
          $display("FAIL v%0d len %0d: in_ready low %0d cycles, expected %0d", g,
                   cur_len, busy_cycles, cur_pl - cur_len);
        end
        cur_len = LENS[m];
        cur_pl  = ((cur_len + 1 + LB + BB - 1) / BB) * BB;
        nout = 0;
        busy_cycles = 0;
        for (int i = 0; i < cur_len; i++) begin
          while ($urandom % 5 == 0) begin
            in_valid = 1'b0;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_data  = mbyte(cur_len, i);
          in_last  = (i == cur_len - 1);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
        end
        in_valid = 1'b0;
        in_last  = 1'b0;
      end
      while (nout < cur_pl) @(negedge clk);
      repeat (2) @(negedge clk);
      checks[g]++;
      if (busy_cycles != cur_pl - cur_len) failures[g]++;
      done[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!(done[0] && done[1])) @(posedge clk);
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
