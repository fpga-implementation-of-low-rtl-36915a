// sha2_control: the control unit of the SHA-2 core.
//
// It sequences the rounds. A block is loaded in the cycle its last byte
// arrives from the padder (blk_done). The following NR cycles (64 for
// SHA-224/256, 80 for SHA-384/512) are rounds t = 0..NR-1, one per cycle. In
// the final round the compression function also adds the block's result into
// the hash value, so the next block can be loaded in that very cycle and the
// rounds continue without a gap: a block costs exactly NR cycles.
//
// Since the padder delivers at most one byte per cycle and a block has at
// least NR bytes, the rounds of a block always end no later than the arrival
// of the next block; an assertion checks that no block arrives while rounds
// are still to come.
//
// Outputs: load (with load_first when the block opens a message), run and the
// round number t for the rounds, fin in the final round, fin_last when that
// final round ends a message (the digest is complete), and core_en, the
// enable of the clock gate of the round datapath (high in load and round
// cycles only). Everything but the registers run/t/cur_last is combinational.
//
// The design description names this unit but not its workings; this is the
// simplest sequencer that gives the block timing described above.
module sha2_control
  import sha2_pkg::*;
#(
  parameter sha2_variant_e VARIANT = SHA256,
  localparam int NR = num_rounds(VARIANT)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       blk_done,   // last byte of a block is on the stream
  input  logic       blk_first,  // that block is the first of its message
  input  logic       blk_last,   // that block is the last of its message
  output logic       load,
  output logic       load_first,
  output logic       run,
  output logic [6:0] t,
  output logic       fin,
  output logic       fin_last,
  output logic       core_en
);

  logic cur_last;

  assign load       = blk_done;
  assign load_first = blk_done && blk_first;
  assign fin        = run && (t == 7'(NR - 1));
  assign fin_last   = fin && cur_last;
  assign core_en    = load || run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run      <= 1'b0;
      t        <= '0;
      cur_last <= 1'b0;
    end else if (load) begin
      run      <= 1'b1;
      t        <= '0;
      cur_last <= blk_last;
    end else if (fin) begin
      run      <= 1'b0;
      t        <= '0;
    end else if (run) begin
      t        <= t + 7'd1;
    end
  end

  // A new block may only arrive when the round datapath is idle or in its
  // final round.
  a_block_overrun: assert property (
    @(posedge clk) disable iff (!rst_n) blk_done |-> (!run || fin));

endmodule
