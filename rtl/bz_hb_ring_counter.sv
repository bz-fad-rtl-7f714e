// bz_hb_ring_counter: "Hot Block" low-power one-hot ring counter.
//
// A single '1' circulates from bit 0 towards bit WIDTH-1 and back to bit 0,
// one position per clock: q_o[n] is '1' in the n-th cycle after reset. The
// flip-flops are split into blocks of BLOCK bits; each block gets its clock
// from its own bz_hb_clock_gate, so only the block holding the '1' (the hot
// block) and, for one cycle, the block it moves into are clocked. All other
// flip-flops see no clock edge at all.
//
// Wiring of the gator of block j (bits j*BLOCK and up), as published:
//   Entrance = input of the block's rightmost flip-flop, i.e. the output of
//              the bit just below the block (the top bit for block 0);
//   Exit     = output of the rightmost flip-flop of the block to the left
//              (bit 0 for the leftmost block).
// The gator opens when Entrance is '1' and closes one cycle after the '1'
// has moved on, when Exit is '1'.
//
// Interface: clk_i is the system clock; its inverse goes to every gator.
// rst_i is an asynchronous, active-high reset: q_o becomes 1 (bit 0 hot),
// the gator of block 0 opens and all others close. blk_open_o shows which
// blocks are receiving clock pulses.
//
// Own choices: the asynchronous reset and its value (bit 0 hot) are not
// specified in detail; the gator of block 0 resets open (see
// bz_hb_clock_gate). When BLOCK does not divide WIDTH the leftmost block is
// shorter. At least two blocks are needed so that Entrance and Exit of a
// block come from other blocks.
//
// The flip-flops are clocked by gated clocks on purpose; that is the
// circuit's idea. The gator latches are intended (see bz_hb_clock_gate).
module bz_hb_ring_counter
  import bzfad_pkg::*;
#(
  parameter int unsigned WIDTH = K_DEFAULT,
  parameter int unsigned BLOCK = RC_BLOCK_DEFAULT
) (
  input  logic                                   clk_i,
  input  logic                                   rst_i,
  output logic [WIDTH-1:0]                       q_o,
  output logic [rc_num_blocks(WIDTH, BLOCK)-1:0] blk_open_o
);

  localparam int unsigned NBLK = rc_num_blocks(WIDTH, BLOCK);

  initial begin
    assert (NBLK >= 2) else $fatal(1, "ring counter needs at least two blocks");
  end

  logic            clk_n;
  logic [NBLK-1:0] blk_clk;

  assign clk_n = ~clk_i;

  for (genvar j = 0; j < NBLK; j++) begin : g_blk
    localparam int unsigned LO   = j * BLOCK;
    localparam int unsigned ENTR = (LO == 0) ? WIDTH - 1 : LO - 1;
    localparam int unsigned EXT  = (j == NBLK - 1) ? 0 : LO + BLOCK;

    bz_hb_clock_gate #(
      .RESET_OPEN(j == 0)
    ) u_cg (
      .clk_n_i   (clk_n),
      .rst_i     (rst_i),
      .entrance_i(q_o[ENTR]),
      .exit_i    (q_o[EXT]),
      .clk_o     (blk_clk[j]),
      .open_o    (blk_open_o[j])
    );
  end

  // Flip-flops of each block, on that block's gated clock.
  for (genvar j = 0; j < NBLK; j++) begin : g_bits
    localparam int unsigned LO   = j * BLOCK;
    localparam int unsigned HI   = (LO + BLOCK > WIDTH) ? WIDTH - 1 : LO + BLOCK - 1;
    localparam int unsigned ENTR = (LO == 0) ? WIDTH - 1 : LO - 1;
    localparam int unsigned N    = HI - LO + 1;

    logic [N-1:0] bits;

    always_ff @(posedge blk_clk[j] or posedge rst_i) begin
      if (rst_i) bits <= N'(j == 0);
      else       bits <= N'({bits, q_o[ENTR]});  // shift the '1' one place left
    end

    assign q_o[HI:LO] = bits;
  end

  // Exactly one '1' in the ring, and at most two blocks clocked at a time.
  a_onehot: assert property (@(posedge clk_i) disable iff (rst_i)
    q_o != '0 && (q_o & (q_o - 1'b1)) == '0)
    else $error("ring counter not one-hot: %h", q_o);
  a_two_blocks: assert property (@(posedge clk_i) disable iff (rst_i)
    $countones(blk_open_o) inside {1, 2})
    else $error("clock gators open: %b", blk_open_o);

endmodule
