// bz_plow_latches: M2 and P_Low, the latched low half of the BZ-FAD product.
//
// A shift-and-add multiplier finishes one low product bit per cycle: bit n
// is PP(0) of cycle n. Instead of shifting these bits through a register,
// BZ-FAD writes each one straight into its own latch: latch n opens only in
// cycle n, selected by bit n of the ring counter, and holds for the rest of
// the multiplication. Nothing in the low half ever shifts, and latches
// replace flip-flops; this is safe because no latch feeds another.
//
// Interface: ring_i is the one-hot ring counter; pp0_i is PP(0); en_i is
// high during a multiplication. Latch n is transparent while ring_i[n],
// en_i and the inverted clock are all '1', i.e. in the second half of
// cycle n, and closes on the rising clock edge that ends the cycle, before
// PP(0) changes. p_low_o holds the low half of the product.
//
// The sample line of latch n is the ring-counter bit, as published; the
// inverted clock into M2 follows the published block diagram. Qualifying
// with en_i is this design's own choice: it keeps a finished product from
// being overwritten while the multiplier is idle. The latches are intended.
module bz_plow_latches
  import bzfad_pkg::*;
#(
  parameter int unsigned K = K_DEFAULT
) (
  input  logic         clk_i,
  input  logic         en_i,
  input  logic [K-1:0] ring_i,
  input  logic         pp0_i,
  output logic [K-1:0] p_low_o
);

  logic [K-1:0] sample;   // S/~H line of each latch

  assign sample = ring_i & {K{en_i & ~clk_i}};

  for (genvar n = 0; n < K; n++) begin : g_latch
    logic q;
    always_latch begin
      if (sample[n]) q = pp0_i;
    end
    assign p_low_o[n] = q;
  end

endmodule
