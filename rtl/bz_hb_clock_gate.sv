// bz_hb_clock_gate: clock gator (CG) of one block of the Hot Block ring
// counter.
//
// A one-hot ring counter holds a single '1', so only the block that holds
// it (the "hot block") needs clock pulses. This gator opens the clock of its
// block when the '1' is about to enter and closes it once the '1' has left.
// It is built from three parts, all as described for the published CG:
//   * a resettable latch, data input = Entrance,
//   * a 2:1 multiplexer (M1) driving the latch's sample/hold line, selected
//     by the latch output: Entrance while closed (0), Exit while open (1),
//   * a NAND of the latch output and the inverted clock, giving Clock-OUT.
// Closed, the latch samples Entrance; when Entrance rises it captures '1'
// and the multiplexer switches to Exit, so the latch holds. When Exit rises
// the latch samples Entrance again, which is '0' by then, and closes.
//
// Interface: clk_n_i is the inverted system clock (~Clock-IN); entrance_i is
// the input of the block's rightmost flip-flop; exit_i is the output of the
// rightmost flip-flop of the block to the left; rst_i (active high) forces
// the latch. clk_o = NAND(latch, clk_n_i): a copy of the system clock while
// open, held at '1' while closed. open_o is the latch output.
//
// Timing: Entrance and Exit change just after a rising clock edge, while
// clk_n_i is '0', so the latch output changes while Clock-OUT is forced high
// by the NAND and no extra rising edge can appear at clk_o. The first edge
// passed to the block is the one after Entrance rose.
//
// Own choice: RESET_OPEN sets the value the latch takes in reset. The
// published CG resets to '0'; the gator of the block holding the initial '1'
// must start open or that '1' would never move, so the ring counter sets
// RESET_OPEN for that one block.
//
// The latch and the loop from its output through M1 back to its own
// sample/hold line are the circuit itself, and both stand on purpose. The loop settles because
// M1 only selects a signal that does not depend on the latch.
module bz_hb_clock_gate #(
  parameter bit RESET_OPEN = 1'b0
) (
  input  logic clk_n_i,
  input  logic rst_i,
  input  logic entrance_i,
  input  logic exit_i,
  output logic clk_o,
  output logic open_o
);

  logic sample;   // S/~H line of the latch
  logic q;        // latch output

  // M1: watch Entrance while closed, Exit while open.
  assign sample = q ? exit_i : entrance_i;

  // Resettable latch.
  always_latch begin
    if (rst_i)       q = RESET_OPEN;
    else if (sample) q = entrance_i;
  end

  // Gating NAND.
  assign clk_o  = ~(q & clk_n_i);
  assign open_o = q;

endmodule
