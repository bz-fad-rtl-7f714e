// bz_hot_bit_select: multiplexer M1 and the hot-bit flip-flop of BZ-FAD.
//
// The multiplier never shifts its B operand. Instead M1, a multiplexer with
// a one-hot select bus driven by the ring counter, picks the bit that is
// needed: in cycle n (ring bit n hot) it delivers B(n+1), the hot bit of the
// NEXT cycle, one cycle early. That early bit decides which of the Feeder
// and Bypass registers is loaded at the end of cycle n. A flip-flop then
// holds it as B(n), the hot bit of the current cycle, which steers MUX1.
// In the last cycle (n = K-1) there is no next bit and M1 selects a
// constant '0'.
//
// Interface: ring_i is the one-hot ring counter; b_i bits 1 to K-1 of the
// (unshifted) B register. b_next_o = B(n+1) is combinational. b_cur_o = B(n) is
// registered: load_i (start of a multiplication) loads it with b0_i, the
// bit B(0) of the new operand; step_i (a multiplication cycle) loads it with
// b_next_o. rst_i is a synchronous active-high reset.
//
// Own choices: the load path for B(0) and the synchronous reset; the
// published figure shows a small 2:1 multiplexer in front of this
// flip-flop but its function is not described.
module bz_hot_bit_select
  import bzfad_pkg::*;
#(
  parameter int unsigned K = K_DEFAULT
) (
  input  logic         clk_i,
  input  logic         rst_i,
  input  logic         load_i,
  input  logic         step_i,
  input  logic         b0_i,
  input  logic [K-1:1] b_i,
  input  logic [K-1:0] ring_i,
  output logic         b_next_o,
  output logic         b_cur_o
);

  // Input n of M1 is B(n+1); input K-1 is the constant '0'.
  logic [K-1:0] m1_in;
  assign m1_in = {1'b0, b_i[K-1:1]};

  // One-hot multiplexer: AND-OR of each input with its select line.
  assign b_next_o = |(m1_in & ring_i);

  always_ff @(posedge clk_i) begin
    if (rst_i)       b_cur_o <= 1'b0;
    else if (load_i) b_cur_o <= b0_i;
    else if (step_i) b_cur_o <= b_next_o;
  end

endmodule
