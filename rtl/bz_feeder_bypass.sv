// bz_feeder_bypass: Feeder and Bypass registers, adder and MUX1 of BZ-FAD.
//
// This is where the adder of a shift-and-add multiplier is bypassed when the
// current multiplier bit is 0. The running partial product PP is kept in one
// of two K-bit registers, both holding PP already shifted right by one:
//   * Feeder feeds the adder; its other input is A itself, with no 0/A
//     multiplexer in front of it.
//   * Bypass holds PP in cycles that need no addition.
// In cycle n, MUX1 chooses PP = Feeder + A (K+1 bits) when B(n) = 1 and
// PP = {0, Bypass} when B(n) = 0. PP(0) is the finished product bit n and
// leaves through pp0_o. PP(K:1) is stored at the end of the cycle into
// Feeder if B(n+1) = 1 (the adder is needed next) or into Bypass otherwise.
// So the adder inputs change only in cycles that really add, and in bypass
// cycles the adder sees no transitions at all.
//
// Interface: clear_i (start of a multiplication) zeroes both registers;
// step_i marks a multiplication cycle. a_i must stay constant while the
// multiplication runs. hi_o is the Bypass register: after the last cycle
// (B(K) taken as 0) it holds the upper half of the product.
//
// Own choices: Feeder and Bypass use clock enables derived from B(n+1) on
// the common clock; the published circuit gates their clocks with NAND and
// NOR gates fed with the inverted clock. Synchronous active-high reset.
module bz_feeder_bypass
  import bzfad_pkg::*;
#(
  parameter int unsigned K = K_DEFAULT
) (
  input  logic         clk_i,
  input  logic         rst_i,
  input  logic         clear_i,
  input  logic         step_i,
  input  logic [K-1:0] a_i,
  input  logic         b_cur_i,
  input  logic         b_next_i,
  output logic [K:0]   pp_o,
  output logic         pp0_o,
  output logic [K-1:0] hi_o
);

  logic [K-1:0] feeder;
  logic [K-1:0] bypass;
  logic [K:0]   sum;

  bz_rca #(.K(K)) u_adder (
    .a_i  (feeder),
    .b_i  (a_i),
    .sum_o(sum)
  );

  // MUX1
  assign pp_o  = b_cur_i ? sum : {1'b0, bypass};
  assign pp0_o = pp_o[0];
  assign hi_o  = bypass;

  always_ff @(posedge clk_i) begin
    if (rst_i || clear_i) begin
      feeder <= '0;
    end else if (step_i && b_next_i) begin
      feeder <= pp_o[K:1];
    end
  end

  always_ff @(posedge clk_i) begin
    if (rst_i || clear_i) begin
      bypass <= '0;
    end else if (step_i && !b_next_i) begin
      bypass <= pp_o[K:1];
    end
  end

endmodule
