// bz_rca: K-bit ripple carry adder with carry out.
//
// The BZ-FAD multiplier places no constraint on the adder type; a ripple
// carry adder is used because it makes the fewest transitions per addition
// of the common adder types. This one is a plain chain of K full adders,
// carry in fixed at 0, written bit by bit so that the carry really ripples
// instead of being handed to a synthesis tool as one '+'.
//
// Interface: purely combinational. sum_o = a_i + b_i, K+1 bits, the top bit
// being the carry out (Cout).
module bz_rca
  import bzfad_pkg::*;
#(
  parameter int unsigned K = K_DEFAULT
) (
  input  logic [K-1:0] a_i,
  input  logic [K-1:0] b_i,
  output logic [K:0]   sum_o
);

  logic [K:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < K; i++) begin : g_fa
    assign sum_o[i]     = a_i[i] ^ b_i[i] ^ carry[i];
    assign carry[i + 1] = (a_i[i] & b_i[i]) | (carry[i] & (a_i[i] ^ b_i[i]));
  end

  assign sum_o[K] = carry[K];

endmodule
