// bz_fad_multiplier: BZ-FAD ("Bypass Zero, Feed A Directly") low-power
// radix-2 shift-and-add multiplier, unsigned K x K -> 2K bits.
//
// It computes the same sequence as a textbook shift-and-add multiplier, one
// multiplier bit per cycle, but removes most of its switching activity:
//   * B is never shifted: M1 (bz_hot_bit_select) picks bit n of B with a
//     one-hot ring counter;
//   * A goes straight into the adder, with no 0/A multiplexer;
//   * when B(n) = 0 the adder is bypassed: the partial product is parked in
//     the Bypass register so the adder inputs do not change
//     (bz_feeder_bypass);
//   * the ring counter is the clock-gated Hot Block counter
//     (bz_hb_ring_counter) instead of a binary counter;
//   * the low half of the product is not shifted but written bit by bit
//     into latches (bz_plow_latches, M2 and P_Low).
//
// Interface and timing: with ready_o high, a one-cycle start_i pulse loads
// a_i and b_i. The K following cycles are the K multiplication cycles
// (cycle n handles B(n); ring counter bit n is hot). At the clock edge that
// ends cycle K-1, busy_o falls, done_o pulses for one cycle, and product_o
// = a_i * b_i is valid and stays valid until the next start. A new start is
// accepted in the cycle done_o is high. rc_blk_open_o shows which blocks
// of the ring counter are receiving clock pulses. rst_i is a synchronous
// active-high reset for the control and datapath registers and an
// asynchronous one for the ring counter, which must see a rising edge on
// rst_i after power-up (lint notes this mixed use of one reset net).
//
// Own choices (the published architecture does not specify them): the
// start/ready/done handshake, capture of A and B into registers at start,
// unsigned operands, stopping the ring counter's clock between
// multiplications, and reading the upper product half from Bypass, where
// it always lands because B(K) is taken as 0.
module bz_fad_multiplier
  import bzfad_pkg::*;
#(
  parameter int unsigned K        = K_DEFAULT,
  parameter int unsigned RC_BLOCK = RC_BLOCK_DEFAULT
) (
  input  logic           clk_i,
  input  logic           rst_i,
  input  logic           start_i,
  input  logic [K-1:0]   a_i,
  input  logic [K-1:0]   b_i,
  output logic           ready_o,
  output logic           busy_o,
  output logic           done_o,
  output logic [2*K-1:0] product_o,
  output logic [rc_num_blocks(K, RC_BLOCK)-1:0] rc_blk_open_o
);

  logic [K-1:0]    a_q;
  logic [K-1:0]    b_q;
  logic            busy;
  logic            load;
  logic            last;
  logic            rc_clk;
  logic [K-1:0]    ring;
  logic            b_next;
  logic            b_cur;
  logic            pp0;
  logic [K-1:0]    hi;
  logic [K-1:0]    lo;

  assign load = start_i && !busy;
  assign last = busy && ring[K-1];

  // Operand registers and control.
  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      busy   <= 1'b0;
      done_o <= 1'b0;
      a_q    <= '0;
      b_q    <= '0;
    end else begin
      done_o <= last;
      if (load) begin
        busy <= 1'b1;
        a_q  <= a_i;
        b_q  <= b_i;
      end else if (last) begin
        busy <= 1'b0;
      end
    end
  end

  // Ring counter clock: NAND of busy and the inverted clock, i.e. a copy of
  // the clock while busy and a steady '1' while idle. busy only changes just
  // after a rising edge, while the clock is high, so no extra edge appears.
  // The ring wraps from bit K-1 to bit 0 at the last edge of a
  // multiplication and then rests there, ready for the next one.
  assign rc_clk = ~(busy & ~clk_i);

  bz_hb_ring_counter #(
    .WIDTH(K),
    .BLOCK(RC_BLOCK)
  ) u_ring (
    .clk_i     (rc_clk),
    .rst_i     (rst_i),
    .q_o       (ring),
    .blk_open_o(rc_blk_open_o)
  );

  bz_hot_bit_select #(.K(K)) u_m1 (
    .clk_i   (clk_i),
    .rst_i   (rst_i),
    .load_i  (load),
    .step_i  (busy),
    .b0_i    (b_i[0]),
    .b_i     (b_q[K-1:1]),
    .ring_i  (ring),
    .b_next_o(b_next),
    .b_cur_o (b_cur)
  );

  bz_feeder_bypass #(.K(K)) u_dp (
    .clk_i   (clk_i),
    .rst_i   (rst_i),
    .clear_i (load),
    .step_i  (busy),
    .a_i     (a_q),
    .b_cur_i (b_cur),
    .b_next_i(b_next),
    .pp_o    (),
    .pp0_o   (pp0),
    .hi_o    (hi)
  );

  bz_plow_latches #(.K(K)) u_m2 (
    .clk_i  (clk_i),
    .en_i   (busy),
    .ring_i (ring),
    .pp0_i  (pp0),
    .p_low_o(lo)
  );

  // Rules of the datapath: exactly one ring bit is hot during a
  // multiplication, and done only follows the last cycle.
  a_ring_onehot: assert property (@(posedge clk_i) disable iff (rst_i)
    busy |-> (ring != '0 && (ring & (ring - 1'b1)) == '0))
    else $error("ring counter not one-hot while busy: %h", ring);
  a_done_after_last: assert property (@(posedge clk_i) disable iff (rst_i)
    done_o |-> !busy)
    else $error("done while busy");

  assign ready_o   = !busy;
  assign busy_o    = busy;
  assign product_o = {hi, lo};

endmodule
