// tb_bz_fad_activity: switching activity of the BZ-FAD multiplier over 100
// random operand pairs (16 x 16 bits, the default size).
//
// Counts signal transitions in the main parts of the datapath (P_Low
// latches, adder output, MUX1 output, ring counter, Feeder and Bypass) and
// rising clock edges on each ring-counter block, and prints them as a table.
// The products are checked, and so are the properties the architecture is
// built on:
//   * in a cycle with B(n) = 0 the adder output does not change at all
//     (the first cycle of a product excepted: A and Feeder were just loaded);
//   * each P_Low latch output changes at most once per product;
//   * per product, the ring-counter blocks together receive exactly
//     NBLK * (BLOCK + 1) clock edges (each block: the edge that brings the
//     '1' in, BLOCK - 1 inside it, the one that moves it out), against
//     K edges on each of the K flip-flops of an ungated ring.
module tb_bz_fad_activity;

  localparam int unsigned K     = 16;
  localparam int unsigned BLOCK = 4;
  localparam int unsigned NBLK  = K / BLOCK;

  logic           clk = 1'b0;
  logic           rst;
  logic           start;
  logic [K-1:0]   a;
  logic [K-1:0]   b;
  logic           ready;
  logic           busy;
  logic           done;
  logic [2*K-1:0] product;
  logic [NBLK-1:0] rc_open;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  bz_fad_multiplier u_dut (
    .clk_i(clk), .rst_i(rst), .start_i(start), .a_i(a), .b_i(b),
    .ready_o(ready), .busy_o(busy), .done_o(done), .product_o(product),
    .rc_blk_open_o(rc_open));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- transition counting, sampled at every time step change -----------
  int tr_plow = 0, tr_adder = 0, tr_mux1 = 0, tr_ring = 0;
  int tr_feeder = 0, tr_bypass = 0, blk_edges = 0, blk_edges_op = 0;
  bit counting = 0;

  function automatic int pop(logic [K:0] v);
    return $countones(v);
  endfunction

  logic [K-1:0] plow_prev;
  logic [K:0]   sum_prev, pp_prev;
  logic [K-1:0] ring_prev, feeder_prev, bypass_prev;

  // Sample 4 time units after each clock edge, when the zero-delay values
  // have settled: the first block counts, the second then records.
  always @(negedge clk or posedge clk) if (counting) begin
    #4;
    tr_plow   += pop((K+1)'(u_dut.lo ^ plow_prev));
    tr_adder  += pop(u_dut.u_dp.sum ^ sum_prev);
    tr_mux1   += pop(u_dut.u_dp.pp_o ^ pp_prev);
    tr_ring   += pop((K+1)'(u_dut.ring ^ ring_prev));
    tr_feeder += pop((K+1)'(u_dut.u_dp.feeder ^ feeder_prev));
    tr_bypass += pop((K+1)'(u_dut.u_dp.bypass ^ bypass_prev));
  end
  always @(negedge clk or posedge clk) begin
    #4;
    plow_prev   = u_dut.lo;
    sum_prev    = u_dut.u_dp.sum;
    pp_prev     = u_dut.u_dp.pp_o;
    ring_prev   = u_dut.ring;
    feeder_prev = u_dut.u_dp.feeder;
    bypass_prev = u_dut.u_dp.bypass;
  end

  for (genvar j = 0; j < NBLK; j++) begin : g_edges
    always @(posedge u_dut.u_ring.blk_clk[j]) if (counting) begin
      blk_edges++;
      blk_edges_op++;
    end
  end

  // In a bypass cycle the adder output must equal that of the cycle before.
  logic [K:0] sum_last_cycle;
  int bypass_cycles = 0;
  always @(negedge clk) if (counting) begin
    if (busy && !u_dut.b_cur && !u_dut.ring[0]) begin
      bypass_cycles++;
      checks++;
      if (u_dut.u_dp.sum !== sum_last_cycle) begin
        failures++;
        $display("adder output changed in a bypass cycle");
      end
    end
    sum_last_cycle = u_dut.u_dp.sum;
  end

  task automatic run(input logic [K-1:0] x, input logic [K-1:0] y);
    logic [K-1:0] lo_start;
    a = x;
    b = y;
    start = 1'b1;
    blk_edges_op = 0;
    @(posedge clk);
    #1;
    start = 1'b0;
    lo_start = u_dut.lo;
    do begin
      @(posedge clk);
      #1;
    end while (!done);
    checks++;
    if (product !== (2*K)'(x) * (2*K)'(y)) begin
      failures++;
      $display("%h * %h = %h", x, y, product);
    end
    checks++;
    if (blk_edges_op != NBLK * (BLOCK + 1)) begin
      failures++;
      $display("ring blocks got %0d clock edges, expected %0d",
               blk_edges_op, NBLK * (BLOCK + 1));
    end
  endtask

  initial begin
    rst = 1'b0;
    start = 1'b0;
    a = '0;
    b = '0;
    #2 rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1;
    counting = 1;
    for (int i = 0; i < 100; i++) run(K'($urandom), K'($urandom));
    repeat (2) @(posedge clk);
    #1 counting = 0;

    $display("transitions over 100 products (16 x 16 bits):");
    $display("  P_Low latches     %6d", tr_plow);
    $display("  adder output      %6d", tr_adder);
    $display("  MUX1 output       %6d", tr_mux1);
    $display("  ring counter      %6d", tr_ring);
    $display("  Feeder register   %6d", tr_feeder);
    $display("  Bypass register   %6d", tr_bypass);
    $display("  ring block clock edges %0d (ungated ring: %0d flip-flop edges)",
             blk_edges, 100 * K * K);
    // Each latch changes at most once per product.
    checks++;
    if (tr_plow > 100 * K) begin
      failures++;
      $display("P_Low made %0d transitions, more than one per bit and product", tr_plow);
    end
    // The ring counter moves one '1': two bits change per cycle.
    checks++;
    if (tr_ring != 100 * 2 * K) begin
      failures++;
      $display("ring counter made %0d transitions, expected %0d", tr_ring, 100 * 2 * K);
    end
    checks++;
    if (bypass_cycles == 0) begin
      failures++;
      $display("no bypass cycle seen");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
