// tb_bz_fad_multiplier: end-to-end test of the BZ-FAD multiplier at its
// default size (16 x 16 bits, ring-counter blocks of 4).
//
// Runs corner operands, 100 uniformly random operand pairs and 100 pairs
// drawn from an approximately normal distribution (sum of four uniform
// numbers, centred on mid-range), some of them back to back with start
// given in the cycle done is high. Each product is compared with a*b
// computed here, the latency from start to done is checked to be exactly 16
// cycles, a start while busy must be ignored, and every cycle at most two
// ring-counter blocks may receive clock pulses. The testbench also counts
// how often each mechanism of the architecture happened (bypassed cycles,
// adding cycles, adder carry out, Feeder and Bypass loads, every P_Low latch
// written, ring-counter block hand-overs, ignored start) and counts a
// failure for any that never did. Finally a reset in the middle of a
// product must leave the multiplier idle and ready for a correct product.
module tb_bz_fad_multiplier;

  localparam int unsigned K = 16;

  logic           clk = 1'b0;
  logic           rst;
  logic           start;
  logic [K-1:0]   a;
  logic [K-1:0]   b;
  logic           ready;
  logic           busy;
  logic           done;
  logic [2*K-1:0] product;
  logic [3:0]     rc_open;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  bz_fad_multiplier u_dut (
    .clk_i        (clk),
    .rst_i        (rst),
    .start_i      (start),
    .a_i          (a),
    .b_i          (b),
    .ready_o      (ready),
    .busy_o       (busy),
    .done_o       (done),
    .product_o    (product),
    .rc_blk_open_o(rc_open)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ------------------------------------------------
  int n_bypass_cycles = 0;
  int n_add_cycles = 0;
  int n_carry_out = 0;
  int n_feeder_loads = 0;
  int n_bypass_loads = 0;
  int n_handover = 0;
  int n_ignored_start = 0;
  logic [K-1:0] latch_written = '0;

  always @(posedge clk) if (!rst && busy) begin
    if (u_dut.b_cur) begin
      n_add_cycles++;
      if (u_dut.u_dp.sum[K]) n_carry_out++;
    end else begin
      n_bypass_cycles++;
    end
    if (u_dut.b_next) n_feeder_loads++;
    else              n_bypass_loads++;
    latch_written |= u_dut.ring;
    if ($countones(rc_open) == 2) n_handover++;
  end

  // At most two ring-counter blocks clocked at any time, and the block
  // holding the hot bit is one of them.
  always @(negedge clk) if (!rst) begin
    checks++;
    if ($countones(rc_open) > 2 || (rc_open & blk_of_ring(u_dut.ring)) == '0) begin
      failures++;
      $display("ring blocks open %b, ring %h", rc_open, u_dut.ring);
    end
  end

  function automatic logic [3:0] blk_of_ring(logic [K-1:0] r);
    logic [3:0] m = '0;
    for (int i = 0; i < K; i++) if (r[i]) m[i / 4] = 1'b1;
    return m;
  endfunction

  // ---- stimulus ----------------------------------------------------------
  // Run one multiplication. Called right after another one, it gives start
  // in the cycle in which the previous done is high.
  task automatic run(input logic [K-1:0] x, input logic [K-1:0] y);
    int cycles;
    checks++;
    if (!ready) begin
      failures++;
      $display("not ready before start");
    end
    a = x;
    b = y;
    start = 1'b1;
    @(posedge clk);
    #1;
    start = 1'b0;
    a = ~x;           // operands may change once loaded
    b = ~y;
    cycles = 0;
    do begin
      @(posedge clk);
      #1;
      cycles++;
      if (cycles == 3 && (x[0] ^ y[1])) begin
        // a start while busy must be ignored
        start = 1'b1;
        n_ignored_start++;
      end else begin
        start = 1'b0;
      end
    end while (!done && cycles < 4 * K);
    #1;
    checks++;
    if (cycles != K) begin
      failures++;
      $display("latency %0d cycles, expected %0d", cycles, K);
    end
    checks++;
    if (product !== (2*K)'(x) * (2*K)'(y)) begin
      failures++;
      $display("%h * %h = %h, expected %h", x, y, product, (2*K)'(x) * (2*K)'(y));
    end
  endtask

  function automatic logic [K-1:0] normal_operand();
    int unsigned s = 0;
    for (int i = 0; i < 4; i++) s += $urandom_range(0, (1 << K) - 1);
    return K'(s / 4);
  endfunction

  initial begin
    rst = 1'b0;
    start = 1'b0;
    #2 rst = 1'b1;
    a = '0;
    b = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk);
    #1;

    run('0, '0);
    run('1, '1);
    run(16'h0001, 16'hffff);
    run(16'hffff, 16'h0001);
    run(16'haaaa, 16'h5555);
    run(16'h5555, 16'haaaa);
    run(16'h8000, 16'h8000);
    run(16'h1234, 16'h0000);
    @(posedge clk);
    #1;
    for (int i = 0; i < 100; i++) begin
      run(K'($urandom), K'($urandom));
      if (i % 3 == 0) begin
        @(posedge clk);
        #1;
      end
    end
    for (int i = 0; i < 100; i++) run(normal_operand(), normal_operand());

    // result must stay valid while idle
    begin
      logic [2*K-1:0] held;
      held = product;
      repeat (5) @(posedge clk);
      checks++;
      if (product !== held) begin
        failures++;
        $display("product changed while idle");
      end
    end

    // reset in the middle of a product, then a normal product
    a = 16'hbeef;
    b = 16'hcafe;
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    repeat (7) @(posedge clk);
    #1 rst = 1'b1;
    @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (!ready || busy) begin
      failures++;
      $display("not idle after reset");
    end
    run(16'h1357, 16'h9bdf);

    $display("bypass cycles %0d, add cycles %0d, carry out %0d",
             n_bypass_cycles, n_add_cycles, n_carry_out);
    $display("feeder loads %0d, bypass loads %0d, ring hand-overs %0d, ignored starts %0d",
             n_feeder_loads, n_bypass_loads, n_handover, n_ignored_start);
    checks++; if (n_bypass_cycles == 0) begin failures++; $display("no bypass cycle"); end
    checks++; if (n_add_cycles == 0)    begin failures++; $display("no add cycle"); end
    checks++; if (n_carry_out == 0)     begin failures++; $display("no carry out"); end
    checks++; if (n_feeder_loads == 0)  begin failures++; $display("no feeder load"); end
    checks++; if (n_bypass_loads == 0)  begin failures++; $display("no bypass load"); end
    checks++; if (n_handover == 0)      begin failures++; $display("no ring hand-over"); end
    checks++; if (n_ignored_start == 0) begin failures++; $display("no ignored start"); end
    checks++; if (latch_written != '1)  begin failures++; $display("latches written %b", latch_written); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
