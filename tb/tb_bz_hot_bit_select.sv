// tb_bz_hot_bit_select: self-checking test of multiplexer M1 and the hot-bit
// flip-flop.
//
// For random B operands the ring is stepped through all 16 positions: in
// position n the early output must be B(n+1) (0 in the last position), and
// after each step the registered output must be the bit of the previous
// position. A load must put B(0) of the new operand into the flip-flop, and
// with neither load nor step the flip-flop must hold.
module tb_bz_hot_bit_select;

  localparam int unsigned K = 16;

  logic         clk = 1'b0;
  logic         rst;
  logic         load;
  logic         step;
  logic         b0;
  logic [K-1:0] b;
  logic [K-1:0] ring;
  logic         b_next;
  logic         b_cur;
  int           checks = 0;
  int           failures = 0;

  always #5 clk = ~clk;

  bz_hot_bit_select u_dut (
    .clk_i(clk), .rst_i(rst), .load_i(load), .step_i(step), .b0_i(b0),
    .b_i(b[K-1:1]), .ring_i(ring), .b_next_o(b_next), .b_cur_o(b_cur));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b (b=%h ring=%h)", what, got, exp, b, ring);
    end
  endtask

  initial begin
    rst = 1'b1;
    load = 1'b0;
    step = 1'b0;
    b0 = 1'b0;
    b = '0;
    ring = '0;
    @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 60; t++) begin
      logic [K-1:0] nb;
      nb = (t == 0) ? '1 : (t == 1) ? 16'h0001 : K'($urandom);
      // load the new operand's B(0)
      b0 = nb[0];
      load = 1'b1;
      @(posedge clk);
      #1;
      load = 1'b0;
      b = nb;
      expect_bit(b_cur, nb[0], "after load");
      for (int n = 0; n < K; n++) begin
        logic exp_next;
        ring = K'(1) << n;
        step = 1'b1;
        #1;
        exp_next = (n == K - 1) ? 1'b0 : nb[n + 1];
        expect_bit(b_next, exp_next, "M1 output");
        expect_bit(b_cur, nb[n], "current hot bit");
        @(posedge clk);
        #1;
      end
      // idle: the flip-flop holds
      step = 1'b0;
      ring = K'(1);
      #1;
      begin
        logic held;
        held = b_cur;
        repeat (2) @(posedge clk);
        #1;
        expect_bit(b_cur, held, "hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
