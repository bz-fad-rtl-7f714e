// tb_bz_feeder_bypass: self-checking test of the Feeder/Bypass datapath.
//
// The testbench plays the role of the ring counter and M1: for each
// operand pair it clears the registers and then, in cycle n, drives
// B(n) and B(n+1). It keeps its own shift-and-add partial product and
// checks every cycle that MUX1 delivers it (PP, K+1 bits), that PP(0) is
// product bit n, that the adder's Feeder input does not change in a cycle
// following a bypass decision, and at the end that the Bypass register
// holds the upper half of a*b. Corner operands and 200 random pairs.
module tb_bz_feeder_bypass;

  localparam int unsigned K = 16;

  logic         clk = 1'b0;
  logic         rst;
  logic         clear;
  logic         step;
  logic [K-1:0] a;
  logic         b_cur;
  logic         b_next;
  logic [K:0]   pp;
  logic         pp0;
  logic [K-1:0] hi;
  int           checks = 0;
  int           failures = 0;

  always #5 clk = ~clk;

  bz_feeder_bypass u_dut (
    .clk_i(clk), .rst_i(rst), .clear_i(clear), .step_i(step), .a_i(a),
    .b_cur_i(b_cur), .b_next_i(b_next), .pp_o(pp), .pp0_o(pp0), .hi_o(hi));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [K-1:0] x, input logic [K-1:0] y);
    logic [K-1:0]   ref_hi;
    logic [K:0]     ref_pp;
    logic [2*K-1:0] full;
    ref_hi = '0;
    full = (2*K)'(x) * (2*K)'(y);
    a = x;
    clear = 1'b1;
    step = 1'b0;
    @(posedge clk);
    #1;
    clear = 1'b0;
    step = 1'b1;
    for (int n = 0; n < K; n++) begin
      b_cur = y[n];
      b_next = (n == K - 1) ? 1'b0 : y[n + 1];
      #1;
      ref_pp = y[n] ? (K+1)'(ref_hi) + (K+1)'(x) : (K+1)'(ref_hi);
      checks++;
      if (pp !== ref_pp) begin
        failures++;
        $display("%h*%h cycle %0d: PP=%h expected %h", x, y, n, pp, ref_pp);
      end
      checks++;
      if (pp0 !== full[n]) begin
        failures++;
        $display("%h*%h cycle %0d: PP(0)=%b expected %b", x, y, n, pp0, full[n]);
      end
      ref_hi = ref_pp[K:1];
      begin
        logic [K-1:0] feeder_before;
        feeder_before = u_dut.feeder;
        @(posedge clk);
        #1;
        if (!b_next) begin
          checks++;
          if (u_dut.feeder !== feeder_before) begin
            failures++;
            $display("Feeder changed before a bypass cycle");
          end
        end
      end
    end
    step = 1'b0;
    checks++;
    if (hi !== full[2*K-1:K]) begin
      failures++;
      $display("%h*%h: high half %h expected %h", x, y, hi, full[2*K-1:K]);
    end
  endtask

  initial begin
    rst = 1'b1;
    clear = 1'b0;
    step = 1'b0;
    a = '0;
    b_cur = 1'b0;
    b_next = 1'b0;
    @(posedge clk);
    #1 rst = 1'b0;
    run('1, '1);
    run(16'h0001, 16'h8000);
    run(16'h8000, 16'h0001);
    run(16'h0000, 16'hffff);
    run(16'hffff, 16'h0000);
    for (int i = 0; i < 200; i++) run(K'($urandom), K'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
