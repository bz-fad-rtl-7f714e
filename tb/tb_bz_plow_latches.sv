// tb_bz_plow_latches: self-checking test of the P_Low latches (M2).
//
// The ring is stepped through all 16 positions at the rising clock edge, as
// the ring counter does, and PP(0) is given a random value just after each
// edge; midway through each cycle it is flipped once more so that only the
// value present at the end of the cycle counts. After 16 cycles the latches
// must hold the last value of each cycle. While en_i is low the latches
// must hold, whatever PP(0) and the ring do.
module tb_bz_plow_latches;

  localparam int unsigned K = 16;

  logic         clk = 1'b0;
  logic         en;
  logic [K-1:0] ring;
  logic         pp0;
  logic [K-1:0] p_low;
  int           checks = 0;
  int           failures = 0;

  always #5 clk = ~clk;

  bz_plow_latches u_dut (
    .clk_i(clk), .en_i(en), .ring_i(ring), .pp0_i(pp0), .p_low_o(p_low));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0;
    ring = K'(1);
    pp0 = 1'b0;
    @(posedge clk);
    for (int t = 0; t < 100; t++) begin
      logic [K-1:0] expv;
      logic [K-1:0] held;
      #1;
      en = 1'b1;
      for (int n = 0; n < K; n++) begin
        ring = K'(1) << n;
        pp0 = 1'($urandom);
        #2;
        pp0 = ~pp0;                 // an early value that must be overwritten
        #4;                         // clock is low now: latch n is open
        pp0 = 1'($urandom);
        expv[n] = pp0;
        @(posedge clk);
        #1;
      end
      en = 1'b0;
      ring = K'(1);
      checks++;
      if (p_low !== expv) begin
        failures++;
        $display("p_low %h expected %h", p_low, expv);
      end
      // idle: hold
      held = p_low;
      repeat (3) begin
        pp0 = ~pp0;
        ring = K'(1) << $urandom_range(0, K - 1);
        @(posedge clk);
        #1;
      end
      checks++;
      if (p_low !== held) begin
        failures++;
        $display("p_low changed while idle: %h, was %h", p_low, held);
      end
      ring = K'(1);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
