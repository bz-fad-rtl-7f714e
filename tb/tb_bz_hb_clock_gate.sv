// tb_bz_hb_clock_gate: self-checking test of the Hot Block clock gator.
//
// Drives Entrance and Exit the way neighbouring ring-counter flip-flops do
// (changing just after a rising clock edge) and checks, at both clock
// phases, that the gator is closed (clk_o held at '1') until Entrance
// rises, open (clk_o following the clock) from then until Exit rises, and
// closed again afterwards. Rising edges on clk_o are counted and must equal
// the number of clock edges in the open window exactly, so an extra edge at
// opening or closing is caught. Both reset values are tested, and a reset
// while open must close the gator.
module tb_bz_hb_clock_gate;

  logic clk = 1'b0;
  logic rst;
  logic entrance;
  logic exit_s;
  logic gclk0, gclk1;
  logic open0, open1;
  int   checks = 0;
  int   failures = 0;
  int   edges0 = 0;
  int   edges1 = 0;

  always #5 clk = ~clk;

  bz_hb_clock_gate #(.RESET_OPEN(1'b0)) u_cg0 (
    .clk_n_i(~clk), .rst_i(rst), .entrance_i(entrance), .exit_i(exit_s),
    .clk_o(gclk0), .open_o(open0));

  bz_hb_clock_gate #(.RESET_OPEN(1'b1)) u_cg1 (
    .clk_n_i(~clk), .rst_i(rst), .entrance_i(1'b0), .exit_i(exit_s),
    .clk_o(gclk1), .open_o(open1));

  always @(posedge gclk0) edges0++;
  always @(posedge gclk1) edges1++;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Check the gator state in the middle of both clock phases.
  task automatic expect_state(input logic exp_open0, input logic exp_open1,
                              input string what);
    for (int ph = 0; ph < 2; ph++) begin
      checks++;
      if (open0 !== exp_open0 || gclk0 !== (exp_open0 ? clk : 1'b1)) begin
        failures++;
        $display("%s: cg0 open=%b clk_o=%b clk=%b", what, open0, gclk0, clk);
      end
      checks++;
      if (open1 !== exp_open1 || gclk1 !== (exp_open1 ? clk : 1'b1)) begin
        failures++;
        $display("%s: cg1 open=%b clk_o=%b clk=%b", what, open1, gclk1, clk);
      end
      if (ph == 0) #4;
    end
  endtask

  // Advance to 1 time unit after the next rising clock edge.
  task automatic next_edge();
    @(posedge clk);
    #1;
  endtask

  initial begin
    rst = 1'b0;
    entrance = 1'b0;
    exit_s = 1'b0;
    #1 rst = 1'b1;
    next_edge();
    #2 expect_state(1'b0, 1'b1, "in reset");
    next_edge();
    rst = 1'b0;
    edges0 = 0;
    edges1 = 0;
    #2 expect_state(1'b0, 1'b1, "after reset");
    repeat (3) begin
      next_edge();
      #2 expect_state(1'b0, 1'b1, "closed, waiting");
    end
    checks++;
    if (edges0 != 0) begin
      failures++;
      $display("closed gator passed %0d edges", edges0);
    end

    // '1' about to enter: Entrance rises after an edge.
    next_edge();
    entrance = 1'b1;
    edges0 = 0;
    #2 expect_state(1'b1, 1'b1, "entrance");
    // '1' inside the block for four cycles.
    next_edge();
    entrance = 1'b0;
    #2 expect_state(1'b1, 1'b1, "hot 0");
    repeat (3) begin
      next_edge();
      #2 expect_state(1'b1, 1'b1, "hot");
    end
    // '1' has left: Exit rises after an edge.
    next_edge();
    exit_s = 1'b1;
    #2 expect_state(1'b0, 1'b0, "exit");
    next_edge();
    exit_s = 1'b0;
    #2 expect_state(1'b0, 1'b0, "closed again");
    repeat (2) begin
      next_edge();
      #2 expect_state(1'b0, 1'b0, "closed again");
    end
    // Rising edges that reached the block: the four after Entrance rose
    // and the one that moved the '1' out (Exit rises after it).
    checks++;
    if (edges0 != 5) begin
      failures++;
      $display("open window passed %0d edges, expected 5", edges0);
    end

    // Reset while open.
    next_edge();
    entrance = 1'b1;
    next_edge();
    entrance = 1'b0;
    #2 expect_state(1'b1, 1'b0, "reopened");
    next_edge();
    rst = 1'b1;
    #2 expect_state(1'b0, 1'b1, "reset while open");
    rst = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
