// tb_bz_hb_ring_counter_sizes: the Hot Block ring counter at every size of
// the published power comparison: 16, 32, 48 and 64 bits, each with blocks
// of 4, 6 and 8 flip-flops (6 leaves a shorter leftmost block for 16, 32
// and 64 bits). Each counter is checked every cycle against a reference
// position (one-hot output) and against the expected set of clocked blocks
// for several full turns, then reset once and checked again. Over each
// full turn the blocks together must receive exactly WIDTH + (number of
// blocks) clock edges: each block one per bit plus the one that moves the
// '1' out (an ungated ring would clock WIDTH flip-flops WIDTH times).
module tb_bz_hb_ring_counter_sizes;

  logic clk = 1'b0;
  logic rst;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One device under test per configuration, each with its own checker.
  `define RC_DUT(NAME, W, B)                                                   \
    logic [W-1:0]             NAME``_q;                                        \
    logic [(W+B-1)/B-1:0]     NAME``_open;                                     \
    int unsigned              NAME``_pos;                                      \
    int unsigned              NAME``_edges;                                    \
    int unsigned              NAME``_turns;                                    \
    bit                       NAME``_moved;                                    \
    bz_hb_ring_counter #(.WIDTH(W), .BLOCK(B)) u_``NAME (                      \
      .clk_i(clk), .rst_i(rst), .q_o(NAME``_q), .blk_open_o(NAME``_open));     \
    always @(negedge clk) if (!rst) begin                                      \
      logic [(W+B-1)/B-1:0] exp_open;                                          \
      checks++;                                                                \
      if (NAME``_q !== (W)'(1) << NAME``_pos) begin                            \
        failures++;                                                            \
        $display("%s: q=%h expected bit %0d", `"NAME`", NAME``_q, NAME``_pos); \
      end                                                                      \
      exp_open = '0;                                                           \
      exp_open[NAME``_pos / (B)] = 1'b1;                                       \
      if (NAME``_pos % (B) == (B) - 1 || NAME``_pos == (W) - 1)                \
        exp_open[((NAME``_pos + 1) % (W)) / (B)] = 1'b1;                       \
      checks++;                                                                \
      if (NAME``_open !== exp_open) begin                                      \
        failures++;                                                            \
        $display("%s: open=%b expected %b at bit %0d", `"NAME`", NAME``_open,  \
                 exp_open, NAME``_pos);                                        \
      end                                                                      \
    end                                                                        \
    always @(posedge clk)                                                      \
      if (rst) NAME``_pos <= 0;                                                \
      else     NAME``_pos <= (NAME``_pos + 1) % (W);                           \
    for (genvar j = 0; j < (W+B-1)/B; j++) begin : g_``NAME``_edges            \
      always @(posedge u_``NAME.blk_clk[j]) if (!rst) NAME``_edges++;           \
    end                                                                        \
    /* one full turn: every block gets its own length + 1 clock edges */       \
    always @(negedge clk)                                                      \
      if (rst) begin                                                           \
        NAME``_edges = 0;                                                      \
        NAME``_moved = 0;                                                      \
      end else if (NAME``_pos != 0) begin                                      \
        NAME``_moved = 1;                                                      \
      end else if (NAME``_moved) begin                                         \
        checks++;                                                              \
        NAME``_turns++;                                                        \
        if (NAME``_edges != (W) + (W+B-1)/B) begin                             \
          failures++;                                                          \
          $display("%s: %0d block clock edges in a turn, expected %0d",        \
                   `"NAME`", NAME``_edges, (W) + (W+B-1)/B);                   \
        end                                                                    \
        NAME``_edges = 0;                                                      \
      end

  `RC_DUT(r16b4, 16, 4)
  `RC_DUT(r16b6, 16, 6)
  `RC_DUT(r16b8, 16, 8)
  `RC_DUT(r32b4, 32, 4)
  `RC_DUT(r32b6, 32, 6)
  `RC_DUT(r32b8, 32, 8)
  `RC_DUT(r48b4, 48, 4)
  `RC_DUT(r48b6, 48, 6)
  `RC_DUT(r48b8, 48, 8)
  `RC_DUT(r64b4, 64, 4)
  `RC_DUT(r64b6, 64, 6)
  `RC_DUT(r64b8, 64, 8)

  initial begin
    rst = 1'b0;
    #2 rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (200) @(posedge clk);
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    repeat (140) @(posedge clk);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
