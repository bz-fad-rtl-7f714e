// tb_bz_rca: self-checking test of the ripple carry adder.
//
// A 4-bit instance is checked exhaustively; the 16-bit default instance
// with corner cases (all-ones + 1, carry through every bit) and 5000 random
// pairs. Expected sums are computed with the testbench's own '+'.
module tb_bz_rca;

  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4;
  logic [4:0]  s4;
  logic [15:0] a16, b16;
  logic [16:0] s16;

  bz_rca #(.K(4)) u_rca4 (.a_i(a4), .b_i(b4), .sum_o(s4));
  bz_rca          u_rca16 (.a_i(a16), .b_i(b16), .sum_o(s16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    a16 = x;
    b16 = y;
    #1;
    checks++;
    if (s16 !== 17'(x) + 17'(y)) begin
      failures++;
      $display("%h + %h = %h", x, y, s16);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (s4 !== 5'(i + j)) begin
          failures++;
          $display("%0d + %0d = %0d", i, j, s4);
        end
      end
    end
    check16(16'hffff, 16'h0001);
    check16(16'hffff, 16'hffff);
    check16(16'h0000, 16'h0000);
    check16(16'h8000, 16'h8000);
    check16(16'h7fff, 16'h0001);
    for (int i = 0; i < 5000; i++) check16(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
