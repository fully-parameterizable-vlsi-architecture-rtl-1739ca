// Testbench of interp_unit: half-pixel lines (K = 2) against the explicit
// rules (a+b+1)>>1 and (a+b+c+d+2)>>2, and quarter-pixel lines (K = 4)
// against the bilinear weights computed in the testbench.
module tb_interp_unit;
  localparam int N = 16, L2 = 2 * (N + 1) - 1, L4 = 4 * (N + 1) - 1;
  logic [7:0] top [N+2], bot [N+2];
  logic [7:0] l2 [2][L2], l4 [4][L4];
  int checks = 0, failures = 0;

  interp_unit #(.W(8), .N(N), .K(2)) dut2 (.top, .bot, .lines(l2));
  interp_unit #(.W(8), .N(N), .K(4)) dut4 (.top, .bot, .lines(l4));

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int x = 0; x < N + 2; x++) begin
        top[x] = 8'($urandom); bot[x] = 8'($urandom);
        if (t == 0) begin top[x] = 8'hff; bot[x] = 8'hff; end
      end
      #1;
      for (int c = 0; c < L2; c++) begin
        int x, e0, e1;
        x = (c + 1) / 2;
        if ((c + 1) % 2 == 0) begin
          e0 = top[x];
          e1 = (int'(top[x]) + int'(bot[x]) + 1) >> 1;
        end else begin
          e0 = (int'(top[x]) + int'(top[x+1]) + 1) >> 1;
          e1 = (int'(top[x]) + int'(top[x+1]) + int'(bot[x]) + int'(bot[x+1]) + 2) >> 2;
        end
        checks++;
        if (int'(l2[0][c]) != e0 || int'(l2[1][c]) != e1) begin
          failures++; $display("K=2 col %0d: %0d %0d expected %0d %0d", c, l2[0][c], l2[1][c], e0, e1);
        end
      end
      for (int s = 0; s < 4; s++)
        for (int c = 0; c < L4; c++) begin
          int x, fx, b1, e;
          x = (c + 1) / 4; fx = (c + 1) % 4;
          b1 = (x + 1 < N + 2) ? x + 1 : x;
          e = ((4 - fx) * (4 - s) * int'(top[x]) + fx * (4 - s) * int'(top[b1]) +
               (4 - fx) * s * int'(bot[x]) + fx * s * int'(bot[b1]) + 8) / 16;
          checks++;
          if (int'(l4[s][c]) != e) begin
            failures++; $display("K=4 line %0d col %0d: %0d expected %0d", s, c, l4[s][c], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
