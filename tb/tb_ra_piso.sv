// Testbench of ra_piso: lines loaded every N cycles must come out of all
// 2K-1 output registers as one gap-free stream, px[N-1] first.
module tb_ra_piso;
  localparam int N = 16, R = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       load;
  logic [7:0] px [N], rpx [R];
  int checks = 0, failures = 0;
  int exp_q [$];

  ra_piso #(.W(8), .N(N), .R(R)) dut (.clk, .rst_n, .load, .px, .rpx);

  initial begin
    load = 0;
    for (int m = 0; m < N; m++) px[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int line = 0; line < 12; line++) begin
      for (int i = 0; i < N; i++) begin
        load = (i == 0);
        if (i == 0) for (int m = 0; m < N; m++) begin
          px[m] = 8'($urandom);
        end
        if (i == 0) for (int m = N - 1; m >= 0; m--) exp_q.push_back(int'(px[m]));
        @(negedge clk);
        // other cycles: the bus carries unrelated data
        for (int m = 0; m < N; m++) px[m] = 8'($urandom);
        checks++;
        begin
          int e;
          e = exp_q.pop_front();
          for (int q = 0; q < R; q++)
            if (int'(rpx[q]) != e) begin
              failures++; $display("line %0d pix %0d reg %0d: %0d expected %0d", line, i, q, rpx[q], e);
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
