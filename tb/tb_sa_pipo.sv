// Testbench of sa_pipo: captured lines must appear on the bottom outputs
// with the column reversal and the rotation selected by rot, and must be
// held until the next fill.
module tb_sa_pipo;
  localparam int N = 8, K = 2, L = K * (N + 1) - 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       fill, rot;
  logic [7:0] line_in [K][L], bottom [K][L], saved [K][L];
  int checks = 0, failures = 0;

  sa_pipo #(.W(8), .N(N), .K(K)) dut (.clk, .rst_n, .fill, .line_in, .rot, .bottom);

  initial begin
    fill = 0; rot = 0;
    for (int s = 0; s < K; s++) for (int c = 0; c < L; c++) line_in[s][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      fill = 1;
      for (int s = 0; s < K; s++) for (int c = 0; c < L; c++) begin
        line_in[s][c] = 8'($urandom); saved[s][c] = line_in[s][c];
      end
      @(negedge clk);
      fill = 0;
      for (int s = 0; s < K; s++) for (int c = 0; c < L; c++) line_in[s][c] = 8'($urandom);
      for (int rr = 0; rr < 2; rr++) begin
        rot = rr[0];
        #1;
        for (int s = 0; s < K; s++)
          for (int c = 0; c < L; c++) begin
            // sample index placed at column c: 2K-2 - c (+ K(N-1) when rotated), mod L
            int idx;
            idx = (2 * K - 2 - c + rr * K * (N - 1)) % L;
            if (idx < 0) idx += L;
            checks++;
            if (bottom[s][c] !== saved[s][idx]) begin
              failures++; $display("rot %0d line %0d col %0d", rr, s, c);
            end
          end
        @(negedge clk);
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
