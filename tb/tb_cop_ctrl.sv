// Testbench of cop_ctrl: commands are accepted only when idle, the ME start
// waits until both buffers hold the bank in use, the result is K*IPA +
// displacement with the SAD and stop flag passed through, and the bank is
// freed and switched after each job.
module tb_cop_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              ipa_valid, ipa_ready, rd_bank, rel, me_start, mv_valid, mv_over;
  logic              spa_valid, spa_over;
  logic signed [7:0] ipa_mvx, ipa_mvy;
  logic [15:0]       ipa_sad, int_sad, mv_sad, spa_sad;
  logic [1:0]        sa_full, ra_full;
  logic signed [1:0] mv_hc, mv_vc;
  logic signed [9:0] spa_mvx, spa_mvy;
  int checks = 0, failures = 0;

  cop_ctrl #(.SW(16), .CW(2), .K(2), .MVW(8)) dut (
    .clk, .rst_n, .ipa_valid, .ipa_ready, .ipa_mvx, .ipa_mvy, .ipa_sad,
    .sa_full, .ra_full, .rd_bank, .rel, .me_start, .int_sad,
    .mv_valid, .mv_hc, .mv_vc, .mv_sad, .mv_over,
    .spa_valid, .spa_mvx, .spa_mvy, .spa_sad, .spa_over
  );

  initial begin
    ipa_valid = 0; ipa_mvx = '0; ipa_mvy = '0; ipa_sad = '0;
    sa_full = '0; ra_full = '0; mv_valid = 0; mv_hc = '0; mv_vc = '0; mv_sad = '0; mv_over = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 20; j++) begin
      int mx, my, hc, vc, bank;
      bank = j % 2;
      mx = int'($urandom_range(0, 200)) - 100; my = int'($urandom_range(0, 200)) - 100;
      hc = int'($urandom_range(0, 2)) - 1;     vc = int'($urandom_range(0, 2)) - 1;
      checks++; if (!ipa_ready || int'(rd_bank) != bank) begin failures++; $display("not ready"); end
      ipa_valid = 1; ipa_mvx = 8'(mx); ipa_mvy = 8'(my); ipa_sad = 16'(j * 100);
      @(negedge clk);
      ipa_valid = 0;
      // only one of the buffers ready: no start
      sa_full[bank] = 1;
      repeat (3) begin
        @(negedge clk);
        checks++; if (me_start) begin failures++; $display("early start"); end
      end
      ra_full[bank] = 1;
      @(negedge clk);
      checks++; if (!me_start || int'(int_sad) != j * 100) begin failures++; $display("no start"); end
      repeat (5) @(negedge clk);
      mv_valid = 1; mv_hc = 2'(hc); mv_vc = 2'(vc); mv_sad = 16'(j); mv_over = j[0];
      #1;
      checks++; if (!rel) begin failures++; $display("no release"); end
      @(negedge clk);
      mv_valid = 0;
      sa_full[bank] = 0; ra_full[bank] = 0;
      checks++;
      if (!spa_valid || int'(spa_mvx) != 2 * mx + hc || int'(spa_mvy) != 2 * my + vc ||
          int'(spa_sad) != j || spa_over !== j[0]) begin
        failures++; $display("job %0d: (%0d,%0d) expected (%0d,%0d)", j, spa_mvx, spa_mvy, 2*mx+hc, 2*my+vc);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
