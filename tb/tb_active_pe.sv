// Testbench of active_pe: streams of random reference/search pixels are
// accumulated and compared with a plain SAD sum each cycle; with a
// threshold the PE must stop, report the threshold and raise over. Also
// checks the SA move path and a full-range 256-cycle sum (every pixel
// difference 255) that exercises the carry-save upper-part incrementer.
module tb_active_pe;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sa_op_e      op;
  logic [7:0]  s_down, s_lin, s_rin, s, r_in;
  logic        acc_clr, acc_en, over;
  logic [15:0] int_sad, sad;
  int checks = 0, failures = 0, n_stop = 0;

  active_pe #(.W(8), .N(16)) dut (
    .clk, .rst_n, .op, .s_down, .s_lin, .s_rin, .s, .r_in,
    .acc_clr, .acc_en, .int_sad, .sad, .over
  );

  task automatic run(int thr, int mode);
    int ref_sum, prev_r, prev_s;
    @(negedge clk);
    acc_clr = 1; int_sad = 16'(thr); acc_en = 0;
    op = SA_UP; s_down = 8'($urandom); r_in = 8'($urandom);
    @(negedge clk);
    acc_clr = 0;
    ref_sum = 0;
    for (int i = 0; i < 256; i++) begin
      // registers now hold the pixels driven one cycle ago
      prev_r = int'(dut.r); prev_s = int'(s);
      acc_en = 1;
      op = SA_UP;
      if (mode == 1) begin s_down = (i % 2 == 0) ? 8'd0 : 8'd255; r_in = ~s_down; end
      else begin s_down = 8'($urandom); r_in = 8'($urandom); end
      @(negedge clk);
      ref_sum += (prev_r > prev_s) ? prev_r - prev_s : prev_s - prev_r;
      checks++;
      if (ref_sum > thr) begin
        n_stop++;
        if (sad !== 16'(thr) || over !== 1'b1) begin
          failures++; $display("stop: sad %0d over %0d thr %0d", sad, over, thr);
        end
      end else if (sad !== 16'(ref_sum) || over !== 1'b0) begin
        failures++; $display("cycle %0d: sad %0d expected %0d", i, sad, ref_sum);
      end
    end
    acc_en = 0;
  endtask

  initial begin
    op = SA_HOLD; s_down = '0; s_lin = '0; s_rin = '0; r_in = '0;
    acc_clr = 0; acc_en = 0; int_sad = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(65535, 0);
    run(65535, 1);    // 256 x 255 = 65280
    run(3000, 0);
    run(20000, 0);
    // SA move path through the PE
    @(negedge clk);
    op = SA_RIGHT; s_lin = 8'h5a;
    @(negedge clk);
    op = SA_LEFT; s_rin = 8'ha5;
    checks++; if (s !== 8'h5a) failures++;
    @(negedge clk);
    op = SA_HOLD;
    checks++; if (s !== 8'ha5) failures++;
    checks++; if (n_stop == 0) begin failures++; $display("threshold never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
