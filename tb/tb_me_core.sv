// Testbench of the sub-pixel ME architecture (me_core) and its processing
// array: half-pixel accuracy with 4x4, 8x8 and 16x16 blocks and quarter-pixel
// accuracy with 8x8 blocks, random data, power-saving thresholds, results
// and latency checked against a direct SAD model.
module tb_me_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d0, d1, d2, d3;
  int c0, c1, c2, c3, f0, f1, f2, f3;
  int s0, s1, s2, s3, r0, r1, r2, r3, l0, l1, l2, l3, b0, b1, b2, b3;

  me_core_check #(.N(4),  .K(2), .JOBS(8)) u_a (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0),
    .n_stop(s0), .n_right(r0), .n_left(l0), .n_b2b(b0));
  me_core_check #(.N(16), .K(2), .JOBS(6)) u_b (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1),
    .n_stop(s1), .n_right(r1), .n_left(l1), .n_b2b(b1));
  me_core_check #(.N(8),  .K(2), .JOBS(6)) u_d (.clk, .rst_n, .done(d3), .checks(c3), .failures(f3),
    .n_stop(s3), .n_right(r3), .n_left(l3), .n_b2b(b3));
  me_core_check #(.N(8),  .K(4), .JOBS(6)) u_c (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2),
    .n_stop(s2), .n_right(r2), .n_left(l2), .n_b2b(b2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  int checks, failures;
  initial begin
    wait (d0 && d1 && d2 && d3);
    checks   = c0 + c1 + c2 + c3;
    failures = f0 + f1 + f2 + f3;
    // every mechanism must have happened in each configuration
    checks += 3;
    if (s0 == 0 || s1 == 0 || s2 == 0 || s3 == 0) begin failures++; $display("no power-saving stop"); end
    if (r0 == 0 || l0 == 0 || r1 == 0 || l1 == 0 || r2 == 0 || l2 == 0 || r3 == 0 || l3 == 0) begin
      failures++; $display("zig-zag direction missing");
    end
    if (b0 == 0 || b1 == 0 || b2 == 0 || b3 == 0) begin failures++; $display("no back-to-back block"); end
    $display("stops %0d/%0d/%0d right %0d left %0d b2b %0d", s0, s1, s2, r1, l1, b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
