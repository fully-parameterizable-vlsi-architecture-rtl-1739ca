// Testbench of cmp_tree: nine leaves (half-pixel search) and 49 leaves
// (quarter-pixel), random keys with forced ties, a new set every cycle;
// each result must appear clog2(M) cycles later and be the first minimum.
module tb_cmp_tree;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int M1 = 9, M2 = 49;
  logic        v1, v2, ov1, ov2;
  logic [16:0] k1 [M1], k2 [M2], ok1, ok2;
  logic [2:0]  h1 [M1], vv1 [M1], h2 [M2], vv2 [M2], oh1, ovc1, oh2, ovc2;
  int checks = 0, failures = 0;

  cmp_tree #(.M(M1), .KW(17), .CW(3)) dut1 (.clk, .rst_n, .in_valid(v1), .key(k1), .hc(h1), .vc(vv1),
    .out_valid(ov1), .out_key(ok1), .out_hc(oh1), .out_vc(ovc1));
  cmp_tree #(.M(M2), .KW(17), .CW(3)) dut2 (.clk, .rst_n, .in_valid(v2), .key(k2), .hc(h2), .vc(vv2),
    .out_valid(ov2), .out_key(ok2), .out_hc(oh2), .out_vc(ovc2));

  // expected results queued per cycle
  int q1k [$], q1i [$], q2k [$], q2i [$];

  initial begin
    v1 = 0; v2 = 0;
    for (int i = 0; i < M1; i++) begin k1[i] = '0; h1[i] = 3'(i % 7); vv1[i] = 3'(i / 7); end
    for (int i = 0; i < M2; i++) begin k2[i] = '0; h2[i] = 3'(i % 7); vv2[i] = 3'(i / 7); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int bi, bk;
      v1 = 1; v2 = 1;
      for (int i = 0; i < M1; i++) k1[i] = 17'($urandom_range(0, (t % 3 == 0) ? 3 : 100000));
      for (int i = 0; i < M2; i++) k2[i] = 17'($urandom_range(0, (t % 3 == 0) ? 3 : 100000));
      bi = 0; bk = int'(k1[0]);
      for (int i = 1; i < M1; i++) if (int'(k1[i]) < bk) begin bk = int'(k1[i]); bi = i; end
      q1k.push_back(bk); q1i.push_back(bi);
      bi = 0; bk = int'(k2[0]);
      for (int i = 1; i < M2; i++) if (int'(k2[i]) < bk) begin bk = int'(k2[i]); bi = i; end
      q2k.push_back(bk); q2i.push_back(bi);
      @(negedge clk);
    end
    v1 = 0; v2 = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (q1k.size() != 0 || q2k.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, first1 = -1, first2 = -1;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    if (rst_n && ov1) begin
      int ek, ei;
      if (first1 < 0) first1 = cyc;
      ek = q1k.pop_front(); ei = q1i.pop_front();
      checks++;
      if (int'(ok1) != ek || oh1 != 3'(ei % 7) || ovc1 != 3'(ei / 7)) begin
        failures++; $display("M=9: got %0d expected %0d (%0d)", ok1, ek, ei);
      end
    end
    if (rst_n && ov2) begin
      int ek, ei;
      if (first2 < 0) begin
        first2 = cyc;
        checks++;
        // 9 leaves: 4 levels, 49 leaves: 6 levels
        if (first2 - first1 != 2) begin failures++; $display("latency mismatch"); end
      end
      ek = q2k.pop_front(); ei = q2i.pop_front();
      checks++;
      if (int'(ok2) != ek || oh2 != 3'(ei % 7) || ovc2 != 3'(ei / 7)) begin
        failures++; $display("M=49: got %0d expected %0d (%0d)", ok2, ek, ei);
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
