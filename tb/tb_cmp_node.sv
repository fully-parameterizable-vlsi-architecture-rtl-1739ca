// Testbench of cmp_node: random and edge-case key pairs; the registered
// output must be the smaller key with its coordinates, ties keeping a.
module tb_cmp_node;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [16:0] ka, kb, kq;
  logic [1:0]  ha, va, hb, vb, hq, vq;
  int checks = 0, failures = 0;

  cmp_node #(.KW(17), .CW(2)) dut (
    .clk, .rst_n, .en (1'b1),
    .key_a (ka), .hc_a (ha), .vc_a (va),
    .key_b (kb), .hc_b (hb), .vc_b (vb),
    .key_q (kq), .hc_q (hq), .vc_q (vq)
  );

  initial begin
    logic [16:0] ek;
    logic [1:0]  eh, ev;
    ka = '0; kb = '0; ha = 0; va = 0; hb = 0; vb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      ka = 17'($urandom); kb = 17'($urandom);
      if (i % 5 == 0) kb = ka;
      if (i % 7 == 0) kb = ka ^ 17'(1 << $urandom_range(0, 16));
      if (i == 1) begin ka = '1; kb = '0; end
      if (i == 2) begin ka = '0; kb = '1; end
      ha = 2'($urandom); va = 2'($urandom); hb = ~ha; vb = ~va;
      if (kb < ka) begin ek = kb; eh = hb; ev = vb; end
      else         begin ek = ka; eh = ha; ev = va; end
      @(negedge clk);
      checks++;
      if (kq !== ek || hq !== eh || vq !== ev) begin
        failures++;
        $display("a=%0d b=%0d got %0d", ka, kb, kq);
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
