// Testbench of passive_pe: random move commands against a one-register
// model (hold, take from below, from the left, from the right).
module tb_passive_pe;
  import me_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sa_op_e     op;
  logic [7:0] s_down, s_lin, s_rin, s;
  int checks = 0, failures = 0;
  logic [7:0] model;

  passive_pe #(.W(8)) dut (.clk, .rst_n, .op, .s_down, .s_lin, .s_rin, .s);

  initial begin
    op = SA_HOLD; s_down = '0; s_lin = '0; s_rin = '0; model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (s !== 8'd0) failures++;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      op = sa_op_e'($urandom_range(0, 3));
      s_down = 8'($urandom); s_lin = 8'($urandom); s_rin = 8'($urandom);
      case (op)
        SA_UP:    model = s_down;
        SA_RIGHT: model = s_lin;
        SA_LEFT:  model = s_rin;
        default:  ;
      endcase
      @(posedge clk);
      #1;
      checks++;
      if (s !== model) begin
        failures++;
        $display("op %0d: s=%0d expected %0d", op, s, model);
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
