// Testbench of me_ctrl: the command sequence of a block is compared cycle
// by cycle with the schedule written out directly (preamble, zig-zag rows of
// N cycles, upward shifts between rows, RA line loads one cycle before each
// row's last pixel, result strobe after the last pixel), for two blocks in
// a row, the second started back to back.
module tb_me_ctrl;
  import me_pkg::*;
  localparam int N = 4, AW = $clog2(N + 2);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start, busy, acc_clr, acc_en, cmp_start, sa_fill, sa_rot, ra_load, ra_rev;
  sa_op_e        op;
  logic [AW-1:0] sa_set, ra_line;
  int checks = 0, failures = 0;

  me_ctrl #(.N(N), .CNTW(AW)) dut (
    .clk, .rst_n, .start, .busy, .op, .acc_clr, .acc_en, .cmp_start,
    .sa_fill, .sa_rot, .sa_set, .ra_load, .ra_rev, .ra_line
  );

  // expected outputs of one cycle
  task automatic expect_cycle(string tag, sa_op_e e_op, bit e_clr, bit e_en, bit e_fill,
                              bit e_rot, bit e_ra, int e_line, int e_set);
    checks++;
    if (op !== e_op || acc_clr !== e_clr || acc_en !== e_en || sa_fill !== e_fill ||
        (e_op == SA_UP && sa_rot !== e_rot) || ra_load !== e_ra ||
        (e_ra && (int'(ra_line) != e_line || ra_rev !== ~e_line[0])) ||
        (e_fill && int'(sa_set) != e_set)) begin
      failures++;
      $display("%s: op %0d clr %0d en %0d fill %0d rot %0d ra %0d line %0d set %0d", tag,
               op, acc_clr, acc_en, sa_fill, sa_rot, ra_load, ra_line, sa_set);
    end
    @(negedge clk);
  endtask

  task automatic block(bit hold_start);
    expect_cycle("fetch", SA_HOLD, 0, 0, 1, 0, 0, 0, 0);
    expect_cycle("pre",   SA_UP,   0, 0, 1, 0, 1, 0, 1);
    expect_cycle("first", SA_UP,   1, 0, 1, 0, 0, 0, 2);
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) begin
        sa_op_e o;
        bit last_row, ra, fill;
        last_row = (j == N - 1);
        o = (i < N - 1) ? ((j % 2 == 0) ? SA_RIGHT : SA_LEFT) : (last_row ? SA_HOLD : SA_UP);
        ra = (i == N - 2) && !last_row;
        fill = (i == N - 1) && !last_row;
        if (i == N - 1 && last_row) start = hold_start;
        expect_cycle("row", o, 0, 1, fill, (j % 2 == 0), ra, j + 1, j + 3);
      end
    checks++;
    if (!cmp_start) begin failures++; $display("no cmp_start"); end
  endtask

  initial begin
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy) failures++;
    start = 1;
    @(negedge clk);
    start = 0;
    block(1);
    start = 0;
    block(0);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
