// Testbench of ra_buffer: blocks written in raster order fill the two
// banks in turn, a full buffer refuses writes, lines read back
// correctly and freeing a bank lets writing go on.
module tb_ra_buffer;
  localparam int N = 4, S = N, AW = $clog2(N + 2);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          wr_en, wr_ready, rd_bank, rel;
  logic [7:0]    wr_px, row [S];
  logic [AW-1:0] rd_row;
  logic [1:0]    full;
  int checks = 0, failures = 0;
  int img [3][S][S];

  ra_buffer #(.W(8), .N(N)) dut (.clk, .rst_n, .wr_en, .wr_px, .wr_ready,
    .rd_bank, .rd_row, .row, .rel, .full);

  task automatic write_blk(int b);
    for (int y = 0; y < S; y++)
      for (int x = 0; x < S; x++) begin
        wr_en = 1; wr_px = 8'(img[b][y][x]);
        @(negedge clk);
      end
    wr_en = 0;
  endtask

  task automatic check_bank(int bank, int b);
    rd_bank = bank[0];
    for (int r = 0; r < S + 1; r++) begin
      int r0;
      rd_row = AW'(r);
      r0 = (r > S - 1) ? S - 1 : r;
      #1;
      for (int x = 0; x < S; x++) begin
        checks++;
        if (int'(row[x]) != img[b][r0][x]) begin
          failures++; $display("bank %0d row %0d col %0d", bank, r, x);
        end
      end
    end
  endtask

  initial begin
    wr_en = 0; wr_px = '0; rd_bank = 0; rd_row = '0; rel = 0;
    for (int b = 0; b < 3; b++) for (int y = 0; y < S; y++) for (int x = 0; x < S; x++)
      img[b][y][x] = int'($urandom_range(0, 255));
    repeat (2) @(negedge clk);
    rst_n = 1;
    write_blk(0);
    checks++; if (full !== 2'b01) failures++;
    write_blk(1);
    checks++; if (full !== 2'b11 || wr_ready !== 1'b0) begin failures++; $display("not full"); end
    // a write while full is ignored
    wr_en = 1; wr_px = 8'h77;
    @(negedge clk);
    wr_en = 0;
    check_bank(0, 0);
    check_bank(1, 1);
    rd_bank = 0; rel = 1;
    @(negedge clk);
    rel = 0;
    checks++; if (full !== 2'b10 || wr_ready !== 1'b1) begin failures++; $display("not freed"); end
    write_blk(2);
    check_bank(0, 2);
    check_bank(1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
