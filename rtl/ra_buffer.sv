// RA buffer: double-buffered store of the reference macroblock.
//
// Holds the N x N pixels of the current (reference) macroblock in two
// banks, so the next block can be written while the current one is read.
// Write side: one pixel per cycle in raster order (wr_en, wr_px) while
// wr_ready; after the last pixel the bank is marked full and writing moves
// to the other bank. Read side: rd_bank and rd_row select a whole line,
// returned combinationally on row; rel frees bank rd_bank. The double
// buffering and the write order are this design's choices.
module ra_buffer #(
  parameter int unsigned W  = 8,
  parameter int unsigned N  = 16,
  parameter int unsigned AW = $clog2(N + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_px,
  output logic          wr_ready,
  input  logic          rd_bank,
  input  logic [AW-1:0] rd_row,
  output logic [W-1:0]  row [N],
  input  logic          rel,
  output logic [1:0]    full
);

  localparam int unsigned IW = $clog2(N);

  logic [W-1:0]  mem [2][N][N];
  logic          wb;
  logic [IW-1:0] wy, wx;
  logic [IW-1:0] rr;

  assign wr_ready = !full[wb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb   <= 1'b0;
      wy   <= '0;
      wx   <= '0;
      full <= '0;
    end else begin
      if (wr_en && wr_ready) begin
        if (wx == IW'(N - 1)) begin
          wx <= '0;
          if (wy == IW'(N - 1)) begin
            wy       <= '0;
            full[wb] <= 1'b1;
            wb       <= ~wb;
          end else begin
            wy <= wy + IW'(1);
          end
        end else begin
          wx <= wx + IW'(1);
        end
      end
      if (rel) full[rd_bank] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_ready) mem[wb][wy][wx] <= wr_px;
  end

  assign rr  = (rd_row > AW'(N - 1)) ? IW'(N - 1) : IW'(rd_row);
  assign row = mem[rd_bank][rr];

  // a bank is freed only after it was filled
  a_rel: assert property (@(posedge clk) disable iff (!rst_n) rel |-> full[rd_bank])
    else $error("freeing a bank that is not full");

endmodule
