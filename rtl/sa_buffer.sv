// SA buffer: double-buffered store of the integer search-area window.
//
// Holds the (N+2) x (N+2) integer pixels around the integer motion vector
// (one pixel of margin on every side of the N x N block position, the reach
// of the +-(K-1)/K sub-pixel candidates). Two banks let the next window be
// written while the current one is processed.
// Write side: one pixel per cycle in raster order (wr_en, wr_px) while
// wr_ready; after the last pixel of a window the bank is marked full and
// writing moves to the other bank. Read side: rd_bank selects the bank,
// rd_row the line set; row0/row1 return rows rd_row and rd_row+1 (both
// clamped to the last row) combinationally, the two rows the interpolation
// module needs. rel frees bank rd_bank. full shows both banks' state.
// The double buffering and the write order are this design's choices.
module sa_buffer #(
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
  output logic [W-1:0]  row0 [N+2],
  output logic [W-1:0]  row1 [N+2],
  input  logic          rel,
  output logic [1:0]    full
);

  localparam int unsigned S = N + 2;

  logic [W-1:0]  mem [2][S][S];
  logic          wb;
  logic [AW-1:0] wy, wx;
  logic [AW-1:0] r0, r1;

  assign wr_ready = !full[wb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb   <= 1'b0;
      wy   <= '0;
      wx   <= '0;
      full <= '0;
    end else begin
      if (wr_en && wr_ready) begin
        if (wx == AW'(S - 1)) begin
          wx <= '0;
          if (wy == AW'(S - 1)) begin
            wy       <= '0;
            full[wb] <= 1'b1;
            wb       <= ~wb;
          end else begin
            wy <= wy + AW'(1);
          end
        end else begin
          wx <= wx + AW'(1);
        end
      end
      if (rel) full[rd_bank] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_ready) mem[wb][wy][wx] <= wr_px;
  end

  always_comb begin
    r0 = (rd_row > AW'(S - 1)) ? AW'(S - 1) : rd_row;
    r1 = (r0 == AW'(S - 1)) ? r0 : r0 + AW'(1);
    row0 = mem[rd_bank][r0];
    row1 = mem[rd_bank][r1];
  end

  // a bank is freed only after it was filled
  a_rel: assert property (@(posedge clk) disable iff (!rst_n) rel |-> full[rd_bank])
    else $error("freeing a bank that is not full");

endmodule
