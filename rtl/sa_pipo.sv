// SA input buffer: parallel-in parallel-out line holder.
//
// Holds the K interpolated SA lines (L samples each) that the array takes at
// its next upward shift. fill captures line_in; the array reads bottom at
// any later cycle, so the buffer can be refilled in the same cycle in which
// the array consumes it.
// Data consistency with the zig-zag scan: the ring rows of the array are
// rotated by N-1 integer pixels after a forward row and back at 0 after a
// backward row, so a line must enter with the same rotation. bottom[s][c]
// is sample (2K-2 - c + rot*K*(N-1)) mod L of line s; the column reversal
// places the first sub-pixel sample under the rightmost active column.
// This placement rule is this design's own; the buffer's role (holding a
// line until it can be transferred in parallel) follows the architecture.
module sa_pipo #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 16,
  parameter int unsigned K = 2,
  parameter int unsigned L = K * (N + 1) - 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fill,
  input  logic [W-1:0] line_in [K][L],
  input  logic         rot,
  output logic [W-1:0] bottom  [K][L]
);

  logic [W-1:0] hold [K][L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < K; s++)
        for (int c = 0; c < L; c++) hold[s][c] <= '0;
    end else if (fill) begin
      hold <= line_in;
    end
  end

  for (genvar s = 0; s < K; s++) begin : g_line
    for (genvar c = 0; c < L; c++) begin : g_col
      localparam int unsigned I0 = (2 * K - 2 + L - c) % L;
      localparam int unsigned I1 = (2 * K - 2 + L - c + K * (N - 1)) % L;
      assign bottom[s][c] = rot ? hold[s][I1] : hold[s][I0];
    end
  end

endmodule
