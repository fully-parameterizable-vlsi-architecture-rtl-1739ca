// Processing array: cylindrical, interleaved grid of active and passive PEs.
//
// The array has R = 2K-1 rows and L = K*(N+1)-1 columns. Each row holds one
// complete interpolated SA line (all L sub-pixel samples of a line), and
// each row is closed into a ring: the right margin feeds the left margin, so
// shifting right or left never loses a sample. Neighbours are K columns
// apart horizontally and K rows apart vertically, so one horizontal shift
// moves the data by one integer pixel on the 1/K sub-pixel grid, and one
// upward shift moves it by one integer line. Rows 0..K-2 are fed from row
// r+K; rows K-1..2K-2 (K rows) take new lines from the SA input buffer
// (bottom[r-(K-1)]).
// The first 2K-1 columns of every row are active PEs: (2K-1)^2 candidates.
// Active PE (r, c) evaluates displacement hc = K-1-c, vc = r-(K-1) in
// 1/K-pixel units; all active PEs of row r get the same reference pixel from
// r_in[r] (a copy per row, from the RA input buffer's redundant registers).
// With sample f of the current line placed at column (2K-2 - f + K*i) mod L
// when reference column i is processed, active column c always sees sample
// K*i + 2K-2-c: the ring rotates right for forward rows, left for backward
// rows, and the SA input buffer writes new lines with the matching rotation.
// The number of passive columns (K*(N-1)) is this design's choice; it is
// what a ring holding a whole sub-pixel line needs.
// Timing: op, acc_clr and acc_en act at the next clock edge for all PEs.
module pe_array
  import me_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter int unsigned N  = 16,
  parameter int unsigned K  = 2,
  parameter int unsigned R  = 2 * K - 1,
  parameter int unsigned L  = K * (N + 1) - 1,
  parameter int unsigned SW = W + $clog2(N * N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  sa_op_e        op,
  input  logic [W-1:0]  bottom [K][L],
  input  logic [W-1:0]  r_in   [R],
  input  logic          acc_clr,
  input  logic          acc_en,
  input  logic [SW-1:0] int_sad,
  output logic [SW-1:0] sad    [R][R],
  output logic          over   [R][R]
);

  logic [W-1:0] sg [R][L];

  for (genvar r = 0; r < R; r++) begin : g_row
    for (genvar c = 0; c < L; c++) begin : g_col
      localparam int unsigned CL = (c + L - K) % L;  // left neighbour
      localparam int unsigned CR = (c + K) % L;      // right neighbour
      logic [W-1:0] down;
      if (r + K < R) begin : g_inner
        assign down = sg[r+K][c];
      end else begin : g_edge
        assign down = bottom[r-(K-1)][c];
      end
      if (c < R) begin : g_act
        active_pe #(.W(W), .N(N), .SW(SW)) u_pe (
          .clk, .rst_n, .op,
          .s_down (down),
          .s_lin  (sg[r][CL]),
          .s_rin  (sg[r][CR]),
          .s      (sg[r][c]),
          .r_in   (r_in[r]),
          .acc_clr, .acc_en, .int_sad,
          .sad    (sad[r][c]),
          .over   (over[r][c])
        );
      end else begin : g_pas
        passive_pe #(.W(W)) u_pe (
          .clk, .rst_n, .op,
          .s_down (down),
          .s_lin  (sg[r][CL]),
          .s_rin  (sg[r][CR]),
          .s      (sg[r][c])
        );
      end
    end
  end

endmodule
