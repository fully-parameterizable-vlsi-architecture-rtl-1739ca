// Interpolation module: bilinear sub-pixel interpolation of one line set.
//
// From two adjacent integer rows of the search-area window (top = row q,
// bot = row q+1, N+2 pixels each) it produces the K sub-pixel lines
// q*K + s (s = 0..K-1) of the 1/K-pixel grid, L = K*(N+1)-1 samples each.
// Sample c of line s lies at window position (q + s/K, (c+1)/K); with
// (x0, fx) = divmod(c+1, K) it is the 4-tap filter
//   ((K-fx)(K-s) A + fx(K-s) B + (K-fx)s C + fx s D + K*K/2) / K^2
// on A = top[x0], B = top[x0+1], C = bot[x0], D = bot[x0+1]. For K = 2 this
// is the usual half-pixel rule: (A+B+1)/2 between two pixels and
// (A+B+C+D+2)/4 in the middle. K must be a power of two.
// The filter bank is combinational, one 4-tap filter per output sample, so
// a whole line set is ready in the cycle its rows are read; the published
// architecture uses a shared high-throughput filter whose structure it does
// not give.
module interp_unit #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 16,
  parameter int unsigned K = 2,
  parameter int unsigned L = K * (N + 1) - 1
) (
  input  logic [W-1:0] top   [N+2],
  input  logic [W-1:0] bot   [N+2],
  output logic [W-1:0] lines [K][L]
);

  localparam int unsigned SH = 2 * $clog2(K);
  localparam int unsigned AW = W + SH + 1;

  for (genvar s = 0; s < K; s++) begin : g_line
    for (genvar c = 0; c < L; c++) begin : g_smp
      localparam int unsigned X0 = (c + 1) / K;
      localparam int unsigned FX = (c + 1) % K;
      localparam int unsigned WA = (K - FX) * (K - s);
      localparam int unsigned WB = FX * (K - s);
      localparam int unsigned WC = (K - FX) * s;
      localparam int unsigned WD = FX * s;
      localparam int unsigned X1 = (X0 + 1 < N + 2) ? X0 + 1 : X0;
      logic [AW-1:0] acc;
      assign acc = AW'(WA) * AW'(top[X0]) + AW'(WB) * AW'(top[X1]) +
                   AW'(WC) * AW'(bot[X0]) + AW'(WD) * AW'(bot[X1]) +
                   AW'((K * K) / 2);
      assign lines[s][c] = W'(acc >> SH);
    end
  end

endmodule
