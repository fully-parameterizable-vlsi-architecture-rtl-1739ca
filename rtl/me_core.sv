// Sub-pixel motion-estimation architecture (improved type-II array).
//
// Finds, for one N x N reference macroblock, which of the (2K-1)^2 candidate
// blocks on a 1/K-pixel grid around an integer motion vector has the lowest
// sum of absolute differences (SAD). All candidates are computed in
// parallel by the active PEs of pe_array, one reference pixel per cycle, so
// the SADs are ready after N*N accumulation cycles; the pipelined comparator
// tree then picks the winner.
// Data flow: the search area arrives as interpolated line sets of K lines
// (sa_lines, chosen by sa_set) through the SA input buffer (sa_pipo); the
// reference block arrives one line at a time (ra_px, chosen by ra_line)
// through the RA input buffer (ra_piso). Search-area data is scanned in a
// zig-zag: forward rows shift the array right, backward rows left, with one
// upward shift between rows, so every sample is fetched once and no dummy
// cycle is needed between rows. Backward rows take reference pixels in
// reverse order.
// Interface: start (level, sampled when idle or at the end of a block)
// begins a block; int_sad is the power-saving threshold, read when the
// accumulators are cleared (third cycle after start is taken).
// sa_set/ra_line are registered read addresses; the data must be returned
// combinationally in the same cycle.
// Result: mv_valid pulses N*N + 4 + clog2((2K-1)^2) cycles after the start
// cycle, with mv_hc/mv_vc the displacement in 1/K pixel units (each in
// -(K-1)..K-1) and mv_sad the winning SAD (the threshold if every candidate
// was stopped, with mv_over set).
module me_core
  import me_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter int unsigned N  = 16,
  parameter int unsigned K  = 2,
  parameter int unsigned R  = 2 * K - 1,
  parameter int unsigned L  = K * (N + 1) - 1,
  parameter int unsigned SW = W + $clog2(N * N),
  parameter int unsigned CW = $clog2(K) + 1,
  parameter int unsigned AW = $clog2(N + 2)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  input  logic [SW-1:0]        int_sad,
  // search area, interpolated line sets
  output logic [AW-1:0]        sa_set,
  input  logic [W-1:0]         sa_lines [K][L],
  // reference area lines
  output logic [AW-1:0]        ra_line,
  input  logic [W-1:0]         ra_px    [N],
  // best candidate
  output logic                 mv_valid,
  output logic signed [CW-1:0] mv_hc,
  output logic signed [CW-1:0] mv_vc,
  output logic [SW-1:0]        mv_sad,
  output logic                 mv_over
);

  localparam int unsigned M = R * R;

  sa_op_e       op;
  logic         acc_clr, acc_en, cmp_start, sa_fill, sa_rot, ra_load, ra_rev;
  logic [W-1:0] bottom [K][L];
  logic [W-1:0] piso_in [N];
  logic [W-1:0] rpx [R];
  logic [SW-1:0] sad [R][R];
  logic          over [R][R];

  me_ctrl #(.N(N), .CNTW(AW)) u_ctrl (
    .clk, .rst_n, .start, .busy,
    .op, .acc_clr, .acc_en, .cmp_start,
    .sa_fill, .sa_rot, .sa_set,
    .ra_load, .ra_rev, .ra_line
  );

  sa_pipo #(.W(W), .N(N), .K(K), .L(L)) u_sa_buf (
    .clk, .rst_n,
    .fill    (sa_fill),
    .line_in (sa_lines),
    .rot     (sa_rot),
    .bottom
  );

  for (genvar m = 0; m < N; m++) begin : g_rev
    assign piso_in[m] = ra_rev ? ra_px[N-1-m] : ra_px[m];
  end

  ra_piso #(.W(W), .N(N), .R(R)) u_ra_buf (
    .clk, .rst_n,
    .load (ra_load),
    .px   (piso_in),
    .rpx
  );

  pe_array #(.W(W), .N(N), .K(K), .R(R), .L(L), .SW(SW)) u_array (
    .clk, .rst_n, .op, .bottom,
    .r_in (rpx),
    .acc_clr, .acc_en, .int_sad,
    .sad, .over
  );

  // Leaves in row-major order of the active PEs. Key = {SAD, over}: a
  // stopped PE reports the threshold and loses a tie with a real SAD.
  logic [SW:0]   leaf_key [M];
  logic [CW-1:0] leaf_hc  [M];
  logic [CW-1:0] leaf_vc  [M];
  for (genvar r = 0; r < R; r++) begin : g_lr
    for (genvar c = 0; c < R; c++) begin : g_lc
      assign leaf_key[r*R+c] = {sad[r][c], over[r][c]};
      assign leaf_hc[r*R+c]  = CW'(int'(K) - 1 - c);
      assign leaf_vc[r*R+c]  = CW'(r - (int'(K) - 1));
    end
  end

  logic [SW:0]   best_key;
  logic [CW-1:0] best_hc, best_vc;

  cmp_tree #(.M(M), .KW(SW + 1), .CW(CW)) u_cmp (
    .clk, .rst_n,
    .in_valid  (cmp_start),
    .key       (leaf_key),
    .hc        (leaf_hc),
    .vc        (leaf_vc),
    .out_valid (mv_valid),
    .out_key   (best_key),
    .out_hc    (best_hc),
    .out_vc    (best_vc)
  );

  assign mv_sad  = best_key[SW:1];
  assign mv_over = best_key[0];
  assign mv_hc   = best_hc;
  assign mv_vc   = best_vc;

endmodule
