// Sub-pixel motion-estimation coprocessor (top level).
//
// Refines an integer-pixel motion vector of one N x N macroblock to 1/K
// pixel accuracy (half pixel with the default K = 2). The host sends the
// integer vector and its SAD, writes the (N+2) x (N+2) integer search-area
// window centred on the vector (one pixel margin) into the SA buffer and
// the N x N reference macroblock into the RA buffer; the coprocessor
// interpolates the window bilinearly, evaluates all (2K-1)^2 sub-pixel
// candidates in the systolic array, and returns the best vector in 1/K
// pixel units with its SAD.
// Blocks: SA buffer -> interpolation module -> ME architecture, RA buffer
// -> ME architecture, and a control circuit, in a pipeline: the buffers are
// double banked so the host can load the next block during processing.
// Timing: a job takes N*N + 4 + clog2((2K-1)^2) cycles from the start of
// the ME architecture to its result, plus three cycles of handshake.
module spme_coprocessor #(
  parameter int unsigned W   = 8,
  parameter int unsigned N   = 16,
  parameter int unsigned K   = 2,
  parameter int unsigned MVW = 8,
  parameter int unsigned SW  = W + $clog2(N * N),
  parameter int unsigned CW  = $clog2(K) + 1,
  parameter int unsigned OW  = MVW + $clog2(K) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // integer-pixel motion vector in
  input  logic                  ipa_valid,
  output logic                  ipa_ready,
  input  logic signed [MVW-1:0] ipa_mvx,
  input  logic signed [MVW-1:0] ipa_mvy,
  input  logic [SW-1:0]         ipa_sad,
  // integer search-area pixels in (raster order)
  input  logic                  sa_wr_en,
  input  logic [W-1:0]          sa_wr_px,
  output logic                  sa_wr_ready,
  // reference macroblock pixels in (raster order)
  input  logic                  ra_wr_en,
  input  logic [W-1:0]          ra_wr_px,
  output logic                  ra_wr_ready,
  // sub-pixel motion vector out
  output logic                  spa_valid,
  output logic signed [OW-1:0]  spa_mvx,
  output logic signed [OW-1:0]  spa_mvy,
  output logic [SW-1:0]         spa_sad,
  output logic                  spa_over,   // all candidates above ipa_sad
  output logic                  me_busy     // ME architecture working
);

  localparam int unsigned L  = K * (N + 1) - 1;
  localparam int unsigned AW = $clog2(N + 2);

  logic                 rd_bank, rel, me_start;
  logic [1:0]           sa_full, ra_full;
  logic [SW-1:0]        int_sad;
  logic [AW-1:0]        sa_set, ra_line;
  logic [W-1:0]         row0 [N+2];
  logic [W-1:0]         row1 [N+2];
  logic [W-1:0]         sa_lines [K][L];
  logic [W-1:0]         ra_px [N];
  logic                 mv_valid, mv_over;
  logic signed [CW-1:0] mv_hc, mv_vc;
  logic [SW-1:0]        mv_sad;

  sa_buffer #(.W(W), .N(N), .AW(AW)) u_sa_buffer (
    .clk, .rst_n,
    .wr_en (sa_wr_en), .wr_px (sa_wr_px), .wr_ready (sa_wr_ready),
    .rd_bank, .rd_row (sa_set), .row0, .row1,
    .rel, .full (sa_full)
  );

  ra_buffer #(.W(W), .N(N), .AW(AW)) u_ra_buffer (
    .clk, .rst_n,
    .wr_en (ra_wr_en), .wr_px (ra_wr_px), .wr_ready (ra_wr_ready),
    .rd_bank, .rd_row (ra_line), .row (ra_px),
    .rel, .full (ra_full)
  );

  interp_unit #(.W(W), .N(N), .K(K), .L(L)) u_interp (
    .top (row0), .bot (row1), .lines (sa_lines)
  );

  me_core #(.W(W), .N(N), .K(K), .L(L), .SW(SW), .CW(CW), .AW(AW)) u_me (
    .clk, .rst_n,
    .start (me_start), .busy (me_busy), .int_sad,
    .sa_set, .sa_lines,
    .ra_line, .ra_px,
    .mv_valid, .mv_hc, .mv_vc, .mv_sad, .mv_over
  );

  cop_ctrl #(.SW(SW), .CW(CW), .K(K), .MVW(MVW), .OW(OW)) u_ctrl (
    .clk, .rst_n,
    .ipa_valid, .ipa_ready, .ipa_mvx, .ipa_mvy, .ipa_sad,
    .sa_full, .ra_full, .rd_bank, .rel,
    .me_start, .int_sad,
    .mv_valid, .mv_hc, .mv_vc, .mv_sad, .mv_over,
    .spa_valid, .spa_mvx, .spa_mvy, .spa_sad, .spa_over
  );

endmodule
