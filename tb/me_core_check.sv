// Self-checking harness for one configuration of me_core.
//
// Generates random sub-pixel search-area grids and reference blocks, feeds
// me_core through its line-set and line read ports, and compares the winner
// with a direct model: SAD(hc, vc) = sum |ref[y][x] - grid[K*y+vc+K-1]
// [K*x+hc+K-1]|, a candidate above the threshold reports the threshold and
// loses ties, remaining ties go to the lower candidate index (row-major,
// vertical offset first, horizontal offset descending). Also checks the
// result latency and counts how often the power-saving stop, both scan
// directions and back-to-back starts occurred.
module me_core_check #(
  parameter int unsigned N    = 4,
  parameter int unsigned K    = 2,
  parameter int unsigned JOBS = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stop,
  output int   n_right,
  output int   n_left,
  output int   n_b2b
);
  import me_pkg::*;

  localparam int unsigned W  = 8;
  localparam int unsigned R  = 2 * K - 1;
  localparam int unsigned L  = K * (N + 1) - 1;
  localparam int unsigned SW = W + $clog2(N * N);
  localparam int unsigned CW = $clog2(K) + 1;
  localparam int unsigned AW = $clog2(N + 2);
  localparam int unsigned LV = $clog2(R * R);

  logic                 start, busy, mv_valid, mv_over;
  logic [SW-1:0]        int_sad, mv_sad;
  logic [AW-1:0]        sa_set, ra_line;
  logic [W-1:0]         sa_lines [K][L];
  logic [W-1:0]         ra_px [N];
  logic signed [CW-1:0] mv_hc, mv_vc;

  // grid row g holds sub-pixel line g-1 (g = 0 is a dummy line)
  logic [W-1:0] grid [L+1][L];
  logic [W-1:0] refb [N][N];

  me_core #(.W(W), .N(N), .K(K)) dut (
    .clk, .rst_n, .start, .busy, .int_sad,
    .sa_set, .sa_lines, .ra_line, .ra_px,
    .mv_valid, .mv_hc, .mv_vc, .mv_sad, .mv_over
  );

  always_comb begin
    for (int s = 0; s < K; s++)
      for (int c = 0; c < L; c++) begin
        int g;
        g = K * int'(sa_set) + s;
        if (g > L) g = L;
        sa_lines[s][c] = grid[g][c];
      end
    for (int x = 0; x < N; x++)
      ra_px[x] = refb[(ra_line < AW'(N)) ? ra_line : AW'(N - 1)][x];
  end

  function automatic int sad_of(int hc, int vc);
    int acc = 0;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        int a, b;
        a = int'(refb[y][x]);
        b = int'(grid[K*y + vc + int'(K) - 1 + 1][K*x + hc + int'(K) - 1]);
        acc += (a > b) ? a - b : b - a;
      end
    return acc;
  endfunction

  // mechanisms seen
  always @(posedge clk) begin
    if (dut.op == SA_RIGHT) n_right++;
    if (dut.op == SA_LEFT)  n_left++;
    if (dut.acc_en && dut.u_array.over[0][0]) n_stop++;
  end

  int exp_hc, exp_vc, exp_sad, exp_over;
  int best_key;

  task automatic make_job(int mode);
    int dx, dy;
    for (int g = 0; g <= L; g++)
      for (int c = 0; c < L; c++) grid[g][c] = W'($urandom);
    dx = int'($urandom_range(0, 2 * K - 2)) - int'(K) + 1;
    dy = int'($urandom_range(0, 2 * K - 2)) - int'(K) + 1;
    // reference block = candidate (dx, dy) plus small noise
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        int v;
        v = int'(grid[K*y + dy + int'(K)][K*x + dx + int'(K) - 1]);
        if (mode != 0) v += int'($urandom_range(0, 6)) - 3;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        refb[y][x] = W'(v);
      end
    // mode 0/1: threshold = SAD of the centre candidate (power saving);
    // mode 2: no threshold; mode 3: threshold below every SAD
    if (mode == 2)      int_sad = '1;
    else if (mode == 3) int_sad = SW'(0);
    else                int_sad = SW'(sad_of(0, 0));
    // expected winner
    best_key = -1;
    for (int r = 0; r < int'(R); r++)
      for (int c = 0; c < int'(R); c++) begin
        int hc, vc, sd, ov, key;
        hc = int'(K) - 1 - c;
        vc = r - int'(K) + 1;
        sd = sad_of(hc, vc);
        ov = (sd > int'(int_sad)) ? 1 : 0;
        if (ov == 1) sd = int'(int_sad);
        key = sd * 2 + ov;
        if (best_key < 0 || key < best_key) begin
          best_key = key; exp_hc = hc; exp_vc = vc; exp_sad = sd; exp_over = ov;
        end
      end
  endtask

  task automatic check_result(int t_start);
    int t0;
    t0 = t_start;
    while (!mv_valid) @(negedge clk);
    checks++;
    if (int'(cyc) - t0 != int'(N * N + 4 + LV)) begin
      failures++;
      $display("N=%0d K=%0d latency %0d, expected %0d", N, K, int'(cyc) - t0, N * N + 4 + LV);
    end
    checks++;
    if (int'(mv_hc) != exp_hc || int'(mv_vc) != exp_vc ||
        int'(mv_sad) != exp_sad || int'(mv_over) != exp_over) begin
      failures++;
      $display("N=%0d K=%0d got (%0d,%0d) sad %0d over %0d, expected (%0d,%0d) sad %0d over %0d",
               N, K, mv_hc, mv_vc, mv_sad, mv_over, exp_hc, exp_vc, exp_sad, exp_over);
    end
    @(negedge clk);
  endtask

  int unsigned cyc;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int ts;
    cyc = 0; checks = 0; failures = 0; done = 0;
    n_stop = 0; n_right = 0; n_left = 0; n_b2b = 0;
    start = 0; int_sad = '0;
    for (int g = 0; g <= L; g++) for (int c = 0; c < L; c++) grid[g][c] = '0;
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) refb[y][x] = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int j = 0; j < int'(JOBS); j++) begin
      make_job(j % 4);
      start = 1;
      ts = int'(cyc);
      @(negedge clk);
      start = 0;
      check_result(ts);
    end
    // back-to-back: start held through the end of a block
    make_job(1);
    start = 1;
    ts = int'(cyc);
    @(negedge clk);
    while (int'(dut.u_ctrl.state) != 8) @(negedge clk);
    // state 8 is LAST, 1 is FETCH; LAST samples start: the second block follows at once
    @(negedge clk);
    start = 0;
    if (int'(dut.u_ctrl.state) == 1) n_b2b++;
    check_result(ts);
    check_result(ts + int'(N * N) + 3);
    done = 1;
  end

endmodule
