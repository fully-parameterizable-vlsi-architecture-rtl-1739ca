// End-to-end testbench of the sub-pixel ME coprocessor at its default size
// (16x16 macroblocks, half-pixel accuracy, 8-bit pixels).
//
// A host model streams integer search-area windows and reference blocks
// into the double-banked buffers, sends integer motion vectors with their
// SAD, and checks every refined vector and SAD against a direct model:
// half-pixel samples by the bilinear rule ((a+b+1)>>1 between two pixels,
// (a+b+c+d+2)>>2 between four), SAD of all nine candidates, candidates
// above the threshold report the threshold and lose ties, remaining ties
// go to the lower candidate index. The host writes the next block while
// the current one is processed, so buffer back-pressure occurs. Counts the
// mechanisms seen (power-saving stop, both zig-zag directions, overlap of
// loading and processing, write back-pressure, all-candidates-stopped) and
// fails if one never happened. Checks the processing latency too.
module tb_spme_coprocessor;
  localparam int N = 16, K = 2, W = 8, S = N + 2, JOBS = 8;
  localparam int LAT = N * N + 4 + 4;   // start of ME to result, 9 leaves

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               ipa_valid, ipa_ready, sa_wr_en, sa_wr_ready, ra_wr_en, ra_wr_ready;
  logic signed [7:0]  ipa_mvx, ipa_mvy;
  logic [15:0]        ipa_sad, spa_sad;
  logic [7:0]         sa_wr_px, ra_wr_px;
  logic               spa_valid, spa_over, me_busy;
  logic signed [9:0]  spa_mvx, spa_mvy;

  spme_coprocessor dut (
    .clk, .rst_n,
    .ipa_valid, .ipa_ready, .ipa_mvx, .ipa_mvy, .ipa_sad,
    .sa_wr_en, .sa_wr_px, .sa_wr_ready,
    .ra_wr_en, .ra_wr_px, .ra_wr_ready,
    .spa_valid, .spa_mvx, .spa_mvy, .spa_sad, .spa_over, .me_busy
  );

  // job data
  int win  [JOBS][S][S];
  int refb [JOBS][N][N];
  int mvx  [JOBS], mvy [JOBS], thr [JOBS];
  int exp_x [JOBS], exp_y [JOBS], exp_sad [JOBS], exp_over [JOBS];

  // half-pixel sample of job j at half-grid position (hy, hx) of the window
  function automatic int half(int j, int hy, int hx);
    int y, x;
    y = hy / 2; x = hx / 2;
    if (hy % 2 == 0 && hx % 2 == 0) return win[j][y][x];
    if (hy % 2 == 0) return (win[j][y][x] + win[j][y][x+1] + 1) >> 1;
    if (hx % 2 == 0) return (win[j][y][x] + win[j][y+1][x] + 1) >> 1;
    return (win[j][y][x] + win[j][y][x+1] + win[j][y+1][x] + win[j][y+1][x+1] + 2) >> 2;
  endfunction

  function automatic int cand_sad(int j, int dx, int dy);
    int acc = 0;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        int d;
        d = refb[j][y][x] - half(j, 2 * (y + 1) + dy, 2 * (x + 1) + dx);
        acc += (d < 0) ? -d : d;
      end
    return acc;
  endfunction

  task automatic make_job(int j);
    int tx, ty, kind;
    kind = j % 4;
    for (int y = 0; y < S; y++)
      for (int x = 0; x < S; x++) win[j][y][x] = int'($urandom_range(0, 255));
    // the true motion lies on a half-pixel position near the integer vector
    tx = int'($urandom_range(0, 2)) - 1;
    ty = int'($urandom_range(0, 2)) - 1;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        int v;
        v = half(j, 2 * (y + 1) + ty, 2 * (x + 1) + tx);
        if (kind == 1) v += int'($urandom_range(0, 8)) - 4;
        if (kind >= 2) v = int'($urandom_range(0, 255));
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        refb[j][y][x] = v;
      end
    mvx[j] = int'($urandom_range(0, 40)) - 20;
    mvy[j] = int'($urandom_range(0, 40)) - 20;
    // threshold: the integer-pixel SAD, except job kind 2 (a tight one on
    // unrelated data, so that every candidate stops)
    thr[j] = cand_sad(j, 0, 0);
    if (kind == 2) thr[j] = 10;
    begin
      int best;
      best = -1;
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = 1; dx >= -1; dx--) begin
          int sd, ov, key;
          sd = cand_sad(j, dx, dy);
          ov = (sd > thr[j]) ? 1 : 0;
          if (ov == 1) sd = thr[j];
          key = 2 * sd + ov;
          if (best < 0 || key < best) begin
            best = key;
            exp_x[j] = 2 * mvx[j] + dx; exp_y[j] = 2 * mvy[j] + dy;
            exp_sad[j] = sd; exp_over[j] = ov;
          end
        end
    end
  endtask

  int checks = 0, failures = 0;
  int n_stop = 0, n_right = 0, n_left = 0, n_overlap = 0, n_bp = 0, n_allover = 0;
  int t_start [JOBS];
  int n_start = 0;
  int unsigned cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_me.u_ctrl.op == me_pkg::SA_RIGHT) n_right++;
    if (dut.u_me.u_ctrl.op == me_pkg::SA_LEFT)  n_left++;
    if (dut.u_me.acc_en && dut.u_me.u_array.over[0][0]) n_stop++;
    if (me_busy && sa_wr_en && sa_wr_ready) n_overlap++;
    if (dut.u_ctrl.me_start && n_start < JOBS) begin
      t_start[n_start] = int'(cyc);
      n_start++;
    end
  end

  // host: pixel streams (run ahead, limited by the buffers)
  initial begin
    sa_wr_en = 0; ra_wr_en = 0; sa_wr_px = '0; ra_wr_px = '0;
    wait (rst_n);
    for (int j = 0; j < JOBS; j++) begin
      int y, x;
      y = 0; x = 0;
      @(negedge clk);
      while (y < S) begin
        sa_wr_en = 1;
        sa_wr_px = 8'(win[j][y][x]);
        ra_wr_en = (y < N && x < N);
        ra_wr_px = (y < N && x < N) ? 8'(refb[j][y][x]) : 8'(0);
        @(posedge clk);
        if (!sa_wr_ready || (ra_wr_en && !ra_wr_ready)) n_bp++;
        if (sa_wr_ready && (!ra_wr_en || ra_wr_ready)) begin
          if (x == S - 1) begin x = 0; y++; end else x++;
        end
        // hold the pixel while either buffer is full
        if (ra_wr_en && !ra_wr_ready) sa_wr_en = 0;
        @(negedge clk);
      end
      sa_wr_en = 0; ra_wr_en = 0;
    end
  end

  // host: commands and results
  initial begin
    ipa_valid = 0; ipa_mvx = '0; ipa_mvy = '0; ipa_sad = '0;
    for (int j = 0; j < JOBS; j++) make_job(j);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // let the pixel host fill both banks first, so that it must wait
    repeat (800) @(posedge clk);
    for (int j = 0; j < JOBS; j++) begin
      @(negedge clk);
      ipa_valid = 1;
      ipa_mvx = 8'(mvx[j]); ipa_mvy = 8'(mvy[j]); ipa_sad = 16'(thr[j]);
      @(posedge clk);
      while (!ipa_ready) @(posedge clk);
      @(negedge clk);
      ipa_valid = 0;
      while (!spa_valid) @(negedge clk);
      checks++;
      if (int'(spa_mvx) != exp_x[j] || int'(spa_mvy) != exp_y[j] ||
          int'(spa_sad) != exp_sad[j] || int'(spa_over) != exp_over[j]) begin
        failures++;
        $display("job %0d: got (%0d,%0d) sad %0d over %0d, expected (%0d,%0d) sad %0d over %0d",
                 j, spa_mvx, spa_mvy, spa_sad, spa_over, exp_x[j], exp_y[j], exp_sad[j], exp_over[j]);
      end
      if (exp_over[j] == 1) n_allover++;
      // start pulse -> result register: LAT + 1 cycles
      checks++;
      if (int'(cyc) - t_start[j] != LAT + 1) begin
        failures++;
        $display("job %0d: latency %0d, expected %0d", j, int'(cyc) - t_start[j], LAT + 1);
      end
    end
    checks += 6;
    if (n_stop == 0)    begin failures++; $display("no power-saving stop"); end
    if (n_right == 0)   begin failures++; $display("no right shift"); end
    if (n_left == 0)    begin failures++; $display("no left shift"); end
    if (n_overlap == 0) begin failures++; $display("no loading during processing"); end
    if (n_bp == 0)      begin failures++; $display("no buffer back-pressure"); end
    if (n_allover == 0) begin failures++; $display("no all-stopped result"); end
    $display("stop %0d right %0d left %0d overlap %0d backpressure %0d allstopped %0d",
             n_stop, n_right, n_left, n_overlap, n_bp, n_allover);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
