// Workload testbench: one QCIF frame (176x144, 99 macroblocks of 16x16)
// refined to half-pixel accuracy by the coprocessor at its default size.
//
// The testbench plays the host coder. It builds a synthetic reference frame
// (a smooth texture) and a current frame moved by a sub-pixel motion in
// one half and an integer motion in the other, plus noise, runs an integer full search of +-P pixels for every
// macroblock (the step the coprocessor refines), and sends each integer
// vector, its SAD, the 18x18 window and the macroblock to the coprocessor.
// Every refined vector and SAD is compared with a direct half-pixel model,
// and the share of PE accumulation cycles skipped by the power-saving stop
// is reported (the quantity the published power-saving estimate measures,
// here on synthetic data rather than real video).
module tb_qcif_workload;
  localparam int N = 16, S = N + 2, FW = 176, FH = 144, P = 8;
  localparam int MBX = FW / N, MBY = FH / N;

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

  int prev [FH][FW];
  int cur  [FH][FW];

  // half-pixel sample of the reference frame at (hy/2, hx/2)
  function automatic int hp(int hy, int hx);
    int y, x;
    y = hy >> 1; x = hx >> 1;
    if (hy % 2 == 0 && hx % 2 == 0) return prev[y][x];
    if (hy % 2 == 0) return (prev[y][x] + prev[y][x+1] + 1) >> 1;
    if (hx % 2 == 0) return (prev[y][x] + prev[y+1][x] + 1) >> 1;
    return (prev[y][x] + prev[y][x+1] + prev[y+1][x] + prev[y+1][x+1] + 2) >> 2;
  endfunction

  // SAD of macroblock (by, bx) against the reference at half-pixel vector (vy, vx)
  function automatic int sad_h(int by, int bx, int vy, int vx);
    int acc = 0;
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        int d;
        d = cur[by*N+y][bx*N+x] - hp(2 * (by * N + y) + vy, 2 * (bx * N + x) + vx);
        acc += (d < 0) ? -d : d;
      end
    return acc;
  endfunction

  int ivx [MBY*MBX], ivy [MBY*MBX], isad [MBY*MBX];
  int ex [MBY*MBX], ey [MBY*MBX], esad [MBY*MBX];

  initial begin
    // reference frame: smooth texture
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int v;
        v = 128 + ((x * 37 + y * 11) % 64) - ((x * y / 7) % 48) + ((x / 5 + y / 3) % 2) * 30;
        prev[y][x] = (v < 0) ? 0 : (v > 255 ? 255 : v);
      end
    // current frame: motion (+2.5, -1.5) pixels (x, y) in the left half and
    // (+1, +2) in the right half, plus noise
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int sy, sx, v;
        sy = (x < FW / 2) ? 2 * y - 3 : 2 * y + 4;
        sx = (x < FW / 2) ? 2 * x + 5 : 2 * x + 2;
        if (sy < 0) sy = 0;
        if (sx > 2 * (FW - 1)) sx = 2 * (FW - 1);
        if (sy > 2 * (FH - 1)) sy = 2 * (FH - 1);
        v = hp(sy, sx) + int'($urandom_range(0, 6)) - 3;
        cur[y][x] = (v < 0) ? 0 : (v > 255 ? 255 : v);
      end
    // integer full search, windows kept one pixel inside the frame
    for (int by = 0; by < MBY; by++)
      for (int bx = 0; bx < MBX; bx++) begin
        int m, best;
        m = by * MBX + bx;
        best = -1;
        for (int vy = -P; vy <= P; vy++)
          for (int vx = -P; vx <= P; vx++) begin
            int oy, ox, sd;
            oy = by * N + vy; ox = bx * N + vx;
            if (oy < 1 || ox < 1 || oy + N > FH - 1 || ox + N > FW - 1) continue;
            sd = sad_h(by, bx, 2 * vy, 2 * vx);
            if (best < 0 || sd < best) begin best = sd; ivx[m] = vx; ivy[m] = vy; end
          end
        isad[m] = best;
        // expected half-pixel refinement
        best = -1;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = 1; dx >= -1; dx--) begin
            int sd, key;
            sd = sad_h(by, bx, 2 * ivy[m] + dy, 2 * ivx[m] + dx);
            key = (sd > isad[m]) ? 2 * isad[m] + 1 : 2 * sd;
            if (best < 0 || key < best) begin
              best = key; ex[m] = 2 * ivx[m] + dx; ey[m] = 2 * ivy[m] + dy; esad[m] = key / 2;
            end
          end
      end
  end

  int checks = 0, failures = 0, n_stop = 0, n_acc = 0, n_refined = 0;
  always @(posedge clk) begin
    if (dut.u_me.acc_en) begin
      n_acc += 9;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          if (dut.u_me.u_array.over[r][c]) n_stop++;
    end
  end

  // pixel host
  initial begin
    sa_wr_en = 0; ra_wr_en = 0; sa_wr_px = '0; ra_wr_px = '0;
    wait (rst_n);
    for (int m = 0; m < MBY * MBX; m++) begin
      int y, x, oy, ox;
      oy = (m / MBX) * N + ivy[m] - 1; ox = (m % MBX) * N + ivx[m] - 1;
      y = 0; x = 0;
      @(negedge clk);
      while (y < S) begin
        sa_wr_en = 1;
        sa_wr_px = 8'(prev[oy + y][ox + x]);
        ra_wr_en = (y < N && x < N);
        ra_wr_px = (y < N && x < N) ? 8'(cur[(m / MBX) * N + y][(m % MBX) * N + x]) : 8'(0);
        @(posedge clk);
        if (sa_wr_ready && (!ra_wr_en || ra_wr_ready)) begin
          if (x == S - 1) begin x = 0; y++; end else x++;
        end
        @(negedge clk);
      end
      sa_wr_en = 0; ra_wr_en = 0;
    end
  end

  // command host
  initial begin
    int t0;
    ipa_valid = 0; ipa_mvx = '0; ipa_mvy = '0; ipa_sad = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = 0;
    for (int m = 0; m < MBY * MBX; m++) begin
      @(negedge clk);
      ipa_valid = 1;
      ipa_mvx = 8'(ivx[m]); ipa_mvy = 8'(ivy[m]); ipa_sad = 16'(isad[m]);
      @(posedge clk);
      while (!ipa_ready) @(posedge clk);
      @(negedge clk);
      ipa_valid = 0;
      while (!spa_valid) @(negedge clk);
      checks++;
      if (int'(spa_mvx) != ex[m] || int'(spa_mvy) != ey[m] || int'(spa_sad) != esad[m]) begin
        failures++;
        $display("MB %0d: got (%0d,%0d) sad %0d, expected (%0d,%0d) sad %0d",
                 m, spa_mvx, spa_mvy, spa_sad, ex[m], ey[m], esad[m]);
      end
      if (int'(spa_mvx) != 2 * ivx[m] || int'(spa_mvy) != 2 * ivy[m]) n_refined++;
    end
    checks++;
    if (n_stop == 0) begin failures++; $display("power-saving stop never happened"); end
    $display("QCIF frame: %0d macroblocks, %0d moved off the integer vector, %0d cycles",
             MBY * MBX, n_refined, $time / 10);
    $display("accumulation cycles skipped by the power-saving stop: %0d of %0d (%0d.%0d%%)",
             n_stop, n_acc, n_stop * 100 / n_acc, (n_stop * 1000 / n_acc) % 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
