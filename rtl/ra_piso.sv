// RA input buffer: parallel-in serial-out with redundant output registers.
//
// A chain of N-1 registers, each followed by a 2:1 multiplexer, is loaded in
// parallel with a whole line of reference pixels (px[0..N-1]) and shifts it
// out serially, px[N-1] first, one pixel per cycle. The last multiplexer
// feeds R = 2K-1 output registers that all hold the same pixel; each drives
// the active PEs of one array row only, which keeps the fan-out of every
// register low. A load replaces the shift, so consecutive lines stream
// without a gap when load is raised every N cycles, in the cycle in which
// the output registers hold the line's last pixel (px[0]).
// The order in which pixels of a line are placed on px (forward or reversed)
// is chosen by the caller for the zig-zag scan.
module ra_piso #(
  parameter int unsigned W = 8,
  parameter int unsigned N = 16,
  parameter int unsigned R = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] px  [N],
  output logic [W-1:0] rpx [R]
);

  logic [W-1:0] chain [N-1];
  logic [W-1:0] nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < N - 1; m++) chain[m] <= '0;
    end else begin
      chain[0] <= px[0];
      for (int m = 1; m < N - 1; m++) chain[m] <= load ? px[m] : chain[m-1];
    end
  end

  assign nxt = load ? px[N-1] : chain[N-2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int q = 0; q < R; q++) rpx[q] <= '0;
    end else begin
      for (int q = 0; q < R; q++) rpx[q] <= nxt;
    end
  end

endmodule
