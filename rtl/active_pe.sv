// Active processing element: SAD of one candidate block.
//
// Four parts, as in the PE drawing of the architecture:
//  (A) SA displacement: the same sample register and move multiplexer as a
//      passive PE (instantiated as passive_pe).
//  (B) Reference pixel storage: a standing register r, loaded every cycle
//      from the running RA register of its row (r_in).
//  (C) Absolute difference: r + ~s + 1. With no borrow the W-bit result is
//      |r - s|; with a borrow its one's complement is s - r - 1 and the
//      missing +1 leaves as ad_carry.
//  (D) Accumulation: a carry-save accumulator. s_acc (W bits) and c_acc
//      (W-1 bits, weights 2..2^(W-1)) absorb AD each cycle, with ad_carry
//      dropped into the free least-significant carry slot; the carry out of
//      weight 2^W increments the upper part u_acc (UW = clog2(N*N) bits).
//      The format conversion unit adds the parts into the binary SAD.
// Power saving: acc_clr loads the threshold (int_sad, e.g. the SAD of the
// integer-pixel vector) into a standing register. While the converted SAD is
// above it the accumulator is frozen and the PE reports the threshold with
// over = 1 instead of its own SAD. The over flag is this design's addition:
// the comparator tree uses it as a tie breaker so that a stopped candidate
// never wins against a real SAD equal to the threshold.
// Timing: acc_en adds |r - s| of the current register contents at the clock
// edge; sad/over are combinational from the registers. acc_clr has priority.
module active_pe
  import me_pkg::*;
#(
  parameter int unsigned W  = 8,
  parameter int unsigned N  = 16,
  parameter int unsigned UW = $clog2(N * N),
  parameter int unsigned SW = W + UW
) (
  input  logic          clk,
  input  logic          rst_n,
  // SA displacement unit
  input  sa_op_e        op,
  input  logic [W-1:0]  s_down,
  input  logic [W-1:0]  s_lin,
  input  logic [W-1:0]  s_rin,
  output logic [W-1:0]  s,
  // reference pixel
  input  logic [W-1:0]  r_in,
  // accumulation control
  input  logic          acc_clr,
  input  logic          acc_en,
  input  logic [SW-1:0] int_sad,
  // result
  output logic [SW-1:0] sad,
  output logic          over
);

  // (A)
  passive_pe #(.W(W)) u_sa (
    .clk, .rst_n, .op, .s_down, .s_lin, .s_rin, .s
  );

  // (B)
  logic [W-1:0] r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= '0;
    else        r <= r_in;
  end

  // (C)
  logic [W:0]   diff;
  logic [W-1:0] ad;
  logic         ad_carry;
  always_comb begin
    diff     = {1'b0, r} + {1'b0, ~s} + (W+1)'(1);
    ad_carry = ~diff[W];
    ad       = ad_carry ? ~diff[W-1:0] : diff[W-1:0];
  end

  // (D)
  logic [W-1:0]  s_acc;
  logic [W-2:0]  c_acc;
  logic [UW-1:0] u_acc;
  logic [SW-1:0] thr;
  logic [W-1:0]  b_in, sum_n, cy_n;
  logic [SW-1:0] fp_sad;

  always_comb begin
    b_in  = {c_acc, ad_carry};
    sum_n = s_acc ^ b_in ^ ad;
    cy_n  = (s_acc & b_in) | (s_acc & ad) | (b_in & ad);
    // format conversion unit
    fp_sad = {u_acc, s_acc} + SW'({c_acc, 1'b0});
    over   = fp_sad > thr;
    sad    = over ? thr : fp_sad;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_acc <= '0;
      c_acc <= '0;
      u_acc <= '0;
      thr   <= '0;
    end else if (acc_clr) begin
      s_acc <= '0;
      c_acc <= '0;
      u_acc <= '0;
      thr   <= int_sad;
    end else if (acc_en && !over) begin
      s_acc <= sum_n;
      c_acc <= cy_n[W-2:0];
      if (cy_n[W-1]) u_acc <= u_acc + UW'(1);
    end
  end

endmodule
