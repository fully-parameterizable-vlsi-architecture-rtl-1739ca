// Comparator PE of the binary-tree comparison unit.
//
// Compares the cost keys of two candidates, passes the lower one and its
// horizontal/vertical coordinates (hc, vc) through 2:1 multiplexers and
// registers them for the next tree level. The comparison is the carry out
// of b + ~a + 1 (b >= a), computed with a Sklansky parallel-prefix carry
// network. Ties keep input a (the lower-numbered candidate); that rule is
// this design's choice.
// Timing: one register stage; outputs change one cycle after the inputs
// when en is high.
module cmp_node #(
  parameter int unsigned KW = 17,   // key width
  parameter int unsigned CW = 2     // coordinate width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [KW-1:0] key_a,
  input  logic [CW-1:0] hc_a,
  input  logic [CW-1:0] vc_a,
  input  logic [KW-1:0] key_b,
  input  logic [CW-1:0] hc_b,
  input  logic [CW-1:0] vc_b,
  output logic [KW-1:0] key_q,
  output logic [CW-1:0] hc_q,
  output logic [CW-1:0] vc_q
);

  localparam int unsigned LV = (KW > 1) ? $clog2(KW) : 1;

  // Sklansky prefix: (g, p) per bit of b + ~a, carry in 1.
  logic [KW-1:0] g0, p0;
  logic [KW-1:0] gp [LV+1];
  logic [KW-1:0] pp [LV+1];
  logic          b_ge_a;

  always_comb begin
    g0 = key_b & ~key_a;
    p0 = key_b | ~key_a;
    gp[0] = g0;
    pp[0] = p0;
    for (int l = 0; l < LV; l++) begin
      for (int i = 0; i < KW; i++) begin
        if (((i >> l) & 1) == 1) begin
          // combine with the group ending just below this block
          gp[l+1][i] = gp[l][i] | (pp[l][i] & gp[l][((i >> l) << l) - 1]);
          pp[l+1][i] = pp[l][i] & pp[l][((i >> l) << l) - 1];
        end else begin
          gp[l+1][i] = gp[l][i];
          pp[l+1][i] = pp[l][i];
        end
      end
    end
    // carry out with carry in = 1
    b_ge_a = gp[LV][KW-1] | pp[LV][KW-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q <= '1;
      hc_q  <= '0;
      vc_q  <= '0;
    end else if (en) begin
      key_q <= b_ge_a ? key_a : key_b;
      hc_q  <= b_ge_a ? hc_a  : hc_b;
      vc_q  <= b_ge_a ? vc_a  : vc_b;
    end
  end

endmodule
