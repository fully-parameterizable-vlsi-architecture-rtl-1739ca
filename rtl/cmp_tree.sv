// Comparison unit: pipelined binary tree of comparator PEs.
//
// M candidate keys with their coordinates enter in parallel; each tree
// level halves them with cmp_node comparators and registers the winners,
// so the lowest key (ties to the lower index) leaves after LV = clog2(M)
// cycles together with its hc/vc coordinates. When M is not a power of two
// the missing leaves are filled with the largest key, which never wins.
// in_valid travels with the data and comes out as out_valid. The tree
// accepts a new set every cycle.
module cmp_tree #(
  parameter int unsigned M  = 9,
  parameter int unsigned KW = 17,
  parameter int unsigned CW = 2,
  parameter int unsigned LV = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned P  = 1 << LV
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [KW-1:0] key [M],
  input  logic [CW-1:0] hc  [M],
  input  logic [CW-1:0] vc  [M],
  output logic          out_valid,
  output logic [KW-1:0] out_key,
  output logic [CW-1:0] out_hc,
  output logic [CW-1:0] out_vc
);

  logic [KW-1:0] tk [LV+1][P];
  logic [CW-1:0] th [LV+1][P];
  logic [CW-1:0] tv [LV+1][P];
  logic [LV:0]   vld;

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < M) begin : g_used
      assign tk[0][i] = key[i];
      assign th[0][i] = hc[i];
      assign tv[0][i] = vc[i];
    end else begin : g_pad
      assign tk[0][i] = '1;
      assign th[0][i] = '0;
      assign tv[0][i] = '0;
    end
  end

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar i = 0; i < (P >> (l + 1)); i++) begin : g_node
      cmp_node #(.KW(KW), .CW(CW)) u_node (
        .clk, .rst_n,
        .en    (1'b1),
        .key_a (tk[l][2*i]),   .hc_a (th[l][2*i]),   .vc_a (tv[l][2*i]),
        .key_b (tk[l][2*i+1]), .hc_b (th[l][2*i+1]), .vc_b (tv[l][2*i+1]),
        .key_q (tk[l+1][i]),   .hc_q (th[l+1][i]),   .vc_q (tv[l+1][i])
      );
    end
    // unused upper slots of this level
    for (genvar i = (P >> (l + 1)); i < P; i++) begin : g_fill
      assign tk[l+1][i] = '1;
      assign th[l+1][i] = '0;
      assign tv[l+1][i] = '0;
    end
  end

  assign vld[0] = in_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld[LV:1] <= '0;
    else        vld[LV:1] <= vld[LV-1:0];
  end

  assign out_valid = vld[LV];
  assign out_key   = tk[LV][0];
  assign out_hc    = th[LV][0];
  assign out_vc    = tv[LV][0];

endmodule
