// Control circuit of the sub-pixel ME coprocessor.
//
// Sequences one refinement job at a time: it accepts an integer-pixel motion
// vector (IPA MV) and its SAD from the host (ipa_valid/ipa_ready
// handshake), waits until the SA and RA buffers both hold a full bank for
// the job, starts the ME architecture for one cycle, and when the best
// candidate arrives returns the refined vector (SPA MV) in 1/K-pixel units,
// spa = K * ipa + displacement, with a one-cycle spa_valid pulse.
// spa_over tells that every candidate exceeded the threshold, so spa_sad is
// the threshold itself. It then frees both buffer banks and moves to the
// other bank, so the host can fill buffers ahead of time. The IPA SAD is passed to the array as the
// power-saving threshold. The handshake and the one-job-at-a-time order are
// this design's choices.
module cop_ctrl #(
  parameter int unsigned SW  = 16,
  parameter int unsigned CW  = 2,
  parameter int unsigned K   = 2,
  parameter int unsigned MVW = 8,
  parameter int unsigned OW  = MVW + $clog2(K) + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host command
  input  logic                  ipa_valid,
  output logic                  ipa_ready,
  input  logic signed [MVW-1:0] ipa_mvx,
  input  logic signed [MVW-1:0] ipa_mvy,
  input  logic [SW-1:0]         ipa_sad,
  // buffers
  input  logic [1:0]            sa_full,
  input  logic [1:0]            ra_full,
  output logic                  rd_bank,
  output logic                  rel,
  // ME architecture
  output logic                  me_start,
  output logic [SW-1:0]         int_sad,
  input  logic                  mv_valid,
  input  logic signed [CW-1:0]  mv_hc,
  input  logic signed [CW-1:0]  mv_vc,
  input  logic [SW-1:0]         mv_sad,
  input  logic                  mv_over,
  // result
  output logic                  spa_valid,
  output logic signed [OW-1:0]  spa_mvx,
  output logic signed [OW-1:0]  spa_mvy,
  output logic [SW-1:0]         spa_sad,
  output logic                  spa_over
);

  typedef enum logic [1:0] {C_CMD, C_DATA, C_START, C_RUN} cstate_e;

  cstate_e               st;
  logic signed [MVW-1:0] mvx, mvy;

  assign ipa_ready = (st == C_CMD);
  assign me_start  = (st == C_START);
  assign rel       = (st == C_RUN) && mv_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= C_CMD;
      mvx       <= '0;
      mvy       <= '0;
      int_sad   <= '0;
      rd_bank   <= 1'b0;
      spa_valid <= 1'b0;
      spa_mvx   <= '0;
      spa_mvy   <= '0;
      spa_sad   <= '0;
      spa_over  <= 1'b0;
    end else begin
      spa_valid <= 1'b0;
      unique case (st)
        C_CMD: if (ipa_valid) begin
          mvx     <= ipa_mvx;
          mvy     <= ipa_mvy;
          int_sad <= ipa_sad;
          st      <= C_DATA;
        end
        C_DATA:  if (sa_full[rd_bank] && ra_full[rd_bank]) st <= C_START;
        C_START: st <= C_RUN;
        C_RUN: if (mv_valid) begin
          spa_valid <= 1'b1;
          spa_mvx   <= OW'(mvx) * OW'(K) + OW'(mv_hc);
          spa_mvy   <= OW'(mvy) * OW'(K) + OW'(mv_vc);
          spa_sad   <= mv_sad;
          spa_over  <= mv_over;
          rd_bank   <= ~rd_bank;
          st        <= C_CMD;
        end
        default: st <= C_CMD;
      endcase
    end
  end

  // the ME architecture is started only on complete data
  a_start: assert property (@(posedge clk) disable iff (!rst_n)
                            me_start |-> (sa_full[rd_bank] && ra_full[rd_bank]))
    else $error("ME started without full buffers");

endmodule
