// Passive processing element: one search-area (SA) sample store.
//
// A passive PE is the SA transfer circuit of an active PE alone: one W-bit
// register that, on each clock edge, keeps its sample or takes the sample of
// the PE below (s_down), of its left neighbour (s_lin, used when the array
// shifts right) or of its right neighbour (s_rin, used when it shifts left).
// The neighbours are K columns and K rows away, which interleaves the
// sub-pixel grid; that wiring is made by pe_array. Passive PEs hold SA data
// inside the array so that no sample is fetched twice from picture memory.
// The published PE drawing also has a register on the S_Down path; this design
// leaves it out because the array moves every sample up in the same cycle
// the command arrives, and an extra stage would need a compensating delay.
// Timing: the new sample is visible one cycle after the command. Reset
// clears the sample to zero.
module passive_pe
  import me_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  sa_op_e       op,
  input  logic [W-1:0] s_down,
  input  logic [W-1:0] s_lin,
  input  logic [W-1:0] s_rin,
  output logic [W-1:0] s
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s <= '0;
    else begin
      unique case (op)
        SA_UP:    s <= s_down;
        SA_RIGHT: s <= s_lin;
        SA_LEFT:  s <= s_rin;
        default:  s <= s;
      endcase
    end
  end

endmodule
