// Control unit of the sub-pixel ME architecture.
//
// Three small parts synchronised by a few signals:
//  * SA line counter: counts the line sets loaded into the array (loads)
//    and the sets fetched into the SA input buffer (fset); it signals
//    last_line when the array holds the lines of the last reference row.
//  * Reference pixel counter: counts the reference pixels of the current
//    row (pix) and the RA lines loaded into the RA input buffer (ra_line);
//    it signals pix_last when the last pixel of a row has been loaded
//    toward the PEs, which is also when the next RA line is loaded.
//  * A nine-state Moore machine whose outputs depend on the state only:
//      IDLE       wait for start
//      FETCH      fetch SA line set 0 into the SA input buffer
//      LOAD_PRE   first upward shift (set 0), next set fetched, RA line 0
//                 loaded into the RA input buffer
//      LOAD_FIRST second upward shift (set 1), accumulators cleared and
//                 threshold loaded
//      RUN_R      forward row: accumulate, shift right
//      TURN_R     last pixel of a forward row: accumulate, shift up (new
//                 lines enter rotated by N-1 pixels)
//      RUN_L      backward row: accumulate, shift left
//      TURN_L     last pixel of a backward row: accumulate, shift up
//      LAST       last pixel of the last row: accumulate, no shift
//    The cycle after LAST raises cmp_start: the PE results are final and
//    enter the comparison tree, while the next block may already be
//    fetching.
// Timing: a block occupies the array for N*N + 3 cycles (FETCH, LOAD_PRE,
// LOAD_FIRST and N*N accumulation cycles). Requires N >= 2.
// The state list, the split of work between states and the three-cycle
// preamble are this design's choices; the three parts and the nine-state
// Moore machine follow the architecture.
module me_ctrl
  import me_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned CNTW = $clog2(N + 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  // array
  output sa_op_e          op,
  output logic            acc_clr,
  output logic            acc_en,
  output logic            cmp_start,
  // SA input buffer
  output logic            sa_fill,
  output logic            sa_rot,
  output logic [CNTW-1:0] sa_set,     // SA line set to fetch (0..N)
  // RA input buffer
  output logic            ra_load,
  output logic            ra_rev,     // 1: present the line reversed
  output logic [CNTW-1:0] ra_line     // RA line to load (0..N-1)
);

  typedef enum logic [3:0] {
    IDLE, FETCH, LOAD_PRE, LOAD_FIRST, RUN_R, TURN_R, RUN_L, TURN_L, LAST
  } state_e;

  state_e          state, state_n;
  logic [CNTW-1:0] loads, pix, fset;
  logic            last_line, pix_last;

  // SA line counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loads <= '0;
      fset  <= '0;
    end else begin
      if (state == IDLE || state == LAST) begin
        loads <= '0;
        fset  <= '0;
      end else begin
        if (op == SA_UP) loads <= loads + CNTW'(1);
        if (sa_fill)     fset  <= fset + CNTW'(1);
      end
    end
  end
  assign last_line = (loads == CNTW'(N + 1));
  assign sa_set    = fset;

  // reference pixel counter
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix     <= '0;
      ra_line <= '0;
    end else begin
      if (state == RUN_R || state == RUN_L) pix <= pix + CNTW'(1);
      else                                  pix <= '0;
      if (state == IDLE || state == LAST) ra_line <= '0;
      else if (ra_load)                   ra_line <= ra_line + CNTW'(1);
    end
  end
  assign pix_last = (pix == CNTW'(N - 2));

  // state machine
  always_comb begin
    state_n = state;
    unique case (state)
      IDLE:       if (start) state_n = FETCH;
      FETCH:      state_n = LOAD_PRE;
      LOAD_PRE:   state_n = LOAD_FIRST;
      LOAD_FIRST: state_n = RUN_R;
      RUN_R:      if (pix_last) state_n = last_line ? LAST : TURN_R;
      TURN_R:     state_n = RUN_L;
      RUN_L:      if (pix_last) state_n = last_line ? LAST : TURN_L;
      TURN_L:     state_n = RUN_R;
      LAST:       state_n = start ? FETCH : IDLE;
      default:    state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      cmp_start <= 1'b0;
    end else begin
      state     <= state_n;
      cmp_start <= (state == LAST);
    end
  end

  // Moore outputs
  always_comb begin
    op      = SA_HOLD;
    acc_clr = 1'b0;
    acc_en  = 1'b0;
    sa_fill = 1'b0;
    sa_rot  = 1'b0;
    unique case (state)
      FETCH:      sa_fill = 1'b1;
      LOAD_PRE:   begin op = SA_UP; sa_fill = 1'b1; end
      LOAD_FIRST: begin op = SA_UP; sa_fill = 1'b1; acc_clr = 1'b1; end
      RUN_R:      begin op = SA_RIGHT; acc_en = 1'b1; end
      RUN_L:      begin op = SA_LEFT;  acc_en = 1'b1; end
      TURN_R:     begin op = SA_UP; sa_rot = 1'b1; acc_en = 1'b1; sa_fill = 1'b1; end
      TURN_L:     begin op = SA_UP; acc_en = 1'b1; sa_fill = 1'b1; end
      LAST:       acc_en = 1'b1;
      default:    ;
    endcase
  end

  // RA line load: line 0 in LOAD_PRE, later lines when a row's last pixel
  // has been passed on (reference pixel counter), except after the last row.
  assign ra_load = (state == LOAD_PRE) ||
                   ((state == RUN_R || state == RUN_L) && pix_last && !last_line);
  // even lines run forward and are loaded reversed (ra_piso emits px[N-1] first)
  assign ra_rev  = ~ra_line[0];
  assign busy    = (state != IDLE);

  // rules of the schedule
  a_clr_en: assert property (@(posedge clk) disable iff (!rst_n) !(acc_clr && acc_en))
    else $error("accumulator cleared and enabled in the same cycle");
  a_rows: assert property (@(posedge clk) disable iff (!rst_n)
                           (state == RUN_R || state == RUN_L) |-> pix <= CNTW'(N - 2))
    else $error("reference pixel counter ran past the row");

endmodule
