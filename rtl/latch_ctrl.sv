// latch_ctrl - 4-phase bundled-data latch controller for any member of the
// untimed protocol family  Lcut o Rcut.
//
// The controller sits between an input channel (lr in, la out) and an output
// channel (rr out, ra in) and drives the data latch of its stage through a
// second 4-phase handshake (ren out, aen in).  It is the process
//     L | R | S | V | LATCH
// of the most concurrent protocol max, restricted to the states that the
// chosen cuts keep:
//   * L  : after lr rises, take the "space" token S, open and close the
//          latch (ren/aen handshake), put the "valid" token V, then raise la;
//          la falls after lr falls.
//   * R  : take V, raise rr; when ra rises give S back; drop rr; wait for ra
//          to fall.
//   * S  : starts full (the latch is free);  V : starts empty.
// On top of the token rules an output edge fires only if the state it leads
// to is kept in the shape Lcut o Rcut (see lp_pkg for rows and columns).  The
// controller tracks its shape position (row from rr and the last seen ra,
// column counted from the input channel) and asserts that it never leaves
// the shape.
//
// This is a clocked realisation of an untimed protocol: all inputs are
// sampled on the rising clock edge, every output is a register, and every
// output edge that is enabled fires on the next edge (maximal concurrency
// within the shape).  When la and rr are both enabled they fire together if
// the diagonal state is kept; otherwise rr goes first.  The gate-level,
// clockless controllers of the family are not reproduced; the cycle counts
// of this model stand in for their delays.
//
// Timing from the quiescent state, with a latch that answers one edge after
// ren: the edge that samples lr high is edge 0; ren rises after edge 1, aen
// after edge 2, ren falls after edge 3, aen after edge 4, V is put after edge
// 5 and la and rr rise after edge 6 (for max).  A stage therefore adds seven
// clock edges of forward latency when its output feeds the next
// stage.  Reset is asynchronous, active low, into the quiescent state (all
// signals low, row 1, column 3).  The concurrent assertions at the end are
// disabled during reset; because their disable condition reads rst_n at the
// clock, lint reports rst_n as used both asynchronously and synchronously.
// That use is in checks only, not in the circuit.
module latch_ctrl
  import lp_pkg::*;
#(
  parameter cut_t LCUT = 16'h0000,   // left cut, e.g. 16'h0022 for L0022
  parameter cut_t RCUT = 16'h0000    // right cut, e.g. 16'h2042 for R2042
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       lr,      // input channel request
  output logic       la,      // input channel acknowledge
  output logic       rr,      // output channel request
  input  logic       ra,      // output channel acknowledge
  output logic       ren,     // latch enable request (open the latch)
  input  logic       aen,     // latch enable acknowledge
  output logic [3:0] col_o,   // shape column (observability)
  output row_e       row_o    // shape row (observability)
);

  typedef enum logic [2:0] {
    L_IDLE,     // waiting for lr to rise (or la cycle in progress)
    L_WAIT_S,   // lr has risen, waiting for the space token S
    L_OPEN,     // latch open (ren = 1)
    L_CLOSE,    // latch closing (ren = 0, waiting aen low)
    L_DONE      // data stored and V put, la may rise
  } lstate_e;

  lstate_e    lst;
  logic       lr_s, ra_s;     // input values already accounted for
  logic       s_free, v_full;
  logic [3:0] col;

  row_e       row, row_after_rr;
  logic       lr_ev, ra_ev;
  logic       la_ok, rr_ok, fire_la, fire_rr;
  logic       take_s, put_v;
  int         col_i;
  logic [4:0] col_next;

  // Input-channel phase of a column (column mod 4).
  function automatic logic [1:0] in_phase(logic r, logic a);
    case ({r, a})
      2'b10:   return 2'd0;
      2'b11:   return 2'd1;
      2'b01:   return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  assign row   = row_of(rr, ra_s);
  assign col_i = int'(col);
  assign lr_ev = (lr != lr_s);
  assign ra_ev = (ra != ra_s);

  always_comb begin
    // Output enables: token rules of L and R, then the shape.
    la_ok = 1'b0;
    if (!la && lr_s && lst == L_DONE) la_ok = in_shape(LCUT, RCUT, row, col_i + 1);
    if (la && !lr_s)                  la_ok = in_shape(LCUT, RCUT, row, col_i + 1);

    rr_ok = 1'b0;
    if (!rr && !ra_s && v_full) rr_ok = in_shape(LCUT, RCUT, ROW2, col_i);
    if (rr && ra_s)             rr_ok = in_shape(LCUT, RCUT, ROW4, col_i);

    row_after_rr = rr_ok ? row_of(!rr, ra_s) : row;
    fire_rr = rr_ok;
    fire_la = la_ok && (!rr_ok || in_shape(LCUT, RCUT, row_after_rr, col_i + 1));

    take_s = (lst == L_WAIT_S) && s_free;
    put_v  = (lst == L_CLOSE) && !aen;

    col_next = 5'(col_i + int'(fire_la) + int'(lr_ev) - ((ra_ev && ra_s) ? 4 : 0));
  end

  assign ren   = (lst == L_OPEN);
  assign col_o = col;
  assign row_o = row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la     <= 1'b0;
      rr     <= 1'b0;
      lr_s   <= 1'b0;
      ra_s   <= 1'b0;
      col    <= 4'(COL_INIT);
      lst    <= L_IDLE;
      s_free <= 1'b1;
      v_full <= 1'b0;
    end else begin
      la   <= la ^ fire_la;
      rr   <= rr ^ fire_rr;
      lr_s <= lr;
      ra_s <= ra;
      col  <= col_next[3:0];

      case (lst)
        L_IDLE:   if (lr_ev && lr) lst <= L_WAIT_S;
        L_WAIT_S: if (take_s) lst <= L_OPEN;
        L_OPEN:   if (aen) lst <= L_CLOSE;
        L_CLOSE:  if (!aen) lst <= L_DONE;
        L_DONE:   if (fire_la) lst <= L_IDLE;
        default:  lst <= L_IDLE;
      endcase

      // S: taken by L before the latch opens, given back by R on ra rising.
      if (take_s)            s_free <= 1'b0;
      else if (ra_ev && ra)  s_free <= 1'b1;

      // V: put by L once the data is stored, taken by R on rr rising.
      if (put_v)                 v_full <= 1'b1;
      else if (fire_rr && !rr)   v_full <= 1'b0;
    end
  end

  // Protocol rules of the two channels and of the shape, checked on every
  // clock edge outside reset.
  // 4-phase input channel: lr changes only when it equals la.
  a_lr_order: assert property (@(posedge clk) disable iff (!rst_n) !lr_ev || lr_s == la)
    else $error("latch_ctrl: lr changed before la answered");
  // 4-phase output channel: ra changes only when it differs from rr.
  a_ra_order: assert property (@(posedge clk) disable iff (!rst_n) !ra_ev || ra_s != rr)
    else $error("latch_ctrl: ra changed without a pending rr edge");
  // Every reached state belongs to the shape Lcut o Rcut.
  a_in_shape: assert property (@(posedge clk) disable iff (!rst_n) in_shape(LCUT, RCUT, row, col_i))
    else $error("latch_ctrl: left the shape (row %0d, column %0d)", row, col);
  // The column stays inside the 13 columns of max.
  a_col_range: assert property (@(posedge clk) disable iff (!rst_n) col_next <= 5'd12)
    else $error("latch_ctrl: column out of range");
  // The column encodes the input-channel phase.
  a_col_phase: assert property (@(posedge clk) disable iff (!rst_n) col[1:0] == in_phase(lr_s, la))
    else $error("latch_ctrl: column %0d does not match lr=%0b la=%0b", col, lr_s, la);

endmodule
