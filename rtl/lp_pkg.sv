// lp_pkg - shared types and functions for the family of untimed 4-phase
// latch-controller protocols.
//
// Every protocol of the family is the most concurrent protocol "max" with
// states cut away.  The minimised state graph of max (its "shape") is a grid
// of 32 states:
//   * the row is the phase of the output channel (rr, ra):
//       row 1: rr=0 ra=0   row 2: rr=1 ra=0   row 3: rr=1 ra=1   row 4: rr=0 ra=1
//   * the column counts input-channel transitions (lr, la) relative to the
//     output channel; it advances by one on every lr or la edge and goes back
//     by four when the output channel completes a cycle (ra falling takes
//     row 4, column c to row 1, column c-4).
//   * column c has the input phase c mod 4:
//       0: lr=1 la=0   1: lr=1 la=1   2: lr=0 la=1   3: lr=0 la=0
//   * max holds row 1 columns 0..8, row 2 columns 4..8 and rows 3 and 4
//     columns 4..12.  The reset (quiescent) state is row 1, column 3.
//
// A cut is written as four hex nibbles, exactly as the protocol names are
// written: right cut R2042 is 16'h2042, left cut L0033 is 16'h0033.
//   * right cut Rabcd removes a, b, c, d states from the right end of rows
//     1, 2, 3, 4;
//   * left cut Labcd removes a, b, c states from the left of rows 2, 3, 4
//     (starting at column 4) and d states from the left of row 1 (column 0).
// The cut ranges, the untimed (SI/DI) rules and the liveness rule are the
// family's; the column/row numbering is this package's way of writing them.
// The lists of the 10 untimed left cuts and 25 untimed right cuts are
// computed from those rules, not stored.
package lp_pkg;

  typedef logic [15:0] cut_t;   // nibbles a, b, c, d (a in [15:12])

  localparam int NUM_LCUTS = 10;
  localparam int NUM_RCUTS = 25;

  // Rows of the shape, named after the output-channel phase.
  typedef enum logic [1:0] {
    ROW1 = 2'd0,   // rr=0 ra=0
    ROW2 = 2'd1,   // rr=1 ra=0
    ROW3 = 2'd2,   // rr=1 ra=1
    ROW4 = 2'd3    // rr=0 ra=1
  } row_e;

  localparam int COL_INIT = 3;   // column of the quiescent state

  function automatic int nib(cut_t c, int i);  // i = 0 selects a
    return int'(c[15-4*i -: 4]);
  endfunction

  function automatic row_e row_of(logic rr, logic ra);
    case ({rr, ra})
      2'b00:   return ROW1;
      2'b10:   return ROW2;
      2'b11:   return ROW3;
      default: return ROW4;
    endcase
  endfunction

  // Leftmost and rightmost surviving column of a row under a pair of cuts.
  function automatic int row_lo(cut_t lcut, row_e r);
    case (r)
      ROW1:    return nib(lcut, 3);
      ROW2:    return 4 + nib(lcut, 0);
      ROW3:    return 4 + nib(lcut, 1);
      default: return 4 + nib(lcut, 2);
    endcase
  endfunction

  function automatic int row_hi(cut_t rcut, row_e r);
    case (r)
      ROW1:    return 8 - nib(rcut, 0);
      ROW2:    return 8 - nib(rcut, 1);
      ROW3:    return 12 - nib(rcut, 2);
      default: return 12 - nib(rcut, 3);
    endcase
  endfunction

  // Is state (row, column) kept in the shape Lcut o Rcut?
  function automatic logic in_shape(cut_t lcut, cut_t rcut, row_e r, int col);
    return (col >= row_lo(lcut, r)) && (col <= row_hi(rcut, r));
  endfunction

  // Right cut range (Eqn 2 of the family definition).
  function automatic logic rcut_valid(cut_t c);
    int a, b, cc, d;
    a = nib(c, 0); b = nib(c, 1); cc = nib(c, 2); d = nib(c, 3);
    return a <= 4 && b <= 4 && cc <= 8 && d <= 8 &&
           a >= b && b + 4 >= cc && cc >= d && d >= a;
  endfunction

  // Left cut range (Eqn 3).
  function automatic logic lcut_valid(cut_t c);
    int a, b, cc, d;
    a = nib(c, 0); b = nib(c, 1); cc = nib(c, 2); d = nib(c, 3);
    return d <= 3 && a <= b && b <= cc && cc <= d;
  endfunction

  // Speed-independent rule R1 (inputs always accepted), Eqn 5.
  function automatic logic rcut_si(cut_t c);
    return rcut_valid(c) && c[12] == 1'b0 && c[8] == 1'b0 && c[4] == 1'b0 && c[0] == 1'b0;
  endfunction

  function automatic logic lcut_si(cut_t c);
    return lcut_valid(c) && nib(c, 0) == nib(c, 1) && nib(c, 2) == nib(c, 3);
  endfunction

  // Delay-insensitive rules R1 and R2, Eqn 6 (same form for both sides).
  function automatic logic cut_di(cut_t c);
    return c[12] == 1'b0 && c[8] == 1'b0 && c[4] == 1'b0 && c[0] == 1'b0 &&
           nib(c, 0) == nib(c, 1) && nib(c, 2) == nib(c, 3);
  endfunction

  // Liveness of Lcut o Rcut (Eqn 4): every row keeps a state and every
  // vertical move between neighbouring rows keeps a path.
  function automatic logic is_live(cut_t lcut, cut_t rcut);
    int la, lb, lc, ld, ra, rb, rc, rd;
    la = nib(lcut, 0); lb = nib(lcut, 1); lc = nib(lcut, 2); ld = nib(lcut, 3);
    ra = nib(rcut, 0); rb = nib(rcut, 1); rc = nib(rcut, 2); rd = nib(rcut, 3);
    return la + rb < 5 && lb + rc < 9 && lc + rd < 9 &&
           la + ra < 5 && lb + rb < 5 && lc + rc < 9 && ld + rd < 9;
  endfunction

  // The i-th untimed left cut, in increasing order of (a, c).
  function automatic cut_t lcut_at(int idx);
    int n;
    if (idx < 0 || idx >= NUM_LCUTS) return '0;
    n = 0;
    for (int a = 0; a <= 3; a++)
      for (int c = a; c <= 3; c++) begin
        if (n == idx) return cut_t'((a << 12) | (a << 8) | (c << 4) | c);
        n++;
      end
    return '0;
  endfunction

  // The i-th untimed right cut, in increasing numeric order.
  function automatic cut_t rcut_at(int idx);
    int n;
    cut_t c;
    if (idx < 0 || idx >= NUM_RCUTS) return '0;
    n = 0;
    for (int a = 0; a <= 4; a += 2)
      for (int b = 0; b <= 4; b += 2)
        for (int cc = 0; cc <= 8; cc += 2)
          for (int d = 0; d <= 8; d += 2) begin
            c = cut_t'((a << 12) | (b << 8) | (cc << 4) | d);
            if (rcut_si(c)) begin
              if (n == idx) return c;
              n++;
            end
          end
    return '0;
  endfunction

  // Occupancy class of a pipelined shape, as predicted from its right cut.
  typedef enum logic [1:0] {
    OCC_FULL = 2'd0,   // every stage can hold a token in a stalled pipeline
    OCC_HALF = 2'd1,   // every other stage
    OCC_NONE = 2'd2    // unpipelined: at most one token in the whole pipeline
  } occ_e;

  // The family groups right cuts R0000..R2262 as fully occupied, R2244,
  // R2264, R4244 and R4264 as half occupied and the rest as unpipelined.
  // That grouping is equivalent to: unpipelined when row 2 keeps only its
  // first column (b = 4) or row 4 loses its last six (d >= 6); half when
  // row 2 cannot reach column 8 (b >= 2) and row 4 cannot reach column 9
  // (d >= 4); full otherwise.
  function automatic occ_e occ_of_rcut(cut_t rcut);
    int b, d;
    b = nib(rcut, 1); d = nib(rcut, 3);
    if (b >= 4 || d >= 6) return OCC_NONE;
    if (b >= 2 && d >= 4) return OCC_HALF;
    return OCC_FULL;
  endfunction

endpackage
