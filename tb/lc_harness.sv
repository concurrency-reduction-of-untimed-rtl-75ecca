// lc_harness - test harness for one latch_ctrl: random 4-phase environments
// on the input channel, the output channel and the latch enable, plus
// checks of the controller against a reference shape built here.
//
// The reference shape starts from the 32 states of max (row 1: columns
// 0..8, row 2: 4..8, rows 3 and 4: 4..12) and removes, per row, the number
// of states the cut names from the row's right end (right cut) or from its
// left end (left cut; row 1 from column 0, the others from column 4).  The
// harness follows the controller's position from the edges it sees and
// checks, every cycle:
//   * the position is a state of the reference shape;
//   * la only moves towards lr and rr only towards the opposite of ra;
//   * la and rr never rise for a token whose latch handshake is unfinished;
//   * the latch is never reopened before the previous token was
//     acknowledged downstream (ra rising).
module lc_harness #(
  parameter logic [15:0] LCUT = 16'h0000,
  parameter logic [15:0] RCUT = 16'h0000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   handshakes,   // completed input handshakes (la rising)
  output int   states_seen   // distinct shape states visited
);
  import lp_pkg::*;

  logic lr, la, rr, ra, ren, aen;
  logic [3:0] col_o;
  row_e row_o;

  latch_ctrl #(.LCUT(LCUT), .RCUT(RCUT)) dut (
    .clk, .rst_n, .lr, .la, .rr, .ra, .ren, .aen, .col_o, .row_o
  );

  // Reference shape.
  logic [3:0][12:0] mask;
  function automatic logic [3:0][12:0] build_mask(logic [15:0] lc, logic [15:0] rc);
    logic [3:0][12:0] m;
    int first [4] = '{0, 4, 4, 4};
    int last  [4] = '{8, 8, 12, 12};
    int lcut  [4];
    int rcut  [4];
    lcut = '{int'(lc[3:0]), int'(lc[15:12]), int'(lc[11:8]), int'(lc[7:4])};
    rcut = '{int'(rc[15:12]), int'(rc[11:8]), int'(rc[7:4]), int'(rc[3:0])};
    m = '0;
    for (int r = 0; r < 4; r++)
      for (int c = first[r]; c <= last[r]; c++) m[r][c] = 1'b1;
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < lcut[r]; k++) m[r][first[r] + k] = 1'b0;
      for (int k = 0; k < rcut[r]; k++) m[r][last[r] - k] = 1'b0;
    end
    return m;
  endfunction
  assign mask = build_mask(LCUT, RCUT);

  // Random environments.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lr <= 1'b0; ra <= 1'b0; aen <= 1'b0;
    end else begin
      if (lr == la && $urandom_range(0, 2) == 0) lr <= ~lr;
      if (ra != rr && $urandom_range(0, 2) == 0) ra <= rr;
      if (aen != ren && $urandom_range(0, 1) == 0) aen <= ren;
    end
  end

  // Observation.
  logic lr_q, la_q, rr_q, ra_q, ren_q, aen_q;
  int   col, row;
  int   latched, rr_up, la_up, ren_up, ra_up;
  logic [3:0][12:0] seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {lr_q, la_q, rr_q, ra_q, ren_q, aen_q} <= '0;
      col <= 3; row <= 0;
      latched <= 0; rr_up <= 0; la_up <= 0; ren_up <= 0; ra_up <= 0;
      checks <= 0; failures <= 0; seen <= '0;
    end else begin : obs
      int c, r, f, n;
      c = col; f = 0; n = 0;
      {lr_q, la_q, rr_q, ra_q, ren_q, aen_q} <= {lr, la, rr, ra, ren, aen};
      if (lr != lr_q) c++;
      if (la != la_q) c++;
      if (ra_q && !ra) c -= 4;
      r = (!rr && !ra) ? 0 : (rr && !ra) ? 1 : (rr && ra) ? 2 : 3;
      col <= c; row <= r;
      if (aen_q && !aen) latched <= latched + 1;
      if (rr && !rr_q) rr_up <= rr_up + 1;
      if (la && !la_q) la_up <= la_up + 1;
      if (ren && !ren_q) ren_up <= ren_up + 1;
      if (ra && !ra_q) ra_up <= ra_up + 1;
      // position in the shape
      n++;
      if (c < 0 || c > 12 || !mask[r][c]) begin
        f++; $display("FAIL L%04h o R%04h: state row %0d column %0d not in shape", LCUT, RCUT, r + 1, c);
      end else seen[r][c] <= 1'b1;
      // outputs move in protocol order
      n++;
      if ((la != la_q && la_q == lr_q) || (rr != rr_q && rr_q != ra_q)) begin
        f++; $display("FAIL L%04h o R%04h: output edge out of protocol order", LCUT, RCUT);
      end
      // s2, s3: data latched before la and rr rise
      n++;
      if ((rr && !rr_q && rr_up + 1 > latched) || (la && !la_q && la_up + 1 > latched)) begin
        f++; $display("FAIL L%04h o R%04h: la or rr rose before the data was latched", LCUT, RCUT);
      end
      // s4: latch reopened only after the previous token was acknowledged
      n++;
      if (ren && !ren_q && ren_up > ra_up) begin
        f++; $display("FAIL L%04h o R%04h: latch reopened before ra rose", LCUT, RCUT);
      end
      checks <= checks + n;
      failures <= failures + f;
    end
  end

  assign handshakes = la_up;
  always_comb begin
    states_seen = 0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 13; c++) states_seen += int'(seen[r][c]);
  end
endmodule
