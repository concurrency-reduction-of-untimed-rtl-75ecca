// lp_family_tb - runs protocols of the untimed family in a 4-deep series
// pipeline between a random source and a random sink.
//
// With ALL_SHAPES = 1 it builds every one of the 159 live shapes (slow to
// compile: over 600 controllers).  By default it builds
// a covering subset: every right cut with L0000, every left cut with R0000,
// and the three circuits drawn in the family study (L2233 o R2244,
// L0033 o R4244, L0022 o R2042); that covers every occupancy class and every
// cut on each side.  For each shape built it
//   1. streams tokens with a random source and sink and checks that the
//      tokens come out complete and in order,
//   2. stalls the sink, lets the pipeline fill, and checks the number of
//      tokens acknowledged but not delivered against the occupancy class of
//      the right cut (full: one per stage, half: one per two stages,
//      unpipelined: at most one in the whole pipeline, whatever its depth;
//      R2266 and R4266 hold one, the other unpipelined cuts none),
//   3. releases the sink and checks that everything drains.
module lp_family_tb;
  import lp_pkg::*;

  localparam int DEPTH = 4;
  localparam int CW    = 16;
  localparam bit ALL_SHAPES = 1'b0;

  function automatic bit build(int i, int j);
    cut_t l, r;
    l = lcut_at(i); r = rcut_at(j);
    return is_live(l, r) && (ALL_SHAPES || i == 0 || j == 0 ||
           (l == 16'h2233 && r == 16'h2244) || (l == 16'h0033 && r == 16'h4244) ||
           (l == 16'h0022 && r == 16'h2042));
  endfunction

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic go_l, go_r_rand, stall;
  logic go_r, go_src;
  logic go_l_off = 1'b0;
  int   checks = 0, failures = 0;
  int   cycle = 0;

  always #5 clk = ~clk;
  assign go_r   = go_r_rand & ~stall;
  assign go_src = go_l & ~go_l_off;

  always_ff @(posedge clk) begin
    go_l      <= ($urandom_range(0, 3) != 0);
    go_r_rand <= ($urandom_range(0, 3) != 0);
    cycle     <= cycle + 1;
  end

  // Expected tokens acknowledged but not delivered by a stalled DEPTH-deep
  // pipeline.  An unpipelined pipeline holds at most one such token in
  // total, so for that class the check is "at most one".
  function automatic int expected_occ(cut_t rcut);
    case (occ_of_rcut(rcut))
      OCC_FULL: return DEPTH;
      OCC_HALF: return DEPTH / 2;
      default:  return 0;
    endcase
  endfunction

  localparam int NL = NUM_LCUTS;
  localparam int NR = NUM_RCUTS;

  logic [CW-1:0] sp_sent [NL][NR];
  logic [CW-1:0] sp_recv [NL][NR];
  logic [7:0]    sp_last [NL][NR];
  logic          live    [NL][NR];
  int            order_err [NL][NR];

  for (genvar i = 0; i < NL; i++) begin : g_l
    for (genvar j = 0; j < NR; j++) begin : g_r
      localparam cut_t LC = lcut_at(i);
      localparam cut_t RC = rcut_at(j);
      if (build(i, j)) begin : g_live
        logic sp_lr, sp_la, sp_rr, sp_ra;
        logic [7:0] sp_din, sp_dout;
        hs_source #(.WIDTH(8), .CW(CW)) u_src (
          .clk, .rst_n, .go(go_src), .lr(sp_lr), .la(sp_la), .data(sp_din),
          .sent(sp_sent[i][j])
        );
        series_pipe #(.LCUT(LC), .RCUT(RC), .WIDTH(8), .DEPTH(DEPTH)) u_sp (
          .clk, .rst_n, .lr(sp_lr), .la(sp_la), .din(sp_din),
          .rr(sp_rr), .ra(sp_ra), .dout(sp_dout)
        );
        hs_sink #(.WIDTH(8), .CW(CW)) u_snk (
          .clk, .rst_n, .go(go_r), .rr(sp_rr), .ra(sp_ra), .data(sp_dout),
          .last(sp_last[i][j]), .recv(sp_recv[i][j])
        );
        assign live[i][j] = 1'b1;
        // Each delivered token must be the next number in sequence.
        logic [CW-1:0] sp_recv_q;
        always_ff @(posedge clk) begin
          sp_recv_q <= sp_recv[i][j];
          if (rst_n && sp_recv[i][j] != sp_recv_q && sp_last[i][j] != 8'(sp_recv[i][j] - 1'b1))
            order_err[i][j] <= order_err[i][j] + 1;
        end
      end else begin : g_dead
        assign live[i][j] = 1'b0;
        assign sp_sent[i][j] = '0;
        assign sp_recv[i][j] = '0;
        assign sp_last[i][j] = '0;
      end
    end
  end

  initial begin
    for (int i = 0; i < NL; i++)
      for (int j = 0; j < NR; j++) order_err[i][j] = 0;
  end

  int nlive, nbuilt, occ_count [3];

  initial begin
    stall = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 1. random streaming
    repeat (1500) @(posedge clk);
    // 2. stall and fill
    stall = 1'b1;
    repeat (400) @(posedge clk);
    nlive = 0;
    nbuilt = 0;
    occ_count = '{0, 0, 0};
    // Counts over the whole family, from the cut rules.
    for (int i = 0; i < NL; i++)
      for (int j = 0; j < NR; j++)
        if (is_live(lcut_at(i), rcut_at(j))) begin
          nlive++;
          occ_count[occ_of_rcut(rcut_at(j))]++;
        end
    for (int i = 0; i < NL; i++)
      for (int j = 0; j < NR; j++)
        if (live[i][j]) begin
          int sp_held;
          nbuilt++;
          sp_held = int'(sp_sent[i][j]) - int'(sp_recv[i][j]);
          checks++;
          if (occ_of_rcut(rcut_at(j)) == OCC_NONE ? sp_held > 1
                                                  : sp_held != expected_occ(rcut_at(j))) begin
            failures++;
            $display("FAIL L%04h o R%04h: series pipeline holds %0d tokens, expected %0d",
                     lcut_at(i), rcut_at(j), sp_held, expected_occ(rcut_at(j)));
          end
          checks++;
          if (sp_recv[i][j] < 16'd20) begin
            failures++;
            $display("FAIL L%04h o R%04h: only %0d tokens delivered", lcut_at(i), rcut_at(j),
                     sp_recv[i][j]);
          end
        end
    checks++;
    if (nlive != 159) begin
      failures++;
      $display("FAIL %0d live shapes, expected 159", nlive);
    end
    checks++;
    if (occ_count[OCC_NONE] != 22) begin
      failures++;
      $display("FAIL %0d unpipelined live shapes, expected 22", occ_count[OCC_NONE]);
    end
    $display("%0d shapes simulated", nbuilt);
    $display("live %0d: full %0d half %0d unpipelined %0d", nlive,
             occ_count[OCC_FULL], occ_count[OCC_HALF], occ_count[OCC_NONE]);
    // 3. drain
    stall = 1'b0;
    go_l_off = 1'b1;
    repeat (600) @(posedge clk);
    for (int i = 0; i < NL; i++)
      for (int j = 0; j < NR; j++)
        if (live[i][j]) begin
          checks++;
          if (sp_sent[i][j] != sp_recv[i][j]) begin
            failures++;
            $display("FAIL L%04h o R%04h: not drained", lcut_at(i), rcut_at(j));
          end
          checks++;
          if (order_err[i][j] != 0) begin
            failures++;
            $display("FAIL L%04h o R%04h: %0d tokens out of order", lcut_at(i), rcut_at(j),
                     order_err[i][j]);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
