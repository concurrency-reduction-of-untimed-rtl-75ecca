// lp_char_tb - characterisation of a few protocols of the family in a
// 4-deep series pipeline, measured the way the family study measures its
// gate-level controllers, but in clock edges of this clocked realisation.
//
// Each protocol gets its own pipeline with the behavioural interfaces
// hs_source (left: request = go AND NOT acknowledge) and hs_sink (right:
// acknowledge = go AND request).  Three phases, all pipelines in parallel:
//   1. forward latency: one token into the idle pipeline, edges from lr
//      rising at the input to rr rising at the output (reported per stage
//      as total / 4);
//   2. cycle time: twelve tokens offered as fast as the pipeline takes them
//      and consumed at once; the largest gap between two adjacent insertions
//      (la rising at the input) is the cycle time;
//   3. backward latency: the sink is stalled until the pipeline is full,
//      then released; edges from ra rising at the output to la rising at the
//      input (the next token entering).
// Checks: forward latency of max is 28 edges (7 per stage, see latch_ctrl),
// all twelve tokens arrive in order and every measurement completes.  The
// numbers are printed for the record; the ps figures of the study depend on gates and layout and are
// not comparable.
module lp_char_tb;
  import lp_pkg::*;

  localparam int DEPTH = 4;
  localparam int CW    = 16;
  localparam int ND    = 5;
  // max, smallest backward latency, smallest forward latency, best cycle
  // time, and the runner-up fully buffered forward latency design.
  localparam cut_t LCUTS [ND] = '{16'h0000, 16'h2233, 16'h0033, 16'h0022, 16'h0033};
  localparam cut_t RCUTS [ND] = '{16'h0000, 16'h2244, 16'h4244, 16'h2042, 16'h2242};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  logic go_r = 1'b1;
  int   limit = 1;          // tokens the sources may insert in total
  int   t_ph2 = -1;         // edge at which phase 2 starts
  int   t_ra0 = -1;         // edge at which the sinks are released

  int   sent_i [ND], recv_i [ND], order_err [ND];
  int   t_lr [ND], t_rr [ND], t_la_after [ND], max_gap [ND];

  for (genvar k = 0; k < ND; k++) begin : g_d
    logic lr, la, rr, ra;
    logic [7:0] din, dout, last;
    logic [CW-1:0] sent, recv, recv_q;
    logic la_q;
    int   t_last_ins;

    hs_source #(.WIDTH(8), .CW(CW)) u_src (
      .clk, .rst_n, .go(int'(sent) < limit), .lr, .la, .data(din), .sent
    );
    series_pipe #(.LCUT(LCUTS[k]), .RCUT(RCUTS[k]), .WIDTH(8), .DEPTH(DEPTH)) u_sp (
      .clk, .rst_n, .lr, .la, .din, .rr, .ra, .dout
    );
    hs_sink #(.WIDTH(8), .CW(CW)) u_snk (
      .clk, .rst_n, .go(go_r), .rr, .ra, .data(dout), .last, .recv
    );

    assign sent_i[k] = int'(sent);
    assign recv_i[k] = int'(recv);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        t_lr[k] <= -1; t_rr[k] <= -1; t_la_after[k] <= -1;
        max_gap[k] <= 0; t_last_ins <= -1; order_err[k] <= 0;
        la_q <= 1'b0; recv_q <= '0;
      end else begin
        la_q   <= la;
        recv_q <= recv;
        if (lr && t_lr[k] < 0) t_lr[k] <= cyc;
        if (rr && t_rr[k] < 0) t_rr[k] <= cyc;
        // Token insertions: la rising at the input.
        if (la && !la_q) begin
          if (limit == 13 && t_ph2 >= 0 && t_last_ins >= t_ph2 && cyc - t_last_ins > max_gap[k])
            max_gap[k] <= cyc - t_last_ins;
          t_last_ins <= cyc;
          if (t_ra0 >= 0 && t_la_after[k] < 0) t_la_after[k] <= cyc;
        end
        if (recv != recv_q && last != 8'(recv - 1'b1)) order_err[k] <= order_err[k] + 1;
      end
    end
  end

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // 1. forward latency of one token
    repeat (100) @(posedge clk);
    // 2. twelve tokens, cycle time (gaps are taken from the second token on)
    #1 limit = 13;
    t_ph2 = cyc;
    repeat (400) @(posedge clk);
    for (int k = 0; k < ND; k++) begin
      check(t_lr[k] >= 0 && t_rr[k] > t_lr[k],
            $sformatf("L%04h o R%04h: no forward latency", LCUTS[k], RCUTS[k]));
      check(sent_i[k] == 13 && recv_i[k] == 13 && order_err[k] == 0,
            $sformatf("L%04h o R%04h: sent %0d received %0d order errors %0d",
                      LCUTS[k], RCUTS[k], sent_i[k], recv_i[k], order_err[k]));
      check(max_gap[k] > 0,
            $sformatf("L%04h o R%04h: no cycle time", LCUTS[k], RCUTS[k]));
    end
    check(t_rr[0] - t_lr[0] == 7 * DEPTH,
          $sformatf("max: forward latency %0d edges, expected %0d", t_rr[0] - t_lr[0], 7 * DEPTH));
    // 3. backward latency: stall, fill, release
    #1 go_r = 1'b0;
    limit = 1000;
    repeat (300) @(posedge clk);
    #1 go_r = 1'b1;
    t_ra0 = cyc;            // ra rises combinationally now, seen at this edge
    repeat (200) @(posedge clk);
    for (int k = 0; k < ND; k++) begin
      check(t_la_after[k] > t_ra0,
            $sformatf("L%04h o R%04h: no backward latency", LCUTS[k], RCUTS[k]));
    end
    $display("protocol      forward(edges, /stage)  backward(edges, /stage)  cycle(edges)");
    for (int k = 0; k < ND; k++)
      $display("L%04h o R%04h  %4d %6.2f              %4d %6.2f               %4d",
               LCUTS[k], RCUTS[k], t_rr[k] - t_lr[k], real'(t_rr[k] - t_lr[k]) / DEPTH,
               t_la_after[k] - t_ra0, real'(t_la_after[k] - t_ra0) / DEPTH, max_gap[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
