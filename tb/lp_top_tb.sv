// lp_top_tb - end-to-end test of lp_top at its default parameters (max
// protocol, 8-bit data, depth 4, parallel width 2).
//
// Phases: random throttling of both sources and sinks, a full stall of the
// sinks (both pipelines must fill to 4 acknowledged tokens), a drain with
// the sources off, and a second random phase.  Every delivered token must be
// the next token number.  Each mechanism of the design is counted and must
// occur at least once:
//   stall        a sink holding off a pending request,
//   throttle     a source with go low while idle,
//   fill         a pipeline holding one token per stage,
//   input_ahead  a controller whose input channel ran ahead of its output
//                (shape column 8 or more: the next token already offered),
//   output_ahead a controller whose output channel ran ahead of its input
//                (row 1, column below 3: token passed on before la rose),
// The two branches of the parallel pipeline are identical clocked
// controllers, so they run in lockstep and the fork and join C-elements
// never see their branches disagree here; the cycles in which they do are
// counted and reported (fork_wait, join_wait) but not required.  The
// C-elements' hold behaviour is covered by hs_fork_tb and hs_join_tb.
module lp_top_tb;
  import lp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic sp_go_l, sp_go_r, pp_go_l, pp_go_r;
  logic [15:0] sp_sent, sp_recv, pp_sent, pp_recv;
  logic [7:0]  sp_last;
  logic [15:0] pp_last;
  logic sp_lr, sp_la, sp_rr, sp_ra, pp_lr, pp_la, pp_rr, pp_ra;

  lp_top dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_throttle = 0, n_fill = 0, n_in_ahead = 0, n_out_ahead = 0;
  int n_fork_wait = 0, n_join_wait = 0;

  // mode: 0 random, 1 stall sinks, 2 drain
  int mode = 0;
  always_ff @(posedge clk) begin
    case (mode)
      0: begin
        sp_go_l <= ($urandom_range(0, 4) != 0);
        pp_go_l <= ($urandom_range(0, 4) != 0);
        sp_go_r <= ($urandom_range(0, 3) != 0);
        pp_go_r <= ($urandom_range(0, 3) != 0);
      end
      1: begin sp_go_l <= 1'b1; pp_go_l <= 1'b1; sp_go_r <= 1'b0; pp_go_r <= 1'b0; end
      default: begin sp_go_l <= 1'b0; pp_go_l <= 1'b0; sp_go_r <= 1'b1; pp_go_r <= 1'b1; end
    endcase
  end

  // Scoreboard and mechanism counters.
  logic [15:0] sp_recv_q = '0, pp_recv_q = '0;
  always_ff @(posedge clk) begin
    if (rst_n) begin
      sp_recv_q <= sp_recv;
      pp_recv_q <= pp_recv;
      if (sp_recv != sp_recv_q) begin
        checks++;
        if (sp_last != 8'(sp_recv - 1'b1)) begin
          failures++; $display("FAIL series token %0d carries %0d", sp_recv - 1'b1, sp_last);
        end
      end
      if (pp_recv != pp_recv_q) begin
        checks++;
        if (pp_last != {2{8'(pp_recv - 1'b1)}}) begin
          failures++; $display("FAIL parallel token %0d carries %h", pp_recv - 1'b1, pp_last);
        end
      end
      if ((sp_rr && !sp_ra && !sp_go_r) || (pp_rr && !pp_ra && !pp_go_r)) n_stall++;
      if ((!sp_go_l && !sp_lr && !sp_la) || (!pp_go_l && !pp_lr && !pp_la)) n_throttle++;
      if (dut.u_pp.f_ack != '0 && dut.u_pp.f_ack != '1) n_fork_wait++;
      if (dut.u_pp.j_req != '0 && dut.u_pp.j_req != '1) n_join_wait++;
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_mon
    always_ff @(posedge clk) begin
      if (rst_n) begin
        if (dut.u_sp.g_stage[k].u_stage.u_lc.col_o >= 4'd8) n_in_ahead++;
        if (dut.u_sp.g_stage[k].u_stage.u_lc.row_o == ROW1 &&
            dut.u_sp.g_stage[k].u_stage.u_lc.col_o < 4'd3) n_out_ahead++;
      end
    end
  end

  task automatic require(string name, int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
    else $display("%-13s %0d", name, n);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    mode = 0;
    repeat (3000) @(posedge clk);
    mode = 1;
    repeat (400) @(posedge clk);
    checks++;
    if (sp_sent - sp_recv != 16'd4) begin
      failures++; $display("FAIL series pipeline holds %0d tokens, expected 4", sp_sent - sp_recv);
    end else n_fill++;
    checks++;
    if (pp_sent - pp_recv != 16'd4) begin
      failures++; $display("FAIL parallel pipeline holds %0d tokens, expected 4", pp_sent - pp_recv);
    end else n_fill++;
    mode = 2;
    repeat (400) @(posedge clk);
    checks++;
    if (sp_sent != sp_recv || pp_sent != pp_recv) begin
      failures++; $display("FAIL not drained: %0d/%0d %0d/%0d", sp_sent, sp_recv, pp_sent, pp_recv);
    end
    mode = 0;
    repeat (2000) @(posedge clk);
    mode = 2;
    repeat (400) @(posedge clk);
    checks++;
    if (sp_recv < 16'd200 || pp_recv < 16'd200 || sp_sent != sp_recv || pp_sent != pp_recv) begin
      failures++; $display("FAIL delivered %0d and %0d tokens", sp_recv, pp_recv);
    end
    $display("delivered: series %0d, parallel %0d", sp_recv, pp_recv);
    require("stall", n_stall);
    require("throttle", n_throttle);
    require("fill", n_fill);
    require("input_ahead", n_in_ahead);
    require("output_ahead", n_out_ahead);
    $display("fork_wait     %0d (not required)", n_fork_wait);
    $display("join_wait     %0d (not required)", n_join_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
