// series_pipe_tb - 4-deep series pipeline of max stages between a random
// producer and consumer (data order and integrity), then
//   * forward latency: from lr rising into the empty pipeline to rr rising
//     at its end takes 7 clock edges per stage (28 for 4 stages);
//   * occupancy: with the consumer stalled the pipeline acknowledges 4
//     tokens (max is a full-occupancy protocol) and then drains.
module series_pipe_tb;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic go_l = 1'b0, go_r = 1'b1;
  logic lr, la, rr, ra;
  logic [7:0] din, dout;
  int accepted, delivered, e_checks, e_fail;
  int checks = 0, failures = 0;
  int cyc = 0, t_lr = -1, t_rr = -1;

  // Edge times of the first request at each end (values before the edge).
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && lr && t_lr < 0) t_lr <= cyc;
    if (rst_n && rr && t_rr < 0) t_rr <= cyc;
  end

  series_pipe #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .lr, .la, .din, .rr, .ra, .dout);
  pipe_tb_env #(.WIDTH(8)) env (
    .clk, .rst_n, .go_l, .go_r, .lr, .la, .din, .rr, .ra, .dout,
    .accepted, .delivered, .checks(e_checks), .failures(e_fail)
  );

  initial begin
    int t;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // latency of the first token
    go_l = 1'b1;
    repeat (200) @(posedge clk);
    t = t_rr - t_lr;
    checks++;
    if (t != 7 * DEPTH) begin
      failures++; $display("FAIL forward latency %0d edges, expected %0d", t, 7 * DEPTH);
    end
    // random streaming
    repeat (3000) @(posedge clk);
    // stall and fill
    go_r = 1'b0;
    repeat (400) @(posedge clk);
    checks++;
    if (accepted - delivered != DEPTH) begin
      failures++; $display("FAIL stalled pipeline holds %0d tokens, expected %0d",
                           accepted - delivered, DEPTH);
    end
    go_l = 1'b0; go_r = 1'b1;
    repeat (400) @(posedge clk);
    checks++;
    if (accepted != delivered || delivered < 50) begin
      failures++; $display("FAIL accepted %0d delivered %0d", accepted, delivered);
    end
    checks += e_checks; failures += e_fail;
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
