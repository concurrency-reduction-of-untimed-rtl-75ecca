// pipe_stage_tb - one pipeline stage (max protocol, 8-bit data) between a
// random producer and consumer: every word must come out once, in order,
// and stay stable while it is requested.  Also checks that a stalled stage
// acknowledges exactly one token (the one it stores), and that it drains.
module pipe_stage_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic go_l = 1'b1, go_r = 1'b1;
  logic lr, la, rr, ra;
  logic [7:0] din, dout;
  int accepted, delivered, e_checks, e_fail;
  int checks = 0, failures = 0;

  pipe_stage dut (.clk, .rst_n, .lr, .la, .din, .rr, .ra, .dout);
  pipe_tb_env #(.WIDTH(8)) env (
    .clk, .rst_n, .go_l, .go_r, .lr, .la, .din, .rr, .ra, .dout,
    .accepted, .delivered, .checks(e_checks), .failures(e_fail)
  );

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2000) @(posedge clk);
    go_r = 1'b0;
    repeat (200) @(posedge clk);
    checks++;
    if (accepted - delivered != 1) begin
      failures++; $display("FAIL stalled stage holds %0d tokens, expected 1", accepted - delivered);
    end
    go_l = 1'b0; go_r = 1'b1;
    repeat (200) @(posedge clk);
    checks++;
    if (accepted != delivered || delivered < 50) begin
      failures++; $display("FAIL accepted %0d delivered %0d", accepted, delivered);
    end
    checks += e_checks; failures += e_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
