// hs_sink_tb - hs_sink against a random requesting pipeline model.  Checks
// that ra follows rr & (go | previous ra), that an acknowledge is held until
// rr falls, that each acknowledged word is captured in last, and that recv
// counts the acknowledges.
module hs_sink_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic go, rr, ra, ra_q;
  logic [7:0] data, last, exp_last;
  logic [15:0] recv;
  int checks = 0, failures = 0, n_ack = 0, stalls = 0;

  hs_sink #(.WIDTH(8), .CW(16)) dut (.clk, .rst_n, .go, .rr, .ra, .data, .last, .recv);

  initial begin
    go = 1'b0; rr = 1'b0; data = '0; ra_q = 1'b0; exp_last = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      go = ($urandom_range(0, 2) != 0);
      // model pipeline: new request with new data once the last one is done
      if (!rr && !ra && $urandom_range(0, 1) == 0) begin rr = 1'b1; data = 8'($urandom); end
      else if (rr && ra && $urandom_range(0, 1) == 0) rr = 1'b0;
      if (rr && !ra && !go) stalls++;
      #1;
      checks++;
      if (ra != (rr & (go | ra_q))) begin failures++; $display("FAIL ra function"); end
      checks++;
      if (ra_q && rr && !ra) begin failures++; $display("FAIL acknowledge dropped under rr"); end
      if (ra && !ra_q) begin n_ack++; exp_last = data; end
      @(posedge clk);
      ra_q = ra;
      #1;
      checks++;
      if (last != exp_last || int'(recv) != n_ack) begin
        failures++; $display("FAIL last %h/%h recv %0d/%0d", last, exp_last, recv, n_ack);
      end
    end
    checks++;
    if (n_ack < 100 || stalls == 0) begin failures++; $display("FAIL too few acknowledges or stalls"); end
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
