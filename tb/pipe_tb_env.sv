// pipe_tb_env - random producer and consumer for a pipeline under test,
// with a scoreboard.
//
// The producer offers random data words on (lr, la, din), keeping din
// stable from before lr rises until la rises, and waits a random number of
// cycles between tokens while go_l is high; with go_l low it offers
// nothing new.  The consumer acknowledges rr after a random delay while
// go_r is high.  Every word accepted at la rising is queued; every word
// delivered at ra rising must equal the head of the queue, and dout must
// not change while rr is high and ra low.
module pipe_tb_env #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go_l,
  input  logic             go_r,
  output logic             lr,
  input  logic             la,
  output logic [WIDTH-1:0] din,
  input  logic             rr,
  output logic             ra,
  input  logic [WIDTH-1:0] dout,
  output int               accepted,
  output int               delivered,
  output int               checks,
  output int               failures
);
  logic [WIDTH-1:0] q [$];
  logic la_q, ra_q, rr_q;
  logic [WIDTH-1:0] dout_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lr <= 1'b0; ra <= 1'b0; din <= '0;
      la_q <= 1'b0; ra_q <= 1'b0; rr_q <= 1'b0; dout_q <= '0;
      accepted <= 0; delivered <= 0; checks <= 0; failures <= 0;
    end else begin
      la_q <= la; ra_q <= ra; rr_q <= rr; dout_q <= dout;
      // producer
      if (!lr && !la && go_l && $urandom_range(0, 3) == 0) lr <= 1'b1;
      else if (lr && la) begin
        lr  <= 1'b0;
        din <= WIDTH'($urandom);
      end
      if (la && !la_q) begin
        q.push_back(din);
        accepted <= accepted + 1;
      end
      // consumer
      if (rr && !ra && go_r && $urandom_range(0, 2) == 0) ra <= 1'b1;
      else if (!rr && ra && $urandom_range(0, 1) == 0) ra <= 1'b0;
      if (ra && !ra_q) begin
        delivered <= delivered + 1;
        checks <= checks + 1;
        if (q.size() == 0 || q[0] != dout) begin
          failures <= failures + 1;
          $display("FAIL token %0d: got %h expected %h", delivered, dout,
                   (q.size() != 0) ? q[0] : '0);
        end
        if (q.size() != 0) void'(q.pop_front());
      end
      // bundled data held while the request is pending
      if (rr && rr_q && !ra_q && dout != dout_q) begin
        failures <= failures + 1;
        $display("FAIL dout changed while rr was pending");
      end
    end
  end
endmodule
