// hs_source - left environment of a pipeline under test: offers a stream of
// numbered tokens on a 4-phase bundled-data channel.
//
// The request is  lr = ~la & (go | lr_held):  with go high the source raises
// lr whenever the pipeline's acknowledge is low and drops it as soon as la
// rises, so it never slows the pipeline.  lr_held (lr of the previous cycle)
// keeps a raised request up until it is acknowledged even if go falls, which
// keeps the channel 4-phase.  The data is the token number: it starts at 0
// and steps by one on each la rising edge, i.e. while lr is low, so it is
// stable from before lr rises until la rises.  sent counts acknowledged
// tokens.  The combinational request is the family's interface; holding the
// request and numbering the tokens are this design's additions.
module hs_source #(
  parameter int WIDTH = 8,
  parameter int CW    = 16   // counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  output logic             lr,
  input  logic             la,
  output logic [WIDTH-1:0] data,
  output logic [CW-1:0]    sent
);

  logic lr_held, la_q;

  assign lr   = ~la & (go | lr_held);
  assign data = WIDTH'(sent);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lr_held <= 1'b0;
      la_q    <= 1'b0;
      sent    <= '0;
    end else begin
      lr_held <= lr;
      la_q    <= la;
      if (la && !la_q) sent <= sent + 1'b1;
    end
  end

endmodule
