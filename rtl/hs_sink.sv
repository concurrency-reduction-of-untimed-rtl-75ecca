// hs_sink - right environment of a pipeline under test: consumes tokens from
// a 4-phase bundled-data channel.
//
// The acknowledge is  ra = rr & (go | ra_held):  with go high the sink
// acknowledges a request at once and releases the acknowledge as soon as rr
// falls.  ra_held (ra of the previous cycle) keeps a given acknowledge up
// until rr falls even if go falls.  With go low a request waits, which stalls
// the pipeline.  On each acknowledge (ra rising) the data is captured in
// last and recv counts the token.  The combinational acknowledge is the
// family's interface; the hold, capture and count are this design's
// additions.
module hs_sink #(
  parameter int WIDTH = 8,
  parameter int CW    = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic             rr,
  output logic             ra,
  input  logic [WIDTH-1:0] data,
  output logic [WIDTH-1:0] last,
  output logic [CW-1:0]    recv
);

  logic ra_held;

  assign ra = rr & (go | ra_held);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra_held <= 1'b0;
      last    <= '0;
      recv    <= '0;
    end else begin
      ra_held <= ra;
      if (ra && !ra_held) begin
        last <= data;
        recv <= recv + 1'b1;
      end
    end
  end

endmodule
