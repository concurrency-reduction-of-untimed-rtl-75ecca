// hs_join - join J_w of W 4-phase bundled-data channels into one.
//
// The output request rr is a Muller C-element over the W input requests: it
// rises one clock edge after all of them are high and falls one edge after
// all of them are low.  The output acknowledge ra is sent back to all W
// inputs at once.  The output data is the concatenation of the input data
// (channel i is slice i), which is stable while all requests are high.  The
// family only names the join; its realisation is this design's choice.
// Reset (asynchronous, active low) clears rr.  The acknowledge and data
// outputs are plain wires, as a join's are; the only logic is the request
// C-element.
module hs_join #(
  parameter int W     = 2,
  parameter int WIDTH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [W-1:0]            in_req,
  output logic [W-1:0]            in_ack,
  input  logic [W-1:0][WIDTH-1:0] in_data,
  output logic                    rr,
  input  logic                    ra,
  output logic [W*WIDTH-1:0]      dout
);

  assign in_ack = {W{ra}};
  assign dout   = in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            rr <= 1'b0;
    else if (&in_req)      rr <= 1'b1;
    else if (!(|in_req))   rr <= 1'b0;
  end

endmodule
