// hs_fork - fork F_w of one 4-phase bundled-data channel into W channels.
//
// The input request lr is sent to all W output channels at once, and output
// channel i carries slice i of the input data.  The input acknowledge la is a
// Muller C-element over the W output acknowledges: it rises when all of them
// are high and falls when all of them are low, and holds otherwise.  The
// C-element is a register, so la follows the last acknowledge by one clock
// edge.  The family only names the fork; the C-element and the data split
// are this design's choice.  Reset (asynchronous, active low) clears la.
// The request and data outputs are plain wires from the inputs, as a fork's
// are; the only logic is the acknowledge C-element.
module hs_fork #(
  parameter int W     = 2,
  parameter int WIDTH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    lr,
  output logic                    la,
  input  logic [W*WIDTH-1:0]      din,
  output logic [W-1:0]            out_req,
  input  logic [W-1:0]            out_ack,
  output logic [W-1:0][WIDTH-1:0] out_data
);

  assign out_req  = {W{lr}};
  assign out_data = din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             la <= 1'b0;
    else if (&out_ack)      la <= 1'b1;
    else if (!(|out_ack))   la <= 1'b0;
  end

endmodule
