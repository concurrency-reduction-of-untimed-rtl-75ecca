// series_pipe - series pipeline SP_d: DEPTH identical stages in a chain.
//
// Stage i's output channel is stage i+1's input channel (rr -> lr,
// la -> ra, dout -> din).  The whole pipeline has one input channel
// (lr, la, din) and one output channel (rr, ra, dout).  Timing: a token
// entering an idle pipeline reaches rr after DEPTH times the stage latency
// (7 clock edges per stage for max, 28 for the default depth).  The chain
// itself is the family's series pipeline; DEPTH defaults to 4, the depth
// used to characterise every protocol.  Nothing here is added: all
// behaviour is in the stages.
module series_pipe
  import lp_pkg::*;
#(
  parameter cut_t LCUT  = 16'h0000,
  parameter cut_t RCUT  = 16'h0000,
  parameter int   WIDTH = 8,
  parameter int   DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lr,
  output logic             la,
  input  logic [WIDTH-1:0] din,
  output logic             rr,
  input  logic             ra,
  output logic [WIDTH-1:0] dout
);

  // req[i]/ack[i]/data[i] is the channel into stage i; index DEPTH is the
  // pipeline's output channel.
  logic [DEPTH:0]            req, ack;
  logic [DEPTH:0][WIDTH-1:0] data;

  assign req[0]  = lr;
  assign la      = ack[0];
  assign data[0] = din;
  assign rr      = req[DEPTH];
  assign ack[DEPTH] = ra;
  assign dout    = data[DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_stage
    pipe_stage #(.LCUT(LCUT), .RCUT(RCUT), .WIDTH(WIDTH)) u_stage (
      .clk, .rst_n,
      .lr(req[i]),   .la(ack[i]),   .din(data[i]),
      .rr(req[i+1]), .ra(ack[i+1]), .dout(data[i+1])
    );
  end

endmodule
