// parallel_pipe - structured parallel pipeline PP_{w,d}: a fork, W series
// pipelines of depth DEPTH side by side, and a join.
//
// The fork sends each token to all W branches (branch i carries data slice
// i), and the join waits for all branches before passing the token on.  Seen
// from its two channels the structure behaves as one pipeline of depth
// DEPTH, whatever W is.  W = 2 is the width drawn for the parallel pipeline;
// DEPTH = 4 is the characterisation depth.  Timing: the fork adds nothing on
// the forward path and the join's C-element adds one clock edge, so an idle
// pipeline of max passes a token in 7 * DEPTH + 1 edges (29 by default).
// The fork/join structure follows the family; the fork and join circuits are
// this design's (see hs_fork, hs_join).  With a common clock and identical
// branches the branches run in lockstep.
module parallel_pipe
  import lp_pkg::*;
#(
  parameter cut_t LCUT  = 16'h0000,
  parameter cut_t RCUT  = 16'h0000,
  parameter int   WIDTH = 8,    // data bits per branch
  parameter int   W     = 2,
  parameter int   DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               lr,
  output logic               la,
  input  logic [W*WIDTH-1:0] din,
  output logic               rr,
  input  logic               ra,
  output logic [W*WIDTH-1:0] dout
);

  logic [W-1:0]            f_req, f_ack, j_req, j_ack;
  logic [W-1:0][WIDTH-1:0] f_data, j_data;

  hs_fork #(.W(W), .WIDTH(WIDTH)) u_fork (
    .clk, .rst_n, .lr, .la, .din,
    .out_req(f_req), .out_ack(f_ack), .out_data(f_data)
  );

  for (genvar i = 0; i < W; i++) begin : g_branch
    series_pipe #(.LCUT(LCUT), .RCUT(RCUT), .WIDTH(WIDTH), .DEPTH(DEPTH)) u_sp (
      .clk, .rst_n,
      .lr(f_req[i]), .la(f_ack[i]), .din(f_data[i]),
      .rr(j_req[i]), .ra(j_ack[i]), .dout(j_data[i])
    );
  end

  hs_join #(.W(W), .WIDTH(WIDTH)) u_join (
    .clk, .rst_n, .in_req(j_req), .in_ack(j_ack), .in_data(j_data),
    .rr, .ra, .dout
  );

endmodule
