// lp_top - characterisation set-up for one protocol of the latch-controller
// family, in its two pipeline structures side by side.
//
//   * sp_*: a source (left interface), a series pipeline SP_DEPTH of
//           identical stages, and a sink (right interface);
//   * pp_*: a source, a parallel pipeline PP_{PAR_W,DEPTH} (fork, PAR_W
//           series pipelines, join), and a sink.
// Both structures use the same protocol Lcut o Rcut (parameters LCUT, RCUT,
// written as the protocol name in hex: L0022 o R2042 is 16'h0022, 16'h2042).
// The go inputs throttle the sources and sinks: with go_l and go_r high the
// pipelines stream at their own rate; dropping go_r stalls and fills them.
// The counters report tokens accepted (sent) and delivered (recv), and last
// is the most recently delivered data word; tokens are numbered from 0 in
// order, so a pipeline that loses, duplicates or reorders a token shows it.
// Defaults: the most concurrent protocol max (L0000 o R0000), 8-bit data,
// depth 4 (the characterisation depth) and width 2.
module lp_top
  import lp_pkg::*;
#(
  parameter cut_t LCUT  = 16'h0000,
  parameter cut_t RCUT  = 16'h0000,
  parameter int   WIDTH = 8,
  parameter int   DEPTH = 4,
  parameter int   PAR_W = 2,
  parameter int   CW    = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // series pipeline
  input  logic                   sp_go_l,
  input  logic                   sp_go_r,
  output logic [CW-1:0]          sp_sent,
  output logic [CW-1:0]          sp_recv,
  output logic [WIDTH-1:0]       sp_last,
  output logic                   sp_lr,
  output logic                   sp_la,
  output logic                   sp_rr,
  output logic                   sp_ra,
  // parallel pipeline
  input  logic                   pp_go_l,
  input  logic                   pp_go_r,
  output logic [CW-1:0]          pp_sent,
  output logic [CW-1:0]          pp_recv,
  output logic [PAR_W*WIDTH-1:0] pp_last,
  output logic                   pp_lr,
  output logic                   pp_la,
  output logic                   pp_rr,
  output logic                   pp_ra
);

  logic [WIDTH-1:0]       sp_din, sp_dout;
  logic [WIDTH-1:0]       pp_tok;
  logic [PAR_W*WIDTH-1:0] pp_din, pp_dout;

  hs_source #(.WIDTH(WIDTH), .CW(CW)) u_sp_src (
    .clk, .rst_n, .go(sp_go_l), .lr(sp_lr), .la(sp_la), .data(sp_din), .sent(sp_sent)
  );

  series_pipe #(.LCUT(LCUT), .RCUT(RCUT), .WIDTH(WIDTH), .DEPTH(DEPTH)) u_sp (
    .clk, .rst_n, .lr(sp_lr), .la(sp_la), .din(sp_din),
    .rr(sp_rr), .ra(sp_ra), .dout(sp_dout)
  );

  hs_sink #(.WIDTH(WIDTH), .CW(CW)) u_sp_snk (
    .clk, .rst_n, .go(sp_go_r), .rr(sp_rr), .ra(sp_ra), .data(sp_dout),
    .last(sp_last), .recv(sp_recv)
  );

  // The parallel pipeline carries the token number in every branch slice.
  hs_source #(.WIDTH(WIDTH), .CW(CW)) u_pp_src (
    .clk, .rst_n, .go(pp_go_l), .lr(pp_lr), .la(pp_la), .data(pp_tok), .sent(pp_sent)
  );

  assign pp_din = {PAR_W{pp_tok}};

  parallel_pipe #(.LCUT(LCUT), .RCUT(RCUT), .WIDTH(WIDTH), .W(PAR_W), .DEPTH(DEPTH)) u_pp (
    .clk, .rst_n, .lr(pp_lr), .la(pp_la), .din(pp_din),
    .rr(pp_rr), .ra(pp_ra), .dout(pp_dout)
  );

  hs_sink #(.WIDTH(PAR_W*WIDTH), .CW(CW)) u_pp_snk (
    .clk, .rst_n, .go(pp_go_r), .rr(pp_rr), .ra(pp_ra), .data(pp_dout),
    .last(pp_last), .recv(pp_recv)
  );

endmodule
