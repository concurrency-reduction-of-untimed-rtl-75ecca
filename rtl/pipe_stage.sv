// pipe_stage - one bundled-data pipeline stage: a latch controller and the
// data latch it drives.
//
// Data arrives on din and must be stable from before lr rises until la rises
// (bundling constraint).  The controller opens the latch (ren/aen) once the
// latch is free, then acknowledges upstream (la) and requests downstream (rr)
// as the chosen protocol Lcut o Rcut allows.  dout holds the stored value
// from before rr rises until after ra rises.  Structure as in the stage
// figure of the family: controller LC plus LATCH; the clocked realisation is
// this design's (see latch_ctrl).  The controller's shape-position outputs
// (col_o, row_o) are for observation only and are deliberately left open
// here; testbenches read them through the hierarchy.
module pipe_stage
  import lp_pkg::*;
#(
  parameter cut_t LCUT  = 16'h0000,
  parameter cut_t RCUT  = 16'h0000,
  parameter int   WIDTH = 8
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

  logic ren, aen;

  latch_ctrl #(.LCUT(LCUT), .RCUT(RCUT)) u_lc (
    .clk, .rst_n, .lr, .la, .rr, .ra, .ren, .aen, .col_o(), .row_o()
  );

  data_latch #(.WIDTH(WIDTH)) u_latch (
    .clk, .rst_n, .ren, .aen, .d(din), .q(dout)
  );

endmodule
