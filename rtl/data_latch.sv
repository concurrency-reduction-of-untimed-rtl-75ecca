// data_latch - normally closed (opaque) data latch of a bundled-data stage,
// opened and closed by a 4-phase enable handshake.
//
// The controller raises ren to open the latch; the latch copies d to q on
// every clock edge while ren is high and answers with aen one edge later.
// When ren falls the latch closes (q holds) and aen falls on the next edge.
// So the sequence is ren+ , aen+ , ren- , aen-  and q is stable whenever ren
// is low.  The handshake and the normally closed style follow the stage
// description; the clocked realisation (a register with a load enable) and
// the one-edge answer are this design's.  Reset (asynchronous, active low)
// clears q and aen.
module data_latch #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ren,
  output logic             aen,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      aen <= 1'b0;
    end else begin
      aen <= ren;
      if (ren) q <= d;
    end
  end

endmodule
