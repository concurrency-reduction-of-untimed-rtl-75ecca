// latch_ctrl_tb - runs latch_ctrl for max and for the three protocols the
// family singles out (smallest area L2233 o R2244, smallest forward latency
// L0033 o R4244, smallest cycle time L0022 o R2042) under random
// environments (see lc_harness), then measures the forward latency of an
// idle max controller: the output request must rise seven clock edges after
// the input request (six after the sampling edge).
module latch_ctrl_tb;
  import lp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 4;
  localparam logic [15:0] LC [N] = '{16'h0000, 16'h2233, 16'h0033, 16'h0022};
  localparam logic [15:0] RC [N] = '{16'h0000, 16'h2244, 16'h4244, 16'h2042};

  int h_checks [N], h_fail [N], h_hs [N], h_seen [N];

  for (genvar k = 0; k < N; k++) begin : g_h
    lc_harness #(.LCUT(LC[k]), .RCUT(RC[k])) u_h (
      .clk, .rst_n, .checks(h_checks[k]), .failures(h_fail[k]),
      .handshakes(h_hs[k]), .states_seen(h_seen[k])
    );
  end

  // Directed latency measurement on an idle max controller whose latch
  // answers one edge after ren.
  logic lr, la, rr, ra, ren, aen;
  logic [3:0] col;
  row_e row;
  latch_ctrl dut (.clk, .rst_n, .lr, .la, .rr, .ra, .ren, .aen, .col_o(col), .row_o(row));
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) aen <= 1'b0; else aen <= ren;
  assign ra = 1'b0;

  int checks = 0, failures = 0;

  initial begin
    int t;
    lr = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) lr = 1'b1;
    t = 0;
    while (!rr && t < 50) begin @(posedge clk); #1 t++; end
    checks++;
    if (t != 7) begin
      failures++; $display("FAIL forward latency %0d edges, expected 7", t);
    end
    checks++;
    if (!la || col != 4'd5 || row != ROW2) begin
      failures++; $display("FAIL after first token: la=%0b col=%0d row=%0d", la, col, row);
    end
    repeat (3000) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      checks += h_checks[k];
      failures += h_fail[k];
      checks++;
      if (h_hs[k] < 50) begin
        failures++; $display("FAIL L%04h o R%04h: only %0d handshakes", LC[k], RC[k], h_hs[k]);
      end
      $display("L%04h o R%04h: %0d handshakes, %0d shape states visited", LC[k], RC[k],
               h_hs[k], h_seen[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
