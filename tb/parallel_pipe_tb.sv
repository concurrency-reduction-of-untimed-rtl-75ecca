// parallel_pipe_tb - PP_{2,4} of max stages and of L0022 o R2042 stages
// between random producers and consumers.  Checks data order and
// integrity, that the first token takes the 4-stage forward latency plus
// one edge for the join's C-element, that each stalled structure
// acknowledges as many tokens as a series pipeline of the same depth (4),
// and that both drain.  Two further max structures of widths 1 and 3 must
// show the same latency and occupancy as width 2: seen from its channels a
// parallel pipeline does not depend on its width.
module parallel_pipe_tb;
  localparam int DEPTH = 4, W = 2, WIDTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic go_l = 1'b0, go_r = 1'b1;
  int checks = 0, failures = 0;

  logic [1:0] lr, la, rr, ra;
  logic [1:0][W*WIDTH-1:0] din, dout;
  int acc [2], del [2], e_checks [2], e_fail [2];
  int cyc = 0, t_lr = -1, t_rr = -1;

  parallel_pipe #(.W(W), .DEPTH(DEPTH), .WIDTH(WIDTH)) dut0 (
    .clk, .rst_n, .lr(lr[0]), .la(la[0]), .din(din[0]), .rr(rr[0]), .ra(ra[0]), .dout(dout[0]));
  parallel_pipe #(.LCUT(16'h0022), .RCUT(16'h2042), .W(W), .DEPTH(DEPTH), .WIDTH(WIDTH)) dut1 (
    .clk, .rst_n, .lr(lr[1]), .la(la[1]), .din(din[1]), .rr(rr[1]), .ra(ra[1]), .dout(dout[1]));

  for (genvar k = 0; k < 2; k++) begin : g_env
    pipe_tb_env #(.WIDTH(W*WIDTH)) env (
      .clk, .rst_n, .go_l, .go_r, .lr(lr[k]), .la(la[k]), .din(din[k]), .rr(rr[k]), .ra(ra[k]),
      .dout(dout[k]), .accepted(acc[k]), .delivered(del[k]), .checks(e_checks[k]),
      .failures(e_fail[k]));
  end

  // Widths 1 and 3, max protocol.
  localparam int XW [2] = '{1, 3};
  int x_acc [2], x_del [2], x_checks [2], x_fail [2], x_t_lr [2], x_t_rr [2];
  for (genvar k = 0; k < 2; k++) begin : g_w
    logic xlr, xla, xrr, xra;
    logic [XW[k]*WIDTH-1:0] xdin, xdout;
    parallel_pipe #(.W(XW[k]), .DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
      .clk, .rst_n, .lr(xlr), .la(xla), .din(xdin), .rr(xrr), .ra(xra), .dout(xdout));
    pipe_tb_env #(.WIDTH(XW[k]*WIDTH)) env (
      .clk, .rst_n, .go_l, .go_r, .lr(xlr), .la(xla), .din(xdin), .rr(xrr), .ra(xra),
      .dout(xdout), .accepted(x_acc[k]), .delivered(x_del[k]), .checks(x_checks[k]),
      .failures(x_fail[k]));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x_t_lr[k] <= -1; x_t_rr[k] <= -1;
      end else begin
        if (xlr && x_t_lr[k] < 0) x_t_lr[k] <= cyc;
        if (xrr && x_t_rr[k] < 0) x_t_rr[k] <= cyc;
      end
    end
  end

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && lr[0] && t_lr < 0) t_lr <= cyc;
    if (rst_n && rr[0] && t_rr < 0) t_rr <= cyc;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    go_l = 1'b1;
    repeat (200) @(posedge clk);
    checks++;
    if (t_rr - t_lr != 7 * DEPTH + 1) begin
      failures++; $display("FAIL forward latency %0d, expected %0d", t_rr - t_lr, 7 * DEPTH + 1);
    end
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (x_t_rr[k] - x_t_lr[k] != t_rr - t_lr) begin
        failures++; $display("FAIL width %0d forward latency %0d, width %0d has %0d",
                             XW[k], x_t_rr[k] - x_t_lr[k], W, t_rr - t_lr);
      end
    end
    repeat (3000) @(posedge clk);
    go_r = 1'b0;
    repeat (400) @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (acc[k] - del[k] != DEPTH) begin
        failures++; $display("FAIL pipe %0d stalled holds %0d, expected %0d", k, acc[k] - del[k], DEPTH);
      end
      checks++;
      if (x_acc[k] - x_del[k] != acc[0] - del[0]) begin
        failures++; $display("FAIL width %0d stalled holds %0d, width %0d holds %0d",
                             XW[k], x_acc[k] - x_del[k], W, acc[0] - del[0]);
      end
    end
    go_l = 1'b0; go_r = 1'b1;
    repeat (400) @(posedge clk);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (acc[k] != del[k] || del[k] < 50) begin
        failures++; $display("FAIL pipe %0d accepted %0d delivered %0d", k, acc[k], del[k]);
      end
      checks += e_checks[k]; failures += e_fail[k];
      checks++;
      if (x_acc[k] != x_del[k] || x_del[k] < 50) begin
        failures++; $display("FAIL width %0d accepted %0d delivered %0d", XW[k], x_acc[k], x_del[k]);
      end
      checks += x_checks[k]; failures += x_fail[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
