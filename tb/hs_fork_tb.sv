// hs_fork_tb - checks hs_fork against a reference C-element: the request
// and data slices go straight to every branch, and la rises one edge after
// all branch acknowledges are high, falls one edge after all are low, and
// holds otherwise.  Branch acknowledges are driven at random.
module hs_fork_tb;
  localparam int W = 3, WIDTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic lr, la, la_ref;
  logic [W*WIDTH-1:0] din;
  logic [W-1:0] out_req, out_ack;
  logic [W-1:0][WIDTH-1:0] out_data;
  int checks = 0, failures = 0, waits = 0;

  hs_fork #(.W(W), .WIDTH(WIDTH)) dut (.clk, .rst_n, .lr, .la, .din, .out_req, .out_ack, .out_data);

  initial begin
    lr = 0; din = '0; out_ack = '0; la_ref = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      lr = 1'($urandom); din = (W*WIDTH)'($urandom); out_ack = W'($urandom);
      #1;
      checks++;
      if (out_req != {W{lr}}) begin failures++; $display("FAIL request not broadcast"); end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (out_data[i] != din[i*WIDTH +: WIDTH]) begin failures++; $display("FAIL slice %0d", i); end
      end
      @(posedge clk);
      if (out_ack == '1) la_ref = 1'b1;
      else if (out_ack == '0) la_ref = 1'b0;
      else waits++;
      #1;
      checks++;
      if (la != la_ref) begin failures++; $display("FAIL la=%0b expected %0b", la, la_ref); end
    end
    checks++;
    if (waits == 0) begin failures++; $display("FAIL C-element never held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
