// hs_join_tb - checks hs_join against a reference C-element: rr rises one
// edge after all branch requests are high, falls one edge after all are
// low, and holds otherwise; ra goes back to every branch and the output
// data is the concatenation of the branch data.
module hs_join_tb;
  localparam int W = 3, WIDTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic rr, ra, rr_ref;
  logic [W-1:0] in_req, in_ack;
  logic [W-1:0][WIDTH-1:0] in_data;
  logic [W*WIDTH-1:0] dout;
  int checks = 0, failures = 0, waits = 0;

  hs_join #(.W(W), .WIDTH(WIDTH)) dut (.clk, .rst_n, .in_req, .in_ack, .in_data, .rr, .ra, .dout);

  initial begin
    ra = 0; in_req = '0; in_data = '0; rr_ref = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      ra = 1'($urandom); in_req = W'($urandom);
      for (int i = 0; i < W; i++) in_data[i] = WIDTH'($urandom);
      #1;
      checks++;
      if (in_ack != {W{ra}}) begin failures++; $display("FAIL ack not broadcast"); end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (dout[i*WIDTH +: WIDTH] != in_data[i]) begin failures++; $display("FAIL slice %0d", i); end
      end
      @(posedge clk);
      if (in_req == '1) rr_ref = 1'b1;
      else if (in_req == '0) rr_ref = 1'b0;
      else waits++;
      #1;
      checks++;
      if (rr != rr_ref) begin failures++; $display("FAIL rr=%0b expected %0b", rr, rr_ref); end
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
