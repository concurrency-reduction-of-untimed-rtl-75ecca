// data_latch_tb - checks the enable handshake and the load/hold behaviour
// of data_latch against a reference model: aen copies ren one edge later,
// q loads d on every edge with ren high and holds otherwise.
module data_latch_tb;
  localparam int WIDTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ren, aen;
  logic [WIDTH-1:0] d, q, q_ref;
  logic aen_ref;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  always #5 clk = ~clk;

  data_latch #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .ren, .aen, .d, .q);

  initial begin
    ren = 1'b0; d = '0; q_ref = '0; aen_ref = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      // 4-phase driver: ren changes only when aen has answered.
      if (ren == aen && $urandom_range(0, 1) == 1) ren = ~ren;
      d = WIDTH'($urandom);
      @(posedge clk);
      aen_ref = ren;
      if (ren) begin q_ref = d; loads++; end
      else holds++;
      #1;
      checks++;
      if (aen !== aen_ref || q !== q_ref) begin
        failures++;
        $display("FAIL cycle %0d: aen=%0b q=%h expected aen=%0b q=%h", n, aen, q, aen_ref, q_ref);
      end
    end
    checks++;
    if (loads == 0 || holds == 0) begin
      failures++;
      $display("FAIL no load or no hold exercised");
    end
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
