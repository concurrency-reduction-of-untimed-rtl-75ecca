// hs_source_tb - hs_source against a random acknowledging pipeline model.
// Checks that lr follows ~la & (go | previous lr), that a raised request is
// never withdrawn before la rises, that the data word is stable from lr
// rising to la rising and numbers the tokens 0, 1, 2, ..., and that sent
// counts acknowledged tokens.
module hs_source_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic go = 1'b0, lr, la, lr_q, la_q;
  logic [7:0] data, data_q;
  logic [15:0] sent;
  int checks = 0, failures = 0, expect_tok = 0, withdraw_tries = 0;

  hs_source #(.WIDTH(8), .CW(16)) dut (.clk, .rst_n, .go, .lr, .la, .data, .sent);

  // Pipeline model: acknowledges a pending request after a random delay.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      la <= 1'b0; lr_q <= 1'b0; la_q <= 1'b0; data_q <= '0;
    end else begin
      lr_q <= lr; la_q <= la; data_q <= data;
      if (lr && !la && $urandom_range(0, 2) == 0) begin
        la <= 1'b1;
        checks++;
        if (data != 8'(expect_tok)) begin
          failures++; $display("FAIL token %0d carries %0d", expect_tok, data);
        end
        expect_tok++;
      end else if (!lr && la && $urandom_range(0, 1) == 0) la <= 1'b0;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      go = ($urandom_range(0, 2) != 0);
      if (lr_q && !la && !go) withdraw_tries++;
      #1;
      checks++;
      if (lr != (~la & (go | lr_q))) begin failures++; $display("FAIL lr function"); end
      checks++;
      if (lr_q && !la && !lr) begin failures++; $display("FAIL request withdrawn"); end
      checks++;
      if (lr && lr_q && data != data_q) begin failures++; $display("FAIL data changed under lr"); end
    end
    @(negedge clk) go = 1'b0;
    repeat (50) @(posedge clk);
    #1;
    checks++;
    if (int'(sent) != expect_tok || expect_tok < 100) begin
      failures++; $display("FAIL sent %0d expected %0d", sent, expect_tok);
    end
    checks++;
    if (withdraw_tries == 0) begin failures++; $display("FAIL go never dropped under a request"); end
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
