// tb_hs_latch: random en/res/d sequences against a cycle model of the latch
// (capture while en, clear while res and not en, hold otherwise).
module tb_hs_latch;
  localparam int unsigned W = 11;
  logic clk = 0, rst_n = 0, en = 0, res = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  hs_latch #(.W(W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en = 1'($urandom); res = 1'($urandom); d = W'($urandom);
      if (en) model = d; else if (res) model = '0;
      @(posedge clk); #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL en=%b res=%b q=%h exp=%h", en, res, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
