// tb_cam_word: one 11-bit CAM row. After reset the row holds INIT_TAG but is
// invalid and must not match. It is then written with random words and
// searched with the same word, with words differing in one random bit and
// with random words; the match line must be high exactly when the search word
// equals the stored word and the comparators evaluate.
module tb_cam_word;
  localparam int unsigned TAG_W = 11;
  logic clk = 0, rst_n = 0, we = 0, eval = 0, valid, ml;
  logic [TAG_W-1:0] wtag = '0, stag = '0, tag, stored;
  int checks = 0, failures = 0;

  cam_word #(.TAG_W(TAG_W), .INIT_TAG(5)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b (stored %h search %h)", what, got, exp, stored, stag);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stored = 11'd5;
    repeat (2) @(posedge clk);
    #1;
    checks++; if (tag !== 11'd5) begin failures++; $display("FAIL reset tag %h", tag); end
    rst_n = 1;
    eval = 1; stag = 11'd5; #1;
    check(ml, 1'b0, "invalid row must not match");
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      stored = TAG_W'($urandom); wtag = stored; we = 1;
      @(negedge clk); we = 0; wtag = ~stored;
      check(valid, 1'b1, "valid after write");
      stag = stored; eval = 1; #1; check(ml, 1'b1, "equal word");
      eval = 0; #1; check(ml, 1'b0, "precharge");
      eval = 1;
      stag = stored ^ (TAG_W'(1) << ($urandom % TAG_W)); #1;
      check(ml, 1'b0, "one bit differs");
      stag = TAG_W'($urandom); #1;
      check(ml, stag == stored, "random word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
