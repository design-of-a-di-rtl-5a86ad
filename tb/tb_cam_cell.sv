// tb_cam_cell: writes each value into the cell and searches with each search
// line value, with the comparator precharged and evaluating. The expected
// match follows the CAM truth table (match exactly when SL equals D) and is
// 0 during precharge. Also checks that the stored bit holds while the word
// line is low and that reset loads INIT.
module tb_cam_cell;
  logic clk = 0, rst_n = 0, wl = 0, bl = 0, sl = 0, eval = 0, d, match;
  int checks = 0, failures = 0;

  cam_cell #(.INIT(1'b1)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // CAM truth table: {SL, D} -> ML
  localparam logic TABLE1 [4] = '{1'b1, 1'b0, 1'b0, 1'b1};

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check(d, 1'b1, "reset value");
    rst_n = 1;
    for (int dv = 0; dv < 2; dv++) begin
      @(negedge clk); wl = 1; bl = 1'(dv);
      @(negedge clk); wl = 0; bl = !bl;
      @(negedge clk);
      check(d, 1'(dv), "stored bit holds");
      for (int s = 0; s < 2; s++) begin
        sl = 1'(s);
        eval = 0; #1; check(match, 1'b0, "precharge");
        eval = 1; #1; check(match, TABLE1[2 * s + dv], "evaluate");
      end
      eval = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
