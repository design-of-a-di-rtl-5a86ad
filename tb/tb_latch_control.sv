// tb_latch_control: toggles PC_req with random hold times and checks the
// EN/RES order: EN follows PC_req one cycle later, RES is the inverse of EN
// one further cycle later, EN and RES never change on the same edge, and
// eval is EN and not RES. Also checks the reset state (EN 0, RES 1).
module tb_latch_control;
  logic clk = 0, rst_n = 0, req = 0, en, res, eval;
  logic req_d1, req_d2;
  int checks = 0, failures = 0;

  latch_control dut (.*);

  always #5 clk = !clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b at %0t", what, got, exp, $time); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_prev, res_prev;
    repeat (2) @(posedge clk);
    #1;
    check(en, 1'b0, "reset en"); check(res, 1'b1, "reset res");
    rst_n = 1;
    req_d1 = 0; req_d2 = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en_prev = en; res_prev = res;
      if (req_d1 == req_d2 && $urandom % 3 == 0) req = !req;   // PC_req holds at least 2 cycles
      @(posedge clk);
      req_d2 = req_d1; req_d1 = req;
      #1;
      check(en, req_d1, "en follows req by 1");
      check(res, !req_d2, "res follows !req by 2");
      check(eval, req_d1 && req_d2, "eval");
      checks++;
      if (en !== en_prev && res !== res_prev) begin failures++; $display("FAIL en and res changed together"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
