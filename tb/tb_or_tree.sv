// tb_or_tree: the completion OR tree at the full 2048 inputs and at an
// uneven size (37 inputs, fan-in 3). Drives all zeros, every single-hot
// vector, and random sparse vectors, and compares with a loop-computed OR.
module tb_or_tree;
  logic [2047:0] a;
  logic [36:0]   b;
  logic ya, yb;
  int checks = 0, failures = 0;

  or_tree                    dut_a (.in(a), .out(ya));
  or_tree #(.N(37), .FAN(3)) dut_b (.in(b), .out(yb));

  function automatic logic ref_or(input logic [2047:0] v, input int n);
    for (int i = 0; i < n; i++) if (v[i]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; #1;
    check(ya, 1'b0, "2048 zero"); check(yb, 1'b0, "37 zero");
    for (int i = 0; i < 2048; i++) begin
      a = '0; a[i] = 1'b1; #1; check(ya, 1'b1, "2048 one-hot");
    end
    for (int i = 0; i < 37; i++) begin
      b = '0; b[i] = 1'b1; #1; check(yb, 1'b1, "37 one-hot");
    end
    for (int n = 0; n < 200; n++) begin
      a = '0; b = '0;
      if ($urandom % 2) a[$urandom % 2048] = 1'b1;
      if ($urandom % 2) b[$urandom % 37] = 1'b1;
      #1;
      check(ya, ref_or(a, 2048), "2048 random");
      check(yb, ref_or(2048'(b), 37), "37 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
