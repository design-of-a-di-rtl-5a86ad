// tb_plru: 8-row and 2048-row pseudo-LRU. The reference keeps one direction
// bit per (level, path prefix) and walks it the same way a tree PLRU is
// defined: the victim follows the bits from the root, a touch sets every bit
// on its path to point away from the touched row. Checks that invalid rows
// are chosen first (lowest number), then random touch sequences with all
// rows valid, and that the row touched last is never the victim.
module tb_plru;
  localparam int unsigned R = 8, L = 3;
  logic clk = 0, rst_n = 0;
  logic touch = 0, touch_b = 0;
  logic [2:0]    tidx = '0, victim;
  logic [10:0]   tidx_b = '0, victim_b;
  logic [R-1:0]  valid = '0;
  logic [2047:0] valid_b = '0;
  logic          rbits [L][R];
  logic          rbits_b [11][2048];
  int checks = 0, failures = 0;

  plru #(.ROWS(R)) dut (.clk(clk), .rst_n(rst_n), .touch(touch), .touch_idx(tidx),
                        .valid(valid), .victim(victim));
  plru             dut_b (.clk(clk), .rst_n(rst_n), .touch(touch_b), .touch_idx(tidx_b),
                          .valid(valid_b), .victim(victim_b));

  always #5 clk = !clk;

  function automatic int ref_victim(input int lv);
    int p = 0;
    for (int l = 0; l < lv; l++) p = 2 * p + ((lv == L) ? int'(rbits[l][p]) : int'(rbits_b[l][p]));
    return p;
  endfunction

  task automatic ref_touch(input int lv, input int idx);
    for (int l = 0; l < lv; l++) begin
      int prefix = idx >> (lv - l);
      logic dir  = 1'((idx >> (lv - 1 - l)) & 1);
      if (lv == L) rbits[l][prefix] = !dir; else rbits_b[l][prefix] = !dir;
    end
  endtask

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (rbits[l, p]) rbits[l][p] = 0;
    foreach (rbits_b[l, p]) rbits_b[l][p] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // free rows first
    for (int i = 0; i < R; i++) begin
      #1 check(int'(victim), i, "lowest invalid row");
      valid[i] = 1'b1;
    end
    valid[5] = 1'b0; #1 check(int'(victim), 5, "hole at 5");
    valid[5] = 1'b1; valid_b = '1; valid_b[1234] = 1'b0; valid_b[1500] = 1'b0;
    #1 check(int'(victim_b), 1234, "lowest invalid of 2048");
    valid_b = '1;
    #1 check(int'(victim_b), ref_victim(11), "2048 after reset");
    for (int n = 0; n < 1000; n++) begin
      int a = $urandom % R, b = $urandom % 2048;
      @(negedge clk); touch = 1; tidx = 3'(a); touch_b = 1; tidx_b = 11'(b);
      @(negedge clk); touch = 0; touch_b = 0;
      ref_touch(L, a); ref_touch(11, b);
      check(int'(victim), ref_victim(L), "8-row victim");
      check(int'(victim_b), ref_victim(11), "2048-row victim");
      checks++;
      if (int'(victim) == a) begin failures++; $display("FAIL victim is the last touched row"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
