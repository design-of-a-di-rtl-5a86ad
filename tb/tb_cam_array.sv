// tb_cam_array: a 64-row CAM with 11-bit words. Checks the reset state (no
// row valid, so no match line high), fills rows in random order with
// distinct random words, and after every write searches for every word
// written so far and for random words. The expected match lines come from a
// model array of (valid, word) pairs kept by the testbench.
module tb_cam_array;
  localparam int unsigned ROWS = 64, TAG_W = 11;
  logic clk = 0, rst_n = 0, we = 0, eval = 0;
  logic [5:0]       wrow = '0;
  logic [TAG_W-1:0] wtag = '0, stag = '0;
  logic [ROWS-1:0]  ml, valid;
  logic [TAG_W-1:0] mword  [ROWS];
  logic             mvalid [ROWS];
  int checks = 0, failures = 0;

  cam_array #(.ROWS(ROWS), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = !clk;

  function automatic logic [ROWS-1:0] expect_ml(input logic [TAG_W-1:0] s, input logic ev);
    logic [ROWS-1:0] e = '0;
    for (int r = 0; r < ROWS; r++) e[r] = ev && mvalid[r] && (mword[r] == s);
    return e;
  endfunction

  task automatic search(input logic [TAG_W-1:0] s);
    stag = s; eval = 1; #1;
    checks++;
    if (ml !== expect_ml(s, 1'b1)) begin
      failures++;
      $display("FAIL search %h: ml %h exp %h", s, ml, expect_ml(s, 1'b1));
    end
    eval = 0; #1;
    checks++;
    if (ml !== '0) begin failures++; $display("FAIL precharge ml %h", ml); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [TAG_W-1:0] w;
    logic dup;
    for (int r = 0; r < ROWS; r++) begin mvalid[r] = 0; mword[r] = TAG_W'(r); end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (valid !== '0) begin failures++; $display("FAIL reset valid"); end
    for (int r = 0; r < 8; r++) search(TAG_W'(r));   // reset contents are row numbers, but invalid
    for (int n = 0; n < ROWS; n++) begin
      int r;
      do r = $urandom % ROWS; while (mvalid[r]);
      do begin
        w = TAG_W'($urandom);
        dup = 0;
        for (int k = 0; k < ROWS; k++) if (mvalid[k] && mword[k] == w) dup = 1;
      end while (dup);
      @(negedge clk); we = 1; wrow = 6'(r); wtag = w;
      @(negedge clk); we = 0;
      mvalid[r] = 1; mword[r] = w;
      checks++;
      if (valid[r] !== 1'b1) begin failures++; $display("FAIL valid[%0d]", r); end
      search(w);
      search(TAG_W'($urandom));
    end
    for (int r = 0; r < ROWS; r++) search(mword[r]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
