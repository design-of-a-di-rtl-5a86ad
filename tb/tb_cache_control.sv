// tb_cache_control: drives the control block's inputs the way the CAM, the
// delay element, the CPU and program memory would, and checks its outputs
// cycle by cycle for a hit and for a miss with refill:
//  hit : PC_ack rises the cycle after CAM_req is seen, with one hit and one
//        touch strobe; it stays high after PC_req falls until CAM_req falls.
//  miss: with no CAM_req, the delayed evaluate raises one miss strobe and
//        PM_req; PM_ack gives one fill_we strobe with fill_row = the victim
//        offered at the miss; PM_req falls; after PM_ack falls the next
//        CAM_req completes the access (touch, no hit strobe).
// PM_req must never be raised on a hit.
module tb_cache_control;
  logic clk = 0, rst_n = 0;
  logic pc_req = 0, eval = 0, cam_req = 0, miss_dly = 0, pm_ack = 0;
  logic pc_ack, pm_req, fill_we, touch, hit, miss;
  logic [10:0] victim = '0, fill_row;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_fill = 0, n_touch = 0;

  cache_control dut (.*);

  always #5 clk = !clk;

  always @(posedge clk) begin
    n_hit   += int'(hit);
    n_miss  += int'(miss);
    n_fill  += int'(fill_we);
    n_touch += int'(touch);
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %b exp %b at %0t", what, got, exp, $time); end
  endtask

  task automatic step; @(negedge clk); endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    step;
    check(pc_ack, 0, "idle pc_ack"); check(pm_req, 0, "idle pm_req");
    // ---------------- hit ----------------
    pc_req = 1; step; step; eval = 1; step;          // LOOKUP
    check(pc_ack, 0, "lookup pc_ack");
    cam_req = 1; #1;
    check(hit, 1, "hit strobe"); check(touch, 1, "touch on hit"); check(miss, 0, "no miss");
    step;
    check(pc_ack, 1, "ack after completion"); check(hit, 0, "hit one cycle");
    pc_req = 0; step;
    check(pc_ack, 1, "ack holds until completion falls");
    eval = 0; step; step;
    check(pc_ack, 1, "ack holds while cam_req");
    cam_req = 0; step;
    check(pc_ack, 0, "ack falls after cam_req");
    check(n_hit == 1 && n_touch == 1 && n_miss == 0, 1, "hit counts");
    // ---------------- miss ----------------
    miss_dly = 1; pc_req = 1; step; step; eval = 1; step; step;
    check(pm_req, 0, "stale delay is not a miss");
    miss_dly = 0; step; step;                         // now in LOOKUP
    check(pm_req, 0, "no request before the delay");
    victim = 11'd1234;
    miss_dly = 1; #1;
    check(miss, 1, "miss strobe");
    step;
    victim = 11'd7;
    check(pm_req, 1, "pm_req on miss"); check(fill_row == 11'd1234, 1, "victim noted");
    step; step;
    check(pm_req, 1, "pm_req held until ack"); check(fill_we, 0, "no fill before ack");
    pm_ack = 1; #1;
    check(fill_we, 1, "fill on pm_ack");
    step;
    check(fill_we, 0, "one fill"); check(pm_req, 0, "pm_req falls after ack");
    step;
    pm_ack = 0; step;
    check(pc_ack, 0, "no ack before completion");
    cam_req = 1; #1;
    check(touch, 1, "touch on refilled row"); check(hit, 0, "refill completion is not a hit");
    step;
    check(pc_ack, 1, "ack after refill");
    pc_req = 0; eval = 0; step; cam_req = 0; step;
    check(pc_ack, 0, "ack falls");
    check(n_hit == 1 && n_miss == 1 && n_fill == 1 && n_touch == 2, 1, "event counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
