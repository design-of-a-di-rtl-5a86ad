// tb_async_cache_full: the cache at its full size (2048 rows x 11-bit CAM
// words, 2048 x 32-bit instructions), with no parameter overridden.
//
// Runs an instruction-fetch trace shaped like a small program: a 64-
// instruction loop run 20 times, a 200-instruction routine called 5 times
// from it, then a sweep over all 2048 addresses followed by a second sweep.
// Every fetch checks the instruction against program memory and hit/miss
// against a reference (with 2048 rows the whole 11-bit address space fits,
// so only first references miss, and rows are filled lowest free row
// first). The hit latency and the memory request count are checked too, and
// the hit ratio is printed; the second sweep must hit on every fetch.
module tb_async_cache_full;
  localparam int unsigned ROWS = 2048, TAG_W = 11, DATA_W = 32;
  localparam int unsigned HIT_LAT = 4;

  logic clk = 0, rst_n = 0;
  logic pc_req = 0, pc_ack, pm_req, pm_ack, hit, miss, cam_req;
  logic [TAG_W-1:0]  pc_addr = '0, pm_addr;
  logic [DATA_W-1:0] ir_inst, pm_inst;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, filled = 0, dut_hits = 0, dut_misses = 0;
  int row_of [ROWS];

  async_cache dut (.*);
  pm_model #(.ADDR_W(TAG_W), .DATA_W(DATA_W)) u_pm (
    .clk(clk), .pm_req(pm_req), .pm_addr(pm_addr), .pm_ack(pm_ack), .pm_inst(pm_inst));

  always #5 clk = !clk;

  always @(posedge clk) begin
    dut_hits   += int'(hit);
    dut_misses += int'(miss);
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic fetch(input logic [TAG_W-1:0] a);
    int lat, h0, m0, pm0, exp_row;
    logic was_hit;
    was_hit = row_of[a] >= 0;
    h0 = dut_hits; m0 = dut_misses; pm0 = int'(u_pm.requests);
    @(negedge clk);
    pc_addr = a; pc_req = 1; lat = 0;
    while (!pc_ack) begin @(negedge clk); lat++; end
    check(ir_inst == u_pm.inst_of(a), "instruction");
    if (was_hit) begin
      n_hit++;
      check(lat == HIT_LAT, "hit latency");
      check(dut_hits == h0 + 1 && int'(u_pm.requests) == pm0, "hit");
    end else begin
      n_miss++;
      row_of[a] = filled++;
      check(dut_misses == m0 + 1 && int'(u_pm.requests) == pm0 + 1, "miss");
    end
    exp_row = row_of[a];
    check(dut.ml_q[exp_row] && $onehot(dut.ml_q), "row selected");
    pc_req = 0;
    while (pc_ack) @(negedge clk);
    check(!cam_req, "completion reset");
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h_before;
    foreach (row_of[i]) row_of[i] = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 20; it++) begin
      for (int i = 0; i < 64; i++) fetch(11'h040 + 11'(i));
      if (it % 4 == 0) for (int i = 0; i < 200; i++) fetch(11'h400 + 11'(i));
    end
    $display("program trace: hits=%0d misses=%0d hit ratio=%0d%%", n_hit, n_miss, 100 * n_hit / (n_hit + n_miss));
    check(n_miss == 264, "cold misses of the program trace");
    for (int a = 0; a < ROWS; a++) fetch(TAG_W'(a));
    h_before = n_hit;
    for (int a = 0; a < ROWS; a++) fetch(TAG_W'(a));
    check(n_hit - h_before == ROWS, "second sweep all hits");
    check(filled == ROWS && dut.valid == '1, "every row filled");
    $display("total: hits=%0d misses=%0d", n_hit, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
