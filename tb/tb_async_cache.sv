// tb_async_cache: end-to-end test of the cache with 16 rows (11-bit
// addresses, 32-bit instructions), a behavioural program memory and a CPU
// driver that runs the four-phase PC_req/PC_ack handshake.
//
// The address stream is a synthetic instruction-fetch trace: loops over
// short address ranges, jumps, and a working set larger than the cache so
// that rows are evicted. For every fetch the testbench checks
//  - the instruction returned equals the program-memory content;
//  - hit or miss, and on a miss the row refilled, against a reference cache
//    (fully associative, lowest free row first, then tree pseudo-LRU,
//    written with per-level prefix tables);
//  - the hit latency (HIT_LAT cycles from PC_req to PC_ack);
//  - that program memory is asked exactly once per miss.
// It counts each mechanism (hit, cold miss, eviction miss, program-memory
// handshake, latch/completion reset between requests) and fails on one that
// never happened.
module tb_async_cache;
  localparam int unsigned ROWS = 16, TAG_W = 11, DATA_W = 32, LV = 4;
  localparam int unsigned HIT_LAT = 4;

  logic clk = 0, rst_n = 0;
  logic pc_req = 0, pc_ack, pm_req, pm_ack, hit, miss, cam_req;
  logic [TAG_W-1:0]  pc_addr = '0, pm_addr;
  logic [DATA_W-1:0] ir_inst, pm_inst;

  int checks = 0, failures = 0;
  int n_hit = 0, n_cold = 0, n_evict = 0, n_reset = 0, dut_hits = 0, dut_misses = 0;

  async_cache #(.ROWS(ROWS)) dut (.*);
  pm_model #(.ADDR_W(TAG_W), .DATA_W(DATA_W)) u_pm (
    .clk(clk), .pm_req(pm_req), .pm_addr(pm_addr), .pm_ack(pm_ack), .pm_inst(pm_inst));

  always #5 clk = !clk;

  always @(posedge clk) begin
    dut_hits   += int'(hit);
    dut_misses += int'(miss);
  end

  // ---------------- reference cache ----------------
  logic [TAG_W-1:0] rtag [ROWS];
  logic             rvalid [ROWS];
  logic             rbit [LV][ROWS];

  function automatic int ref_lookup(input logic [TAG_W-1:0] a);
    for (int r = 0; r < ROWS; r++) if (rvalid[r] && rtag[r] == a) return r;
    return -1;
  endfunction

  function automatic int ref_victim();
    int p = 0;
    for (int r = 0; r < ROWS; r++) if (!rvalid[r]) return r;
    for (int l = 0; l < LV; l++) p = 2 * p + int'(rbit[l][p]);
    return p;
  endfunction

  task automatic ref_touch(input int idx);
    for (int l = 0; l < LV; l++) rbit[l][idx >> (LV - l)] = !1'((idx >> (LV - 1 - l)) & 1);
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- CPU driver ----------------
  task automatic fetch(input logic [TAG_W-1:0] a);
    int row, lat, h0, m0, pm0, exp_row;
    logic full;
    row = ref_lookup(a);
    full = 1;
    for (int r = 0; r < ROWS; r++) if (!rvalid[r]) full = 0;
    h0 = dut_hits; m0 = dut_misses; pm0 = int'(u_pm.requests);
    @(negedge clk);
    pc_addr = a; pc_req = 1; lat = 0;
    while (!pc_ack) begin @(negedge clk); lat++; end
    check(ir_inst == u_pm.inst_of(a), $sformatf("instruction for %h", a));
    if (row >= 0) begin
      n_hit++;
      check(lat == HIT_LAT, $sformatf("hit latency %0d", lat));
      check(dut_hits == h0 + 1 && dut_misses == m0, "hit reported");
      check(int'(u_pm.requests) == pm0, "no memory access on a hit");
      exp_row = row;
    end else begin
      if (full) n_evict++; else n_cold++;
      exp_row = ref_victim();
      check(dut_misses == m0 + 1 && dut_hits == h0, "miss reported");
      check(int'(u_pm.requests) == pm0 + 1, "one memory access per miss");
      check(lat > HIT_LAT, "miss slower than hit");
      rtag[exp_row] = a; rvalid[exp_row] = 1;
    end
    check(dut.ml_q == (ROWS'(1) << exp_row), $sformatf("row %0d selected", exp_row));
    ref_touch(exp_row);
    pc_req = 0;
    pc_addr = TAG_W'($urandom);         // address bus is only valid with pc_req
    while (pc_ack) @(negedge clk);
    if (!cam_req && dut.addr_q == '0) n_reset++;
    check(!cam_req, "completion reset before pc_ack falls");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (rvalid[r]) begin rvalid[r] = 0; rtag[r] = '0; end
    foreach (rbit[l, p]) rbit[l][p] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // the reset contents (row i holds i) must not hit
    fetch(11'd0); fetch(11'd1);
    // loop of 8 instructions, 5 iterations
    for (int it = 0; it < 5; it++) for (int i = 0; i < 8; i++) fetch(11'h100 + 11'(i));
    // nested loops with a call, working set 20 > 16 rows
    for (int it = 0; it < 6; it++) begin
      for (int i = 0; i < 12; i++) fetch(11'h200 + 11'(i));
      for (int i = 0; i < 8; i++)  fetch(11'h7F0 + 11'(i));
    end
    // random jumps
    for (int n = 0; n < 300; n++) fetch(11'h300 + 11'($urandom % 24));
    $display("hits=%0d cold_misses=%0d eviction_misses=%0d resets=%0d", n_hit, n_cold, n_evict, n_reset);
    check(n_hit > 0, "hit happened");
    check(n_cold > 0, "cold miss happened");
    check(n_evict > 0, "eviction happened");
    check(n_reset > 0, "latch reset observed");
    check(int'(u_pm.requests) == n_cold + n_evict, "memory requests");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
