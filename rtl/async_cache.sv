// async_cache: instruction cache whose tag store is a content addressable
// memory with DCVSL completion detection.
//
// Structure (CPU on the left, program memory on the right):
//   pc_addr -> address latch -> CAM search lines (2048 x 11-bit words)
//   CAM match lines -> match-line latches -> instruction memory word lines
//   match-line latches -> OR tree -> CAM_req (completion)
//   latch_control turns PC_req into EN/RES for the latches and the DCVSL
//   evaluate signal; cache_control runs the PC and PM handshakes; the
//   bundled delay decides a miss; plru picks the row to refill.
//
// Access: the CPU puts an 11-bit instruction word address on pc_addr and
// raises pc_req (four-phase, bundled data: pc_addr stable while pc_req is
// high). On a hit pc_ack rises 5 clock cycles after pc_req with the
// instruction on ir_inst; the CPU drops pc_req, and pc_ack falls once the
// latches are cleared. On a miss pm_req is raised with the address on
// pm_addr; program memory answers with pm_ack and the instruction on
// pm_inst (valid while pm_ack is high); the row is refilled and the access
// completes as a hit.
//
// The original is self-timed (delay-insensitive CAM, bundled-data memory
// port). This version keeps its structure and handshakes but is synchronous:
// one clock, asynchronous active-low reset; latches are edge-triggered
// registers and the DCVSL gates are modelled by their logic function.
module async_cache #(
  parameter int unsigned ROWS       = cache_pkg::ROWS,
  parameter int unsigned TAG_W      = cache_pkg::TAG_W,
  parameter int unsigned DATA_W     = cache_pkg::DATA_W,
  parameter int unsigned MISS_DELAY = cache_pkg::MISS_DELAY
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU: program counter / instruction register
  input  logic              pc_req,
  input  logic [TAG_W-1:0]  pc_addr,
  output logic              pc_ack,
  output logic [DATA_W-1:0] ir_inst,
  // program memory
  output logic              pm_req,
  output logic [TAG_W-1:0]  pm_addr,
  input  logic              pm_ack,
  input  logic [DATA_W-1:0] pm_inst,
  // event strobes (one cycle each)
  output logic              hit,
  output logic              miss,
  output logic              cam_req
);

  localparam int unsigned IW = $clog2(ROWS);

  logic              en, res, eval;
  logic [TAG_W-1:0]  addr_q;
  logic [ROWS-1:0]   ml, ml_q, valid;
  logic              miss_dly, fill_we, touch;
  logic [IW-1:0]     victim, fill_row, hit_row;

  latch_control u_latch_ctl (
    .clk(clk), .rst_n(rst_n), .req(pc_req), .en(en), .res(res), .eval(eval)
  );

  hs_latch #(.W(TAG_W)) u_addr_latch (
    .clk(clk), .rst_n(rst_n), .en(en), .res(res), .d(pc_addr), .q(addr_q)
  );

  cam_array #(.ROWS(ROWS), .TAG_W(TAG_W)) u_cam (
    .clk(clk), .rst_n(rst_n),
    .we(fill_we), .wrow(fill_row), .wtag(addr_q),
    .eval(eval), .stag(addr_q), .ml(ml), .valid(valid)
  );

  // match-line latches: capture while the CAM evaluates, cleared with RES
  hs_latch #(.W(ROWS)) u_ml_latch (
    .clk(clk), .rst_n(rst_n), .en(eval), .res(res), .d(ml), .q(ml_q)
  );

  or_tree #(.N(ROWS)) u_or_tree (.in(ml_q), .out(cam_req));

  instruction_memory #(.ROWS(ROWS), .DATA_W(DATA_W)) u_imem (
    .clk(clk), .we(fill_we), .widx(fill_row), .wdata(pm_inst),
    .sel(ml_q), .rdata(ir_inst)
  );

  bundled_delay #(.DELAY(MISS_DELAY)) u_delay (
    .clk(clk), .rst_n(rst_n), .in(eval), .out(miss_dly)
  );

  always_comb begin
    hit_row = '0;
    for (int unsigned i = 0; i < ROWS; i++)
      if (ml_q[i]) hit_row = hit_row | IW'(i);
  end

  plru #(.ROWS(ROWS)) u_plru (
    .clk(clk), .rst_n(rst_n), .touch(touch), .touch_idx(hit_row),
    .valid(valid), .victim(victim)
  );

  cache_control #(.ROWS(ROWS)) u_ctl (
    .clk(clk), .rst_n(rst_n),
    .pc_req(pc_req), .pc_ack(pc_ack),
    .eval(eval), .cam_req(cam_req), .miss_dly(miss_dly),
    .pm_req(pm_req), .pm_ack(pm_ack),
    .victim(victim), .fill_we(fill_we), .fill_row(fill_row),
    .touch(touch), .hit(hit), .miss(miss)
  );

  assign pm_addr = addr_q;

  // at most one row may match an address
  a_ml_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ml_q));

endmodule
