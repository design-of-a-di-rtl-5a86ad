// cache_control: the control block of the cache. It runs the four-phase
// handshakes with the CPU (PC_req/PC_ack) and with program memory
// (PM_req/PM_ack), decides hit or miss, and orders the refill.
//
// Hit: once the CAM evaluates, the completion signal CAM_req rises; PC_ack is
// raised, the CPU takes the instruction and drops PC_req, and PC_ack falls
// after CAM_req has fallen (the latches have been cleared).
// Miss: the evaluate signal also runs through the bundled delay; if its
// delayed copy `miss_dly` arrives while CAM_req is still low, the search has
// missed. The pseudo-LRU victim row is noted and PM_req raised; the program
// memory's bundled data (the instruction) is valid while PM_ack is high, and
// on PM_ack the CAM tag and the instruction are written into the victim row
// (`fill_we`). PM_req then falls, and after PM_ack falls the still-evaluating
// CAM now matches, CAM_req rises and the access finishes as a hit.
// `touch` asks the replacement logic to mark the matching row as used;
// `hit` and `miss` are one-cycle event strobes.
//
// Synchronous: all handshake inputs are sampled at the rising clock edge, and
// PC_ack, PM_req and the strobes are decoded from the state register.
module cache_control #(
  parameter int unsigned ROWS = cache_pkg::ROWS,
  localparam int unsigned IW  = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU side
  input  logic          pc_req,
  output logic          pc_ack,
  // CAM side
  input  logic          eval,      // CAM evaluating (latch control)
  input  logic          cam_req,   // completion from the OR tree
  input  logic          miss_dly,  // eval delayed by the bundled delay
  // program memory side
  output logic          pm_req,
  input  logic          pm_ack,
  // refill and replacement
  input  logic [IW-1:0] victim,
  output logic          fill_we,
  output logic [IW-1:0] fill_row,
  output logic          touch,
  output logic          hit,
  output logic          miss
);

  typedef enum logic [2:0] {
    S_IDLE,      // waiting for a search to start
    S_LOOKUP,    // CAM evaluating, waiting for completion or the delay
    S_PM_REQ,    // miss: PM_req high, waiting for PM_ack
    S_PM_REL,    // refill written, PM_req low, waiting for PM_ack low
    S_WAIT_CAM,  // waiting for the refilled row to match
    S_ACK,       // PC_ack high, waiting for PC_req low
    S_REL        // PC_ack high, waiting for the completion to reset
  } state_t;

  state_t state, state_nxt;

  always_comb begin
    state_nxt = state;
    touch     = 1'b0;
    hit       = 1'b0;
    miss      = 1'b0;
    fill_we   = 1'b0;
    unique case (state)
      S_IDLE:     if (eval && !miss_dly) state_nxt = S_LOOKUP;
      S_LOOKUP:
        if (cam_req) begin
          state_nxt = S_ACK;
          touch     = 1'b1;
          hit       = 1'b1;
        end else if (miss_dly) begin
          state_nxt = S_PM_REQ;
          miss      = 1'b1;
        end
      S_PM_REQ:
        if (pm_ack) begin
          state_nxt = S_PM_REL;
          fill_we   = 1'b1;
        end
      S_PM_REL:   if (!pm_ack) state_nxt = S_WAIT_CAM;
      S_WAIT_CAM:
        if (cam_req) begin
          state_nxt = S_ACK;
          touch     = 1'b1;
        end
      S_ACK:      if (!pc_req) state_nxt = S_REL;
      S_REL:      if (!cam_req) state_nxt = S_IDLE;
      default:    state_nxt = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= S_IDLE;
      fill_row <= '0;
    end else begin
      state <= state_nxt;
      if (miss) fill_row <= victim;
    end

  assign pm_req = (state == S_PM_REQ);
  assign pc_ack = (state == S_ACK) || (state == S_REL);

  // handshake rules
  a_pc_ack_rise: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(pc_ack) |-> $past(pc_req));
  a_pm_req_fall: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(pm_req) |-> $past(pm_ack));
  a_pc_ack_fall: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(pc_ack) |-> $past(!pc_req && !cam_req));

endmodule
