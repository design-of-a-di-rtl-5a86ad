// hs_latch: enable/reset latch of the cache datapath.
//
// Used twice: as the address latch in front of the CAM search lines and as
// the bank of match-line latches between the CAM and the instruction memory.
// While `en` is high the latch takes `d`; while `en` is low and `res` is high
// it is cleared to 0 ("refreshed by 0" between requests); otherwise it holds.
// `en` has priority, so the value is captured on the same edge that the
// controller starts dropping `res`.
//
// A level-sensitive latch in the self-timed original; here a register that
// updates at the rising clock edge, with asynchronous active-low reset to 0.
module hs_latch #(
  parameter int unsigned W = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         res,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   q <= '0;
    else if (en)  q <= d;
    else if (res) q <= '0;

endmodule
