// cam_cell: one bit of the NOR-type CAM, with its DCVSL comparator.
//
// Storage: a bit D, written from the bit line `bl` while the word line `wl`
// is high (an SRAM cell in silicon, a flip-flop here, cleared or set to INIT
// by reset). Comparison: a DCVSL gate whose q rail is pulled down through the
// series pair SL and D, and whose q_n rail through the pair ~SL and ~D. On a
// match (SL = D) one rail falls and the NAND of the rails, `match`, goes high;
// on a mismatch both rails stay precharged and `match` stays low. This is the
// truth table of the cell: SL=0,D=0 and SL=1,D=1 match, the other two do not.
// While `eval` is low the gate precharges and `match` is 0.
//
// Timing: the write takes effect at the rising clock edge; `match` is
// combinational from `sl`, `eval` and the stored bit.
module cam_cell #(
  parameter bit INIT = 1'b0          // stored value after reset
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wl,                   // word line: write enable
  input  logic bl,                   // bit line: write data
  input  logic sl,                   // search line
  input  logic eval,                 // DCVSL precharge (0) / evaluate (1)
  output logic d,                    // stored bit
  output logic match                 // high when evaluating and sl == d
);

  logic q, q_n;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  d <= INIT;
    else if (wl) d <= bl;

  dcvsl_gate u_cmp (
    .eval (eval),
    .pd_q (sl && d),
    .pd_qn(!sl && !d),
    .q    (q),
    .q_n  (q_n),
    .done (match)
  );

endmodule
