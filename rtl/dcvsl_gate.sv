// dcvsl_gate: a precharged differential cascode voltage switch logic gate,
// written as its logic function.
//
// The gate has two output rails, q and q_n. While the precharge input `eval`
// is low both rails are held high (precharge phase). While `eval` is high the
// gate evaluates: q is discharged if its pull-down tree conducts (pd_q), q_n
// if its tree conducts (pd_qn). The NAND of the two rails, `done`, is 0 in
// precharge and rises once one rail has fallen, so it serves both as the
// result and as the completion signal that the handshake waits for.
//
// When the two trees compute complementary functions `done` is a pure
// completion signal. In the CAM bit (cam_cell) the trees are SL&D and
// ~SL&~D, so exactly one rail falls on a match and neither on a mismatch:
// `done` is then the bit's match output. Purely combinational.
module dcvsl_gate (
  input  logic eval,   // 0: precharge, 1: evaluate (the gate's input I)
  input  logic pd_q,   // pull-down tree of q conducts
  input  logic pd_qn,  // pull-down tree of q_n conducts
  output logic q,
  output logic q_n,
  output logic done    // NAND(q, q_n)
);

  always_comb begin
    q    = !(eval && pd_q);
    q_n  = !(eval && pd_qn);
    done = !(q && q_n);
  end

endmodule
