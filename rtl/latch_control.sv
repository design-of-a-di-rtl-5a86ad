// latch_control: sequences EN and RES of the latches from PC_req.
//
// On a rising PC_req, EN goes high first and RES goes low one cycle later;
// on a falling PC_req, EN goes low first and RES goes high one cycle later.
// EN and RES therefore never change together, and the latches are never
// told to capture and to clear in the same phase.
// `eval` = EN and not RES is the DCVSL evaluate signal: the CAM evaluates
// only while a valid address is being held, and precharges otherwise.
//
// Timing (rising clock edges after PC_req changes): EN at +1, RES at +2.
// Reset: EN = 0, RES = 1.
module latch_control (
  input  logic clk,
  input  logic rst_n,
  input  logic req,    // PC_req
  output logic en,
  output logic res,
  output logic eval
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      en  <= 1'b0;
      res <= 1'b1;
    end else begin
      en  <= req;
      res <= !en;
    end

  assign eval = en && !res;

endmodule
