// bundled_delay: the matched delay element of the miss path.
//
// A delay line of DELAY register stages: `out` follows `in` DELAY clock
// cycles later, on both edges. The controller feeds it the CAM's evaluate
// signal; when the delayed copy arrives and the CAM has produced no
// completion, the search is taken as a miss and the program-memory request is
// issued. DELAY must therefore exceed the search latency: one clock cycle
// from the start of evaluation to the completion signal.
module bundled_delay #(
  parameter int unsigned DELAY = cache_pkg::MISS_DELAY
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in,
  output logic out
);

  logic [DELAY-1:0] line;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) line <= '0;
    else        line <= (line << 1) | DELAY'(in);

  assign out = line[DELAY-1];

endmodule
