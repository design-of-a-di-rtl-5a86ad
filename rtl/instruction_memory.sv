// instruction_memory: the cache's data store, ROWS instructions of DATA_W
// bits (2048 x 32 bit = 8 KB by default).
//
// Row i is read by match line i: the latched, one-hot match lines act as the
// word lines, and `rdata` is the instruction of the selected row (0 when no
// line is selected). The word lines are encoded into a row number that
// addresses the array, which gives the same result for a one-hot or empty
// selection and lets synthesis keep the array as a memory. A refill writes one row, addressed by number, at the
// rising clock edge. The array is not reset: a row is read only after the
// refill that made its CAM tag valid has written it.
module instruction_memory #(
  parameter int unsigned ROWS   = cache_pkg::ROWS,
  parameter int unsigned DATA_W = cache_pkg::DATA_W
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] widx,
  input  logic [DATA_W-1:0]       wdata,
  input  logic [ROWS-1:0]         sel,     // word lines (latched match lines)
  output logic [DATA_W-1:0]       rdata
);

  logic [DATA_W-1:0] mem [ROWS];

  always_ff @(posedge clk)
    if (we) mem[widx] <= wdata;

  localparam int unsigned IW = $clog2(ROWS);

  logic [IW-1:0] ridx;

  always_comb begin
    ridx = '0;
    for (int unsigned i = 0; i < ROWS; i++)
      if (sel[i]) ridx = ridx | IW'(i);
  end

  assign rdata = (|sel) ? mem[ridx] : '0;

endmodule
