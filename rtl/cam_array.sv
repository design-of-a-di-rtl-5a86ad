// cam_array: the CAM tag store, ROWS words of TAG_W bits.
//
// Every row compares its stored word with the search word `stag` in
// parallel; row i drives match line ml[i]. While `eval` is low all DCVSL
// comparators precharge and every match line is 0. One row at a time is
// written through the write port (`we`, `wrow`, `wtag`), which also marks it
// valid. Row i is reset to hold the word i (the tag store starts as the
// identity map of row numbers) with its valid bit clear.
//
// Timing: writes at the rising clock edge; `ml` is combinational from
// `stag`, `eval` and the stored rows.
module cam_array #(
  parameter int unsigned ROWS  = cache_pkg::ROWS,
  parameter int unsigned TAG_W = cache_pkg::TAG_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] wrow,
  input  logic [TAG_W-1:0]        wtag,
  input  logic                    eval,
  input  logic [TAG_W-1:0]        stag,
  output logic [ROWS-1:0]         ml,
  output logic [ROWS-1:0]         valid
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [TAG_W-1:0] tag;
    cam_word #(.TAG_W(TAG_W), .INIT_TAG(r)) u_word (
      .clk  (clk),
      .rst_n(rst_n),
      .we   (we && (wrow == r)),
      .wtag (wtag),
      .eval (eval),
      .stag (stag),
      .tag  (tag),
      .valid(valid[r]),
      .ml   (ml[r])
    );
  end

endmodule
