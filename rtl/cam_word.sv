// cam_word: one CAM row (word) of TAG_W cells and its match line.
//
// All cells of the row see the same `eval` and the search word `stag`; the
// row's match line `ml` is the AND of the cells' DCVSL match outputs, so it
// is high only when every bit matches (the NOR match line of the cell array,
// seen from its logic side). A valid bit, cleared by reset and set by the
// first write, also gates `ml`, so that a row that was never filled cannot
// match. Writing (`we`) loads `wtag` into all cells and sets the valid bit.
//
// After reset the row holds the tag INIT_TAG (the cache's rows start out
// holding their own row numbers) but is invalid.
// Timing: writes at the rising clock edge; `ml` is combinational.
module cam_word #(
  parameter int unsigned TAG_W    = 11,
  parameter int unsigned INIT_TAG = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,        // write this row
  input  logic [TAG_W-1:0] wtag,      // tag to write
  input  logic             eval,      // DCVSL precharge (0) / evaluate (1)
  input  logic [TAG_W-1:0] stag,      // search word (search lines)
  output logic [TAG_W-1:0] tag,       // stored word
  output logic             valid,     // row holds a fetched instruction
  output logic             ml         // match line
);

  localparam logic [TAG_W-1:0] INIT_BITS = TAG_W'(INIT_TAG);

  logic [TAG_W-1:0] bit_match;

  for (genvar b = 0; b < TAG_W; b++) begin : g_cell
    cam_cell #(.INIT(INIT_BITS[b])) u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .wl   (we),
      .bl   (wtag[b]),
      .sl   (stag[b]),
      .eval (eval),
      .d    (tag[b]),
      .match(bit_match[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  valid <= 1'b0;
    else if (we) valid <= 1'b1;

  assign ml = valid && (&bit_match);

endmodule
