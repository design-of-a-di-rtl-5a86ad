// or_tree: the completion OR tree of the CAM.
//
// ORs the N latched match lines into one completion signal: it rises when
// any row has matched and falls when the match-line latches are cleared.
// Built as a balanced tree of FAN-input OR gates (FAN = 4 by default): level
// l+1 has ceil(width(l) / FAN) gates, each ORing FAN neighbouring nodes of
// level l, until one node is left. Depth is ceil(log_FAN(N)) gates (6 for
// 2048 inputs). The tree form and fan-in are this design's choice; the
// source only calls for an OR of the match lines. Combinational.
module or_tree #(
  parameter int unsigned N   = 2048,
  parameter int unsigned FAN = 4
) (
  input  logic [N-1:0] in,
  output logic         out
);

  // number of nodes on level l
  function automatic int unsigned width(input int unsigned l);
    int unsigned w = N;
    for (int unsigned i = 0; i < l; i++) w = (w + FAN - 1) / FAN;
    return w;
  endfunction

  // number of gate levels
  function automatic int unsigned levels();
    int unsigned w = N, l = 0;
    while (w > 1) begin
      w = (w + FAN - 1) / FAN;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LV = levels();

  logic [N-1:0] node [LV+1];

  assign node[0] = in;

  for (genvar l = 0; l < LV; l++) begin : g_lvl
    localparam int unsigned WI = width(l);
    localparam int unsigned WO = width(l + 1);
    for (genvar g = 0; g < WO; g++) begin : g_gate
      localparam int unsigned LO = g * FAN;
      localparam int unsigned K  = (WI - LO < FAN) ? (WI - LO) : FAN;
      assign node[l+1][g] = |node[l][LO +: K];
    end
    if (WO < N) begin : g_pad
      assign node[l+1][N-1:WO] = '0;
    end
  end

  assign out = node[LV][0];

endmodule
