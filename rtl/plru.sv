// plru: tree pseudo-LRU replacement for the cache rows.
//
// A binary tree of ROWS-1 direction bits (heap order: node n has children
// 2n+1 and 2n+2) sits over the ROWS rows. Each bit points to the half of its
// subtree that was used less recently (0: left/lower rows, 1: right/upper).
// The victim is found by walking from the root along the bits. Touching a row
// (on every hit, including the hit that completes a refill) walks the path to
// that row and turns every bit on it to point away from it.
// Rows that have never been filled are taken before the tree is consulted:
// while any row is invalid, the victim is the lowest-numbered invalid row.
//
// ROWS must be a power of two. Interface: `touch`/`touch_idx` update the tree
// at the rising clock edge; `victim` is combinational from the tree bits and
// `valid`. Reset clears all tree bits.
module plru #(
  parameter int unsigned ROWS = cache_pkg::ROWS,
  localparam int unsigned IW  = $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            touch,
  input  logic [IW-1:0]   touch_idx,
  input  logic [ROWS-1:0] valid,
  output logic [IW-1:0]   victim
);

  logic [ROWS-2:0] tree, tree_nxt;
  logic [IW-1:0]   tree_victim, free_row;
  logic            any_free;

  // victim: walk the tree; prefer a free row
  always_comb begin
    int unsigned n;
    n = 0;
    for (int unsigned lvl = 0; lvl < IW; lvl++)
      n = 2 * n + 1 + int'(tree[n]);
    tree_victim = IW'(n - (ROWS - 1));

    any_free = 1'b0;
    free_row = '0;
    for (int i = ROWS - 1; i >= 0; i--)
      if (!valid[i]) begin
        any_free = 1'b1;
        free_row = IW'(i);
      end

    victim = any_free ? free_row : tree_victim;
  end

  // touch: point every node on the path away from the used row
  always_comb begin
    int unsigned n;
    logic dir;
    tree_nxt = tree;
    n = 0;
    dir = 1'b0;
    if (touch)
      for (int unsigned lvl = 0; lvl < IW; lvl++) begin
        dir         = touch_idx[IW-1-lvl];
        tree_nxt[n] = !dir;
        n           = 2 * n + 1 + int'(dir);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) tree <= '0;
    else        tree <= tree_nxt;

endmodule
