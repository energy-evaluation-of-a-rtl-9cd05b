// icache_plru: pseudo-LRU replacement table of the instruction cache.
//
// Keeps one binary tree of WAYS-1 bits per set. Each internal node points
// towards the half of the ways that was used less recently. The victim is
// found by following the pointers from the root; using a way flips every node
// on its path to point away from it. For WAYS = 1 there is nothing to choose
// and the victim is always way 0.
//
// Interface: `victim` is the one-hot choice for set `rd_idx` (combinational).
// `touch_en` marks way `touch_way` (one-hot) of set `touch_idx` as most
// recently used at the next edge. `flush_we` clears the bits of set
// `flush_idx`, which makes way 0 the first victim of that set, as the flush
// that follows reset requires. Flush and touch are never asked for together;
// flush wins.
//
// The cache uses pseudo-LRU for its smaller logic compared with true LRU;
// the tree form is this design's choice.
module icache_plru #(
  parameter int unsigned WAYS = 4,
  parameter int unsigned SETS = 32
) (
  input  logic                    clk,
  input  logic                    flush_we,
  input  logic [$clog2(SETS)-1:0] flush_idx,
  input  logic [$clog2(SETS)-1:0] rd_idx,
  output logic [WAYS-1:0]         victim,
  input  logic                    touch_en,
  input  logic [$clog2(SETS)-1:0] touch_idx,
  input  logic [WAYS-1:0]         touch_way
);

  localparam int unsigned LV = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned NB = (WAYS > 1) ? WAYS - 1 : 1;

  logic [NB-1:0] tree_q [SETS];
  logic [NB-1:0] cur, touched;

  function automatic int unsigned onehot_to_idx(logic [WAYS-1:0] oh);
    int unsigned r = 0;
    for (int unsigned i = 0; i < WAYS; i++) if (oh[i]) r = i;
    return r;
  endfunction

  always_comb begin
    int unsigned node, w;
    logic dir;
    victim = '0;
    cur    = tree_q[rd_idx];
    if (WAYS == 1) begin
      victim = 1;
    end else begin
      node = 0;
      for (int unsigned l = 0; l < LV; l++) begin
        node = 2 * node + 1 + int'(cur[node]);
      end
      victim[node - (WAYS - 1)] = 1'b1;
    end
    // new tree bits for the touched set
    touched = tree_q[touch_idx];
    if (WAYS > 1) begin
      w    = onehot_to_idx(touch_way);
      node = 0;
      for (int unsigned l = 0; l < LV; l++) begin
        dir           = w[LV-1-l];
        touched[node] = ~dir;
        node          = 2 * node + 1 + int'(dir);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (flush_we)      tree_q[flush_idx] <= '0;
    else if (touch_en) tree_q[touch_idx] <= touched;
  end

endmodule
