// Pseudo-LRU replacement table of the shared instruction cache.
//
// Each set holds a binary tree of NB_WAYS-1 bits (one bit for the 2-way
// cache). A tree bit points towards the half that was used less recently.
// The victim of a set is found by following the bits from the root; an
// access to a way turns every bit on its path to point away from it.
//
// Read ports (one per core controller plus one for the prefetcher) return
// the current victim combinationally. Update ports are driven by the core
// controllers only, on hits and on demand refills: lines brought in by the
// prefetcher do not touch the table, which leaves them first in line for
// replacement until a core actually uses them. Updates in the same cycle
// are applied in port order and take effect at the next clock edge. The
// tree layout and the reset value (all bits 0, victim way 0) are this
// design's choice. NB_WAYS must be a power of two.
module plru_table #(
  parameter int unsigned NB_SETS      = 32,
  parameter int unsigned NB_WAYS      = 2,
  parameter int unsigned NB_RD_PORTS  = 5,
  parameter int unsigned NB_UPD_PORTS = 4,
  localparam int unsigned SET_W  = $clog2(NB_SETS),
  localparam int unsigned WAY_W  = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1,
  localparam int unsigned LEVELS = $clog2(NB_WAYS),
  localparam int unsigned TREE_W = (NB_WAYS > 1) ? NB_WAYS - 1 : 1
) (
  input  logic                                 clk_i,
  input  logic                                 rst_ni,
  input  logic [NB_RD_PORTS-1:0][SET_W-1:0]    rd_set_i,
  output logic [NB_RD_PORTS-1:0][WAY_W-1:0]    victim_o,
  input  logic [NB_UPD_PORTS-1:0]              upd_valid_i,
  input  logic [NB_UPD_PORTS-1:0][SET_W-1:0]   upd_set_i,
  input  logic [NB_UPD_PORTS-1:0][WAY_W-1:0]   upd_way_i
);

  logic [NB_SETS-1:0][TREE_W-1:0] tree_q, tree_d;

  // Victim: walk from the root following the tree bits.
  always_comb begin
    for (int p = 0; p < NB_RD_PORTS; p++) begin
      int unsigned node;
      logic [TREE_W-1:0] t;
      t           = tree_q[rd_set_i[p]];
      node        = 0;
      victim_o[p] = '0;
      for (int l = 0; l < LEVELS; l++) begin
        victim_o[p][LEVELS-1-l] = t[node];
        node = 2*node + 1 + int'(t[node]);
      end
    end
  end

  // Update: make each bit on the accessed way's path point away from it.
  always_comb begin
    tree_d = tree_q;
    for (int u = 0; u < NB_UPD_PORTS; u++) begin
      int unsigned node;
      logic d;
      node = 0;
      d    = 1'b0;
      if (upd_valid_i[u]) begin
        for (int l = 0; l < LEVELS; l++) begin
          d = upd_way_i[u][LEVELS-1-l];
          tree_d[upd_set_i[u]][node] = ~d;
          node = 2*node + 1 + int'(d);
        end
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) tree_q <= '0;
    else         tree_q <= tree_d;
  end

endmodule
