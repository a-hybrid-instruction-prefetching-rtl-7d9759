// Shared tag banks of the instruction cache.
//
// Holds one valid bit and one tag per set and way. Every private cache
// controller owns a read port; the prefetcher's controller owns one more,
// read-only port, so NB_RD_PORTS is the number of cores plus one. Reads are
// combinational (the banks stand in for standard-cell memory, which the
// cache is built from); the single write port is used by the master cache
// controller when a refill completes and takes effect at the next clock
// edge. All lines are invalid after reset; there is no flush port.
module tag_array #(
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned NB_WAYS     = 2,
  parameter int unsigned LINE_BYTES  = 16,
  parameter int unsigned NB_RD_PORTS = 5,
  localparam int unsigned NB_SETS = CACHE_BYTES / (NB_WAYS * LINE_BYTES),
  localparam int unsigned SET_W   = $clog2(NB_SETS),
  localparam int unsigned WAY_W   = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1,
  localparam int unsigned TAG_W   = 32 - $clog2(LINE_BYTES) - SET_W
) (
  input  logic                                   clk_i,
  input  logic                                   rst_ni,
  input  logic [NB_RD_PORTS-1:0][SET_W-1:0]      rd_set_i,
  output logic [NB_RD_PORTS-1:0][NB_WAYS-1:0]    rd_valid_o,
  output logic [NB_RD_PORTS-1:0][NB_WAYS-1:0][TAG_W-1:0] rd_tag_o,
  input  logic                                   wr_en_i,
  input  logic [SET_W-1:0]                       wr_set_i,
  input  logic [WAY_W-1:0]                       wr_way_i,
  input  logic [TAG_W-1:0]                       wr_tag_i
);

  logic [NB_SETS-1:0][NB_WAYS-1:0]             valid_q;
  logic [NB_SETS-1:0][NB_WAYS-1:0][TAG_W-1:0]  tag_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_q <= '0;
    end else if (wr_en_i) begin
      valid_q[wr_set_i][wr_way_i] <= 1'b1;
    end
  end

  // Tags need no reset: a tag is only looked at when its valid bit is set.
  always_ff @(posedge clk_i) begin
    if (wr_en_i) tag_q[wr_set_i][wr_way_i] <= wr_tag_i;
  end

  always_comb begin
    for (int p = 0; p < NB_RD_PORTS; p++) begin
      rd_valid_o[p] = valid_q[rd_set_i[p]];
      rd_tag_o[p]   = tag_q[rd_set_i[p]];
    end
  end

endmodule
