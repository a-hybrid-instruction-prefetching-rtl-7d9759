// Shared data banks of the instruction cache.
//
// One 16-byte line per set and way. Each core's private cache controller
// owns a combinational read port (set and way in, whole line out); the
// prefetcher has none, since it never uses the lines it brings in. The
// master cache controller writes a whole line when a refill completes; the
// write takes effect at the next clock edge. Contents are not reset: the
// valid bits in the tag banks guard them.
module data_array #(
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned NB_WAYS     = 2,
  parameter int unsigned LINE_BYTES  = 16,
  parameter int unsigned NB_RD_PORTS = 4,
  localparam int unsigned NB_SETS = CACHE_BYTES / (NB_WAYS * LINE_BYTES),
  localparam int unsigned SET_W   = $clog2(NB_SETS),
  localparam int unsigned WAY_W   = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1,
  localparam int unsigned LINE_W  = LINE_BYTES * 8
) (
  input  logic                               clk_i,
  input  logic [NB_RD_PORTS-1:0][SET_W-1:0]  rd_set_i,
  input  logic [NB_RD_PORTS-1:0][WAY_W-1:0]  rd_way_i,
  output logic [NB_RD_PORTS-1:0][LINE_W-1:0] rd_line_o,
  input  logic                               wr_en_i,
  input  logic [SET_W-1:0]                   wr_set_i,
  input  logic [WAY_W-1:0]                   wr_way_i,
  input  logic [LINE_W-1:0]                  wr_line_i
);

  logic [LINE_W-1:0] mem_q [NB_SETS][NB_WAYS];

  always_ff @(posedge clk_i) begin
    if (wr_en_i) mem_q[wr_set_i][wr_way_i] <= wr_line_i;
  end

  always_comb begin
    for (int p = 0; p < NB_RD_PORTS; p++) begin
      rd_line_o[p] = mem_q[rd_set_i[p]][rd_way_i[p]];
    end
  end

endmodule
