// Cache controller (P$C) of the prefetcher.
//
// Takes line requests from the prefetch FSM (valid/ready handshake) and
// looks each one up, in the cycle it is accepted, in the tag banks through
// the prefetcher's own read-only tag port. A line already in the cache is
// dropped (drop_o pulses) and the next line can be accepted in the next
// cycle. For a missing line it picks a way (the first invalid way of the
// set, else the pseudo-LRU victim) and sends a prefetch request through the
// miss interconnect, holding it until accepted. The controller never waits
// for the refill and never updates the pseudo-LRU table: the prefetcher does
// not use the lines it brings in, and leaving the table untouched makes
// prefetched lines the first to be replaced. The single-cycle lookup is
// this design's choice.
module prefetch_pcache_ctrl #(
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned NB_WAYS     = 2,
  parameter int unsigned LINE_BYTES  = 16,
  localparam int unsigned NB_SETS = CACHE_BYTES / (NB_WAYS * LINE_BYTES),
  localparam int unsigned SET_W   = $clog2(NB_SETS),
  localparam int unsigned WAY_W   = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1,
  localparam int unsigned OFF_W   = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W   = 32 - OFF_W - SET_W,
  localparam int unsigned LA_W    = 32 - OFF_W
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  // line requests from the prefetch FSM
  input  logic                          pf_valid_i,
  output logic                          pf_ready_o,
  input  logic [LA_W-1:0]               pf_line_i,
  // read-only tag port
  output logic [SET_W-1:0]              tag_set_o,
  input  logic [NB_WAYS-1:0]            tag_valid_i,
  input  logic [NB_WAYS-1:0][TAG_W-1:0] tag_tag_i,
  // pseudo-LRU victim of the looked-up set
  input  logic [WAY_W-1:0]              lru_victim_i,
  // prefetch request to the miss interconnect
  output logic                          miss_valid_o,
  input  logic                          miss_ready_i,
  output logic [LA_W-1:0]               miss_line_o,
  output logic [WAY_W-1:0]              miss_way_o,
  // observation: a requested line was already in the cache
  output logic                          drop_o
);

  logic              send_q;
  logic [LA_W-1:0]   line_q;
  logic [WAY_W-1:0]  way_q;

  logic              hit;
  logic [WAY_W-1:0]  victim;

  assign tag_set_o = pf_line_i[SET_W-1:0];

  always_comb begin
    hit    = 1'b0;
    victim = lru_victim_i;
    for (int w = NB_WAYS - 1; w >= 0; w--) begin
      if (tag_valid_i[w] && tag_tag_i[w] == pf_line_i[LA_W-1:SET_W]) hit = 1'b1;
      if (!tag_valid_i[w]) victim = WAY_W'(w);
    end
  end

  assign pf_ready_o   = !send_q;
  assign drop_o       = pf_valid_i && pf_ready_o && hit;
  assign miss_valid_o = send_q;
  assign miss_line_o  = line_q;
  assign miss_way_o   = way_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      send_q <= 1'b0;
      line_q <= '0;
      way_q  <= '0;
    end else if (send_q) begin
      if (miss_ready_i) send_q <= 1'b0;
    end else if (pf_valid_i && !hit) begin
      send_q <= 1'b1;
      line_q <= pf_line_i;
      way_q  <= victim;
    end
  end

endmodule
