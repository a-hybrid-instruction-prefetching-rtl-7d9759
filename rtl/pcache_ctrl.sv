// Private cache controller (P$C) of one core in the shared instruction cache.
//
// A fetch request (req/addr) is looked up in the shared tag banks in the
// same cycle. On a hit the request is granted, the word is read from the
// shared data banks and returned with rvalid in the next cycle: a hit costs
// one cycle, as in the cache this design follows. The hit way is recorded
// in the pseudo-LRU table.
//
// On a miss the request is still granted, and the controller picks the way
// to refill (the first invalid way of the set, else the pseudo-LRU victim)
// and sends a miss request (line address and way) to the master cache
// controller through the miss interconnect. It then waits for the master to
// return the line, hands the requested word to the core and records the way
// in the pseudo-LRU table. No new request is granted while a miss is open,
// matching an in-order core with one fetch in flight. The way-selection rule
// and the one-fetch-in-flight limit are this design's choices.
module pcache_ctrl #(
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned NB_WAYS     = 2,
  parameter int unsigned LINE_BYTES  = 16,
  localparam int unsigned NB_SETS = CACHE_BYTES / (NB_WAYS * LINE_BYTES),
  localparam int unsigned SET_W   = $clog2(NB_SETS),
  localparam int unsigned WAY_W   = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1,
  localparam int unsigned OFF_W   = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W   = 32 - OFF_W - SET_W,
  localparam int unsigned LN_W    = LINE_BYTES * 8,
  localparam int unsigned LA_W    = 32 - OFF_W
) (
  input  logic                          clk_i,
  input  logic                          rst_ni,
  // core fetch port
  input  logic                          fetch_req_i,
  input  logic [31:0]                   fetch_addr_i,
  output logic                          fetch_gnt_o,
  output logic                          fetch_rvalid_o,
  output logic [31:0]                   fetch_rdata_o,
  // tag bank read port
  output logic [SET_W-1:0]              tag_set_o,
  input  logic [NB_WAYS-1:0]            tag_valid_i,
  input  logic [NB_WAYS-1:0][TAG_W-1:0] tag_tag_i,
  // data bank read port
  output logic [SET_W-1:0]              data_set_o,
  output logic [WAY_W-1:0]              data_way_o,
  input  logic [LN_W-1:0]               data_line_i,
  // pseudo-LRU table
  input  logic [WAY_W-1:0]              lru_victim_i,
  output logic                          lru_upd_valid_o,
  output logic [SET_W-1:0]              lru_upd_set_o,
  output logic [WAY_W-1:0]              lru_upd_way_o,
  // miss request to the miss interconnect
  output logic                          miss_valid_o,
  input  logic                          miss_ready_i,
  output logic [LA_W-1:0]               miss_line_o,
  output logic [WAY_W-1:0]              miss_way_o,
  // refill response from the master cache controller
  input  logic                          resp_valid_i,
  input  logic [WAY_W-1:0]              resp_way_i,
  input  logic [LN_W-1:0]               resp_line_i
);

  typedef enum logic [1:0] {S_IDLE, S_MISS_REQ, S_MISS_WAIT} state_e;
  state_e state_q, state_d;

  logic [31:0]       addr_q;        // address of the open miss
  logic [WAY_W-1:0]  way_q;         // way chosen for the refill
  logic              rvalid_q;
  logic [31:0]       rdata_q;

  // ---- lookup of the incoming request ----
  logic [SET_W-1:0]  req_set;
  logic [TAG_W-1:0]  req_tag;
  logic [NB_WAYS-1:0] way_hit;
  logic              hit;
  logic [WAY_W-1:0]  hit_way;
  logic [WAY_W-1:0]  victim;

  assign req_set = fetch_addr_i[OFF_W +: SET_W];
  assign req_tag = fetch_addr_i[31 -: TAG_W];

  always_comb begin
    hit      = 1'b0;
    hit_way  = '0;
    victim   = lru_victim_i;
    for (int w = 0; w < NB_WAYS; w++) begin
      way_hit[w] = tag_valid_i[w] && (tag_tag_i[w] == req_tag);
    end
    for (int w = NB_WAYS - 1; w >= 0; w--) begin
      if (way_hit[w]) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
      if (!tag_valid_i[w]) begin
        victim   = WAY_W'(w);
      end
    end
  end

  assign tag_set_o  = req_set;
  assign data_set_o = req_set;
  assign data_way_o = hit_way;

  function automatic logic [31:0] pick_word(logic [LN_W-1:0] line, logic [OFF_W-3:0] word);
    return line[word*32 +: 32];
  endfunction

  // ---- control ----
  always_comb begin
    state_d         = state_q;
    fetch_gnt_o     = 1'b0;
    lru_upd_valid_o = 1'b0;
    lru_upd_set_o   = req_set;
    lru_upd_way_o   = hit_way;
    miss_valid_o    = 1'b0;
    unique case (state_q)
      S_IDLE: begin
        fetch_gnt_o = fetch_req_i;
        if (fetch_req_i) begin
          if (hit) lru_upd_valid_o = 1'b1;
          else     state_d = S_MISS_REQ;
        end
      end
      S_MISS_REQ: begin
        miss_valid_o = 1'b1;
        if (miss_ready_i) state_d = S_MISS_WAIT;
      end
      S_MISS_WAIT: ;
      default: state_d = S_IDLE;
    endcase
    // The refill can come back in the cycle the request is merged into an
    // open fetch that completes in that very cycle.
    if (state_q != S_IDLE && resp_valid_i) begin
      state_d         = S_IDLE;
      lru_upd_valid_o = 1'b1;
      lru_upd_set_o   = addr_q[OFF_W +: SET_W];
      lru_upd_way_o   = resp_way_i;
    end
  end

  assign miss_line_o = addr_q[31:OFF_W];
  assign miss_way_o  = way_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q  <= S_IDLE;
      addr_q   <= '0;
      way_q    <= '0;
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else begin
      state_q  <= state_d;
      rvalid_q <= 1'b0;
      if (state_q == S_IDLE && fetch_req_i) begin
        addr_q <= fetch_addr_i;
        way_q  <= victim;
        if (hit) begin
          rvalid_q <= 1'b1;
          rdata_q  <= pick_word(data_line_i, fetch_addr_i[OFF_W-1:2]);
        end
      end
      if (state_q != S_IDLE && resp_valid_i) begin
        rvalid_q <= 1'b1;
        rdata_q  <= pick_word(resp_line_i, addr_q[OFF_W-1:2]);
      end
    end
  end

  assign fetch_rvalid_o = rvalid_q;
  assign fetch_rdata_o  = rdata_q;

endmodule
