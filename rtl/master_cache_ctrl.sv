// Master cache controller of the shared instruction cache.
//
// All misses of the core controllers and all prefetch requests arrive here,
// one per cycle, through the miss interconnect. Each line being fetched
// from L2 occupies one miss-status entry (MSHR), which records the line
// address, the way chosen for it, and the set of cores waiting for it. A
// request for a line that already has an entry is merged into it, so a line
// is fetched once however many cores miss on it. A request for a new line
// takes a free entry; with no free entry it waits (ready low).
//
// Entries issue AXI4 read bursts to L2 (AR channel, one burst per line,
// AXI ID = entry index), so up to NB_MSHR line fetches are outstanding at
// once. Read data beats are collected in the entry's line buffer; on the
// last beat the line is written into the tag and data banks and returned,
// together with its way, to every core waiting for it (resp_valid_o has one
// bit per core). A core request that merges into an entry in the cycle its
// last beat arrives is answered in that same cycle.
//
// Every AR burst issued for an entry that at least one core is waiting for
// is a demand miss seen on the L2 bus; it is reported on miss_evt_* for the
// next-line prefetcher. Bursts of pure prefetch entries are not reported.
// The entry count, bus width and this event rule are this design's choices.
module master_cache_ctrl #(
  parameter int unsigned NB_CORES    = 4,
  parameter int unsigned NB_MSHR     = 8,
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned NB_WAYS     = 2,
  parameter int unsigned LINE_BYTES  = 16,
  parameter int unsigned AXI_DATA_W  = 64,
  localparam int unsigned NB_SETS  = CACHE_BYTES / (NB_WAYS * LINE_BYTES),
  localparam int unsigned SET_W    = $clog2(NB_SETS),
  localparam int unsigned WAY_W    = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1,
  localparam int unsigned OFF_W    = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W    = 32 - OFF_W - SET_W,
  localparam int unsigned LN_W     = LINE_BYTES * 8,
  localparam int unsigned LA_W     = 32 - OFF_W,
  localparam int unsigned SRC_W    = $clog2(NB_CORES + 1),
  localparam int unsigned ID_W     = (NB_MSHR > 1) ? $clog2(NB_MSHR) : 1,
  localparam int unsigned BEATS    = LN_W / AXI_DATA_W,
  localparam int unsigned BEAT_W   = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  // requests from the miss interconnect
  input  logic                     req_valid_i,
  output logic                     req_ready_o,
  input  logic [LA_W-1:0]          req_line_i,
  input  logic [WAY_W-1:0]         req_way_i,
  input  logic                     req_pref_i,
  input  logic [SRC_W-1:0]         req_src_i,
  // AXI4 read channels to L2
  output logic                     axi_ar_valid_o,
  input  logic                     axi_ar_ready_i,
  output logic [31:0]              axi_ar_addr_o,
  output logic [ID_W-1:0]          axi_ar_id_o,
  output logic [7:0]               axi_ar_len_o,
  output logic [2:0]               axi_ar_size_o,
  output logic [1:0]               axi_ar_burst_o,
  input  logic                     axi_r_valid_i,
  output logic                     axi_r_ready_o,
  input  logic [AXI_DATA_W-1:0]    axi_r_data_i,
  input  logic [ID_W-1:0]          axi_r_id_i,
  input  logic                     axi_r_last_i,
  // refill write into the banks
  output logic                     tag_wr_en_o,
  output logic [SET_W-1:0]         tag_wr_set_o,
  output logic [WAY_W-1:0]         tag_wr_way_o,
  output logic [TAG_W-1:0]         tag_wr_tag_o,
  output logic                     data_wr_en_o,
  output logic [LN_W-1:0]          data_wr_line_o,
  // refill response to the core controllers
  output logic [NB_CORES-1:0]      resp_valid_o,
  output logic [WAY_W-1:0]         resp_way_o,
  output logic [LN_W-1:0]          resp_line_o,
  // demand miss issued on AXI, for the next-line prefetcher
  output logic                     miss_evt_valid_o,
  output logic [LA_W-1:0]          miss_evt_line_o
);

  typedef struct packed {
    logic                valid;
    logic                issued;
    logic [LA_W-1:0]     line;
    logic [WAY_W-1:0]    way;
    logic [NB_CORES-1:0] waiting;
    logic [BEAT_W-1:0]   beat;
  } mshr_t;

  mshr_t             mshr_q [NB_MSHR];
  logic [LN_W-1:0]   buf_q  [NB_MSHR];

  // ---- request side: merge or allocate ----
  logic              match_any, free_any;
  logic [ID_W-1:0]   match_idx, free_idx;
  logic [NB_CORES-1:0] src_bit;

  always_comb begin
    match_any = 1'b0; match_idx = '0;
    free_any  = 1'b0; free_idx  = '0;
    for (int i = NB_MSHR - 1; i >= 0; i--) begin
      if (mshr_q[i].valid && mshr_q[i].line == req_line_i) begin
        match_any = 1'b1; match_idx = ID_W'(i);
      end
      if (!mshr_q[i].valid) begin
        free_any = 1'b1; free_idx = ID_W'(i);
      end
    end
    for (int c = 0; c < NB_CORES; c++) begin
      src_bit[c] = !req_pref_i && (int'(req_src_i) == c);
    end
  end

  assign req_ready_o = match_any || free_any;
  logic req_fire;
  assign req_fire = req_valid_i && req_ready_o;

  // ---- AR side: lowest entry not yet issued ----
  logic            ar_any;
  logic [ID_W-1:0] ar_idx;
  always_comb begin
    ar_any = 1'b0; ar_idx = '0;
    for (int i = NB_MSHR - 1; i >= 0; i--) begin
      if (mshr_q[i].valid && !mshr_q[i].issued) begin
        ar_any = 1'b1; ar_idx = ID_W'(i);
      end
    end
  end

  assign axi_ar_valid_o = ar_any;
  assign axi_ar_addr_o  = {mshr_q[ar_idx].line, {OFF_W{1'b0}}};
  assign axi_ar_id_o    = ar_idx;
  assign axi_ar_len_o   = 8'(BEATS - 1);
  assign axi_ar_size_o  = 3'($clog2(AXI_DATA_W / 8));
  assign axi_ar_burst_o = 2'b01;   // INCR

  logic ar_fire;
  assign ar_fire          = axi_ar_valid_o && axi_ar_ready_i;
  assign miss_evt_valid_o = ar_fire && (mshr_q[ar_idx].waiting != '0);
  assign miss_evt_line_o  = mshr_q[ar_idx].line;

  // ---- R side: collect beats, complete on last ----
  assign axi_r_ready_o = 1'b1;
  logic r_fire, done;
  logic [LN_W-1:0] done_line;
  mshr_t           r_ent;
  assign r_fire = axi_r_valid_i;
  assign done   = r_fire && axi_r_last_i;
  assign r_ent  = mshr_q[axi_r_id_i];

  always_comb begin
    done_line = buf_q[axi_r_id_i];
    done_line[r_ent.beat*AXI_DATA_W +: AXI_DATA_W] = axi_r_data_i;
  end

  assign tag_wr_en_o    = done;
  assign tag_wr_set_o   = r_ent.line[SET_W-1:0];
  assign tag_wr_way_o   = r_ent.way;
  assign tag_wr_tag_o   = r_ent.line[LA_W-1:SET_W];
  assign data_wr_en_o   = done;
  assign data_wr_line_o = done_line;
  assign resp_way_o     = r_ent.way;
  assign resp_line_o    = done_line;

  always_comb begin
    resp_valid_o = '0;
    if (done) begin
      resp_valid_o = r_ent.waiting;
      if (req_fire && match_any && match_idx == axi_r_id_i) resp_valid_o |= src_bit;
    end
  end

  // ---- state update ----
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NB_MSHR; i++) mshr_q[i] <= '0;
    end else begin
      if (req_fire) begin
        if (match_any) begin
          mshr_q[match_idx].waiting <= mshr_q[match_idx].waiting | src_bit;
        end else begin
          mshr_q[free_idx].valid   <= 1'b1;
          mshr_q[free_idx].issued  <= 1'b0;
          mshr_q[free_idx].line    <= req_line_i;
          mshr_q[free_idx].way     <= req_way_i;
          mshr_q[free_idx].waiting <= src_bit;
          mshr_q[free_idx].beat    <= '0;
        end
      end
      if (ar_fire) mshr_q[ar_idx].issued <= 1'b1;
      if (r_fire) begin
        mshr_q[axi_r_id_i].beat <= r_ent.beat + 1'b1;
        if (axi_r_last_i) begin
          mshr_q[axi_r_id_i].valid   <= 1'b0;
          mshr_q[axi_r_id_i].waiting <= '0;
        end
      end
    end
  end

  always_ff @(posedge clk_i) begin
    if (r_fire) buf_q[axi_r_id_i][r_ent.beat*AXI_DATA_W +: AXI_DATA_W] <= axi_r_data_i;
  end

  // Read data may only return for an entry whose burst was issued.
  assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_r_valid_i |-> mshr_q[axi_r_id_i].valid && mshr_q[axi_r_id_i].issued)
    else $error("AXI read data for an idle entry");
  assert property (@(posedge clk_i) disable iff (!rst_ni)
    axi_r_valid_i && axi_r_last_i |-> int'(mshr_q[axi_r_id_i].beat) == BEATS - 1)
    else $error("AXI burst length mismatch");

endmodule
