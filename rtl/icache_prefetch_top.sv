// Shared multi-ported instruction cache with a hybrid instruction prefetcher
// for a cluster of NB_CORES in-order cores.
//
// Structure:
//   * one private cache controller (pcache_ctrl) per core, serving hits in a
//     single cycle from the shared tag banks (tag_array) and data banks
//     (data_array);
//   * a pseudo-LRU table (plru_table) updated by the core controllers only;
//   * a miss interconnect (miss_interconnect) that funnels the misses of the
//     core controllers and the prefetch requests into the master cache
//     controller (master_cache_ctrl), which merges requests for the same
//     line, keeps up to NB_MSHR line fetches outstanding on its AXI4 read
//     port to L2, and writes refills into the banks;
//   * the prefetcher: memory-mapped registers (prefetch_regs), the hybrid
//     SWP/NLP/STP state machine (prefetch_fsm) and the prefetcher's own
//     cache controller (prefetch_pcache_ctrl) with a read-only tag port.
//     The FSM watches the demand misses the master issues on the AXI bus.
//
// Interface: per-core fetch ports (req/addr/gnt, rvalid/rdata one cycle
// after a hit), a single-cycle register bus for the prefetch registers, and
// an AXI4 read master (AR and R channels only; the cache never writes).
// The default sizes are those of the evaluated cluster: 4 cores, 1 KB,
// 2 ways, 16-byte lines. NB_MSHR and AXI_DATA_W are this design's choices.
module icache_prefetch_top #(
  parameter int unsigned NB_CORES    = 4,
  parameter int unsigned CACHE_BYTES = 1024,
  parameter int unsigned NB_WAYS     = 2,
  parameter int unsigned LINE_BYTES  = 16,
  parameter int unsigned NB_MSHR     = 8,
  parameter int unsigned AXI_DATA_W  = 64,
  localparam int unsigned NB_SETS = CACHE_BYTES / (NB_WAYS * LINE_BYTES),
  localparam int unsigned SET_W   = $clog2(NB_SETS),
  localparam int unsigned WAY_W   = (NB_WAYS > 1) ? $clog2(NB_WAYS) : 1,
  localparam int unsigned OFF_W   = $clog2(LINE_BYTES),
  localparam int unsigned TAG_W   = 32 - OFF_W - SET_W,
  localparam int unsigned LN_W    = LINE_BYTES * 8,
  localparam int unsigned LA_W    = 32 - OFF_W,
  localparam int unsigned NB_REQ  = NB_CORES + 1,
  localparam int unsigned SRC_W   = $clog2(NB_REQ),
  localparam int unsigned ID_W    = (NB_MSHR > 1) ? $clog2(NB_MSHR) : 1
) (
  input  logic                           clk_i,
  input  logic                           rst_ni,
  // core fetch ports
  input  logic [NB_CORES-1:0]            fetch_req_i,
  input  logic [NB_CORES-1:0][31:0]      fetch_addr_i,
  output logic [NB_CORES-1:0]            fetch_gnt_o,
  output logic [NB_CORES-1:0]            fetch_rvalid_o,
  output logic [NB_CORES-1:0][31:0]      fetch_rdata_o,
  // prefetch register bus
  input  logic                           cfg_req_i,
  input  logic                           cfg_we_i,
  input  logic [3:0]                     cfg_addr_i,
  input  logic [31:0]                    cfg_wdata_i,
  output logic [31:0]                    cfg_rdata_o,
  // AXI4 read master to L2
  output logic                           axi_ar_valid_o,
  input  logic                           axi_ar_ready_i,
  output logic [31:0]                    axi_ar_addr_o,
  output logic [ID_W-1:0]                axi_ar_id_o,
  output logic [7:0]                     axi_ar_len_o,
  output logic [2:0]                     axi_ar_size_o,
  output logic [1:0]                     axi_ar_burst_o,
  input  logic                           axi_r_valid_i,
  output logic                           axi_r_ready_o,
  input  logic [AXI_DATA_W-1:0]          axi_r_data_i,
  input  logic [ID_W-1:0]                axi_r_id_i,
  input  logic                           axi_r_last_i,
  // prefetcher activity, for observation
  output logic                           pf_busy_o,
  output logic [1:0]                     pf_src_o,
  output logic                           pf_preempt_o,
  output logic                           pf_waiting_o,
  output logic                           pf_drop_o,
  output logic                           pf_issue_o
);

  // tag banks: ports 0..NB_CORES-1 for the cores, port NB_CORES for the prefetcher
  logic [NB_REQ-1:0][SET_W-1:0]              tag_rd_set;
  logic [NB_REQ-1:0][NB_WAYS-1:0]            tag_rd_valid;
  logic [NB_REQ-1:0][NB_WAYS-1:0][TAG_W-1:0] tag_rd_tag;
  logic                                      tag_wr_en;
  logic [SET_W-1:0]                          tag_wr_set;
  logic [WAY_W-1:0]                          tag_wr_way;
  logic [TAG_W-1:0]                          tag_wr_tag;

  logic [NB_CORES-1:0][SET_W-1:0]            data_rd_set;
  logic [NB_CORES-1:0][WAY_W-1:0]            data_rd_way;
  logic [NB_CORES-1:0][LN_W-1:0]             data_rd_line;
  logic                                      data_wr_en;
  logic [LN_W-1:0]                           data_wr_line;

  logic [NB_REQ-1:0][WAY_W-1:0]              lru_victim;
  logic [NB_CORES-1:0]                       lru_upd_valid;
  logic [NB_CORES-1:0][SET_W-1:0]            lru_upd_set;
  logic [NB_CORES-1:0][WAY_W-1:0]            lru_upd_way;

  logic [NB_REQ-1:0]                         mreq_valid, mreq_ready, mreq_pref;
  logic [NB_REQ-1:0][LA_W-1:0]               mreq_line;
  logic [NB_REQ-1:0][WAY_W-1:0]              mreq_way;

  logic                                      mc_valid, mc_ready, mc_pref;
  logic [LA_W-1:0]                           mc_line;
  logic [WAY_W-1:0]                          mc_way;
  logic [SRC_W-1:0]                          mc_src;

  logic [NB_CORES-1:0]                       resp_valid;
  logic [WAY_W-1:0]                          resp_way;
  logic [LN_W-1:0]                           resp_line;

  logic                                      miss_evt_valid;
  logic [LA_W-1:0]                           miss_evt_line;

  tag_array #(
    .CACHE_BYTES(CACHE_BYTES), .NB_WAYS(NB_WAYS), .LINE_BYTES(LINE_BYTES), .NB_RD_PORTS(NB_REQ)
  ) i_tag_array (
    .clk_i, .rst_ni,
    .rd_set_i(tag_rd_set), .rd_valid_o(tag_rd_valid), .rd_tag_o(tag_rd_tag),
    .wr_en_i(tag_wr_en), .wr_set_i(tag_wr_set), .wr_way_i(tag_wr_way), .wr_tag_i(tag_wr_tag)
  );

  data_array #(
    .CACHE_BYTES(CACHE_BYTES), .NB_WAYS(NB_WAYS), .LINE_BYTES(LINE_BYTES), .NB_RD_PORTS(NB_CORES)
  ) i_data_array (
    .clk_i,
    .rd_set_i(data_rd_set), .rd_way_i(data_rd_way), .rd_line_o(data_rd_line),
    .wr_en_i(data_wr_en), .wr_set_i(tag_wr_set), .wr_way_i(tag_wr_way), .wr_line_i(data_wr_line)
  );

  plru_table #(
    .NB_SETS(NB_SETS), .NB_WAYS(NB_WAYS), .NB_RD_PORTS(NB_REQ), .NB_UPD_PORTS(NB_CORES)
  ) i_plru (
    .clk_i, .rst_ni,
    .rd_set_i(tag_rd_set), .victim_o(lru_victim),
    .upd_valid_i(lru_upd_valid), .upd_set_i(lru_upd_set), .upd_way_i(lru_upd_way)
  );

  for (genvar c = 0; c < NB_CORES; c++) begin : g_core
    pcache_ctrl #(
      .CACHE_BYTES(CACHE_BYTES), .NB_WAYS(NB_WAYS), .LINE_BYTES(LINE_BYTES)
    ) i_pcache (
      .clk_i, .rst_ni,
      .fetch_req_i(fetch_req_i[c]), .fetch_addr_i(fetch_addr_i[c]),
      .fetch_gnt_o(fetch_gnt_o[c]), .fetch_rvalid_o(fetch_rvalid_o[c]), .fetch_rdata_o(fetch_rdata_o[c]),
      .tag_set_o(tag_rd_set[c]), .tag_valid_i(tag_rd_valid[c]), .tag_tag_i(tag_rd_tag[c]),
      .data_set_o(data_rd_set[c]), .data_way_o(data_rd_way[c]), .data_line_i(data_rd_line[c]),
      .lru_victim_i(lru_victim[c]),
      .lru_upd_valid_o(lru_upd_valid[c]), .lru_upd_set_o(lru_upd_set[c]), .lru_upd_way_o(lru_upd_way[c]),
      .miss_valid_o(mreq_valid[c]), .miss_ready_i(mreq_ready[c]),
      .miss_line_o(mreq_line[c]), .miss_way_o(mreq_way[c]),
      .resp_valid_i(resp_valid[c]), .resp_way_i(resp_way), .resp_line_i(resp_line)
    );
    assign mreq_pref[c] = 1'b0;
  end

  // ---- prefetcher ----
  logic        swp_valid;
  logic [31:0] swp_addr;
  logic [15:0] swp_size;
  logic        nlp_en, stp_en;
  logic [15:0] burst_bytes, wait_cycles;
  logic        pf_valid, pf_ready;
  logic [LA_W-1:0] pf_line;
  icache_pkg::pf_src_e pf_src;

  prefetch_regs i_regs (
    .clk_i, .rst_ni,
    .req_i(cfg_req_i), .we_i(cfg_we_i), .addr_i(cfg_addr_i), .wdata_i(cfg_wdata_i), .rdata_o(cfg_rdata_o),
    .swp_valid_o(swp_valid), .swp_addr_o(swp_addr), .swp_size_o(swp_size),
    .nlp_en_o(nlp_en), .burst_bytes_o(burst_bytes), .stp_en_o(stp_en), .wait_cycles_o(wait_cycles)
  );

  prefetch_fsm i_fsm (
    .clk_i, .rst_ni,
    .swp_valid_i(swp_valid), .swp_addr_i(swp_addr), .swp_size_i(swp_size),
    .miss_evt_valid_i(miss_evt_valid), .miss_evt_line_i(miss_evt_line),
    .nlp_en_i(nlp_en), .burst_bytes_i(burst_bytes), .stp_en_i(stp_en), .wait_cycles_i(wait_cycles),
    .pf_valid_o(pf_valid), .pf_ready_i(pf_ready), .pf_line_o(pf_line),
    .busy_o(pf_busy_o), .src_o(pf_src), .preempt_o(pf_preempt_o), .waiting_o(pf_waiting_o)
  );
  assign pf_src_o = pf_src;

  prefetch_pcache_ctrl #(
    .CACHE_BYTES(CACHE_BYTES), .NB_WAYS(NB_WAYS), .LINE_BYTES(LINE_BYTES)
  ) i_pf_pcache (
    .clk_i, .rst_ni,
    .pf_valid_i(pf_valid), .pf_ready_o(pf_ready), .pf_line_i(pf_line),
    .tag_set_o(tag_rd_set[NB_CORES]), .tag_valid_i(tag_rd_valid[NB_CORES]), .tag_tag_i(tag_rd_tag[NB_CORES]),
    .lru_victim_i(lru_victim[NB_CORES]),
    .miss_valid_o(mreq_valid[NB_CORES]), .miss_ready_i(mreq_ready[NB_CORES]),
    .miss_line_o(mreq_line[NB_CORES]), .miss_way_o(mreq_way[NB_CORES]),
    .drop_o(pf_drop_o)
  );
  assign mreq_pref[NB_CORES] = 1'b1;
  assign pf_issue_o = mreq_valid[NB_CORES] && mreq_ready[NB_CORES];

  // ---- miss path ----
  miss_interconnect #(
    .NB_REQ(NB_REQ), .LADDR_W(LA_W), .WAY_W(WAY_W)
  ) i_miss_xbar (
    .clk_i, .rst_ni,
    .req_valid_i(mreq_valid), .req_ready_o(mreq_ready),
    .req_line_i(mreq_line), .req_way_i(mreq_way), .req_pref_i(mreq_pref),
    .out_valid_o(mc_valid), .out_ready_i(mc_ready),
    .out_line_o(mc_line), .out_way_o(mc_way), .out_pref_o(mc_pref), .out_src_o(mc_src)
  );

  master_cache_ctrl #(
    .NB_CORES(NB_CORES), .NB_MSHR(NB_MSHR), .CACHE_BYTES(CACHE_BYTES), .NB_WAYS(NB_WAYS),
    .LINE_BYTES(LINE_BYTES), .AXI_DATA_W(AXI_DATA_W)
  ) i_master (
    .clk_i, .rst_ni,
    .req_valid_i(mc_valid), .req_ready_o(mc_ready), .req_line_i(mc_line), .req_way_i(mc_way),
    .req_pref_i(mc_pref), .req_src_i(mc_src),
    .axi_ar_valid_o, .axi_ar_ready_i, .axi_ar_addr_o, .axi_ar_id_o, .axi_ar_len_o,
    .axi_ar_size_o, .axi_ar_burst_o,
    .axi_r_valid_i, .axi_r_ready_o, .axi_r_data_i, .axi_r_id_i, .axi_r_last_i,
    .tag_wr_en_o(tag_wr_en), .tag_wr_set_o(tag_wr_set), .tag_wr_way_o(tag_wr_way), .tag_wr_tag_o(tag_wr_tag),
    .data_wr_en_o(data_wr_en), .data_wr_line_o(data_wr_line),
    .resp_valid_o(resp_valid), .resp_way_o(resp_way), .resp_line_o(resp_line),
    .miss_evt_valid_o(miss_evt_valid), .miss_evt_line_o(miss_evt_line)
  );

endmodule
