// End-to-end testbench of icache_prefetch_top at its default size (4 cores,
// 1 KB 2-way cache, 16-byte lines) with the behavioural L2 model (20-cycle
// latency). Four in-order core stand-ins fetch one instruction stream each
// (pipelined: a new address right after each grant) and check every
// instruction against the memory content.
//
// Two programs, each run from reset under several prefetch settings:
//   LOOP  all cores run a 1.5 KB loop body (larger than the cache) 3 times,
//         the pattern of unrolled kernels: no prefetch / NLP / NLP+STP;
//   CALLS a short main loop calling one of three 192-byte functions in
//         turn, the pattern of call-heavy code: no prefetch / SWP+NLP, with
//         core 0 writing the SWP registers mid-loop for the next callee.
// The run times are compared: NLP must beat no prefetch on LOOP and SWP+NLP
// must beat no prefetch on CALLS. Every mechanism of the design is counted
// and must occur at least once: hits, misses, back-to-back single-cycle
// hits, merged misses, misses waiting for a free MSHR, NLP/SWP/STP bursts,
// the STP wait state, preemption, prefetch lines dropped as already cached,
// prefetch requests sent, and core hits on prefetched lines.
module tb_icache_prefetch_top;
  import icache_pkg::*;
  localparam int unsigned NC  = 4;
  localparam int unsigned LAT = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic logic [31:0] mem_word(logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_A5A5;
  endfunction

  logic [NC-1:0] req, gnt, rvalid; logic [NC-1:0][31:0] addr, rdata;
  logic cfg_req, cfg_we; logic [3:0] cfg_addr; logic [31:0] cfg_wdata, cfg_rdata;
  logic ar_v, ar_r, r_v, r_r, r_last; logic [31:0] ar_addr; logic [2:0] ar_id, r_id;
  logic [7:0] ar_len; logic [2:0] ar_size; logic [1:0] ar_burst; logic [63:0] r_data;
  logic pf_busy, pf_preempt, pf_waiting, pf_drop, pf_issue; logic [1:0] pf_src;
  int unsigned nb_bursts;

  icache_prefetch_top dut (.clk_i(clk), .rst_ni(rst_n),
    .fetch_req_i(req), .fetch_addr_i(addr), .fetch_gnt_o(gnt), .fetch_rvalid_o(rvalid), .fetch_rdata_o(rdata),
    .cfg_req_i(cfg_req), .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_wdata_i(cfg_wdata), .cfg_rdata_o(cfg_rdata),
    .axi_ar_valid_o(ar_v), .axi_ar_ready_i(ar_r), .axi_ar_addr_o(ar_addr), .axi_ar_id_o(ar_id),
    .axi_ar_len_o(ar_len), .axi_ar_size_o(ar_size), .axi_ar_burst_o(ar_burst),
    .axi_r_valid_i(r_v), .axi_r_ready_o(r_r), .axi_r_data_i(r_data), .axi_r_id_i(r_id), .axi_r_last_i(r_last),
    .pf_busy_o(pf_busy), .pf_src_o(pf_src), .pf_preempt_o(pf_preempt), .pf_waiting_o(pf_waiting),
    .pf_drop_o(pf_drop), .pf_issue_o(pf_issue));

  l2_mem_model #(.DATA_W(64), .ID_W(3), .LATENCY(LAT)) l2 (.clk_i(clk), .rst_ni(rst_n),
    .ar_valid_i(ar_v), .ar_ready_o(ar_r), .ar_addr_i(ar_addr), .ar_id_i(ar_id), .ar_len_i(ar_len),
    .r_valid_o(r_v), .r_ready_i(r_r), .r_data_o(r_data), .r_id_o(r_id), .r_last_o(r_last),
    .nb_bursts_o(nb_bursts));

  // ---------------- mechanism counters ----------------
  typedef enum int {
    EV_HIT, EV_MISS, EV_B2B_HIT, EV_MERGE, EV_MSHR_FULL, EV_SWP, EV_NLP, EV_STP,
    EV_STP_WAIT, EV_PREEMPT, EV_PF_DROP, EV_PF_SEND, EV_PF_HIT, EV_NUM
  } ev_e;
  string ev_name [EV_NUM] = '{"hit", "miss", "back-to-back hit", "merged miss", "MSHR full",
    "SWP burst", "NLP burst", "STP burst", "STP wait", "preemption", "prefetch drop",
    "prefetch request", "hit on prefetched line"};
  int ev [EV_NUM];

  logic [31:0] pend [NC][$];
  int          done [NC];
  bit        pf_line_set [logic [27:0]];   // lines brought in by the prefetcher only
  logic [1:0] src_prev;
  logic [NC-1:0] rvalid_prev;

  // Everything is sampled one time unit before the rising edge, after the
  // stimulus applied at the falling edge has settled.
  longint cyc = 0;
  always begin
    @(negedge clk); #4;
    cyc++;
    if (rst_n) begin
      for (int c = 0; c < NC; c++) if (rvalid[c] && rvalid_prev[c]) ev[EV_B2B_HIT]++;
      rvalid_prev = rvalid;
      if (dut.i_master.req_fire && dut.i_master.match_any && !dut.mc_pref) ev[EV_MERGE]++;
      if (dut.mc_valid && !dut.mc_ready) ev[EV_MSHR_FULL]++;
      if (dut.i_fsm.state_d == 1 && (dut.i_fsm.state_q != 1 || dut.swp_valid || dut.i_fsm.nlp_trig ||
                                     (dut.i_fsm.pf_fire && dut.i_fsm.left_q == 1))) begin
        if (dut.i_fsm.src_d == PF_SWP) ev[EV_SWP]++;
        if (dut.i_fsm.src_d == PF_NLP) ev[EV_NLP]++;
        if (dut.i_fsm.src_d == PF_STP) ev[EV_STP]++;
      end
      if (pf_waiting) ev[EV_STP_WAIT]++;
      if (pf_preempt) ev[EV_PREEMPT]++;
      if (pf_drop) ev[EV_PF_DROP]++;
      if (pf_issue) begin
        ev[EV_PF_SEND]++;
        pf_line_set[dut.mreq_line[NC]] = 1'b1;
      end
      for (int c = 0; c < NC; c++) begin
        // hit/miss classification of each granted fetch
        if (req[c] && gnt[c]) begin
          if (hit_now[c]) begin
            ev[EV_HIT]++;
            if (pf_line_set.exists(addr[c][31:4])) begin
              ev[EV_PF_HIT]++;
              pf_line_set.delete(addr[c][31:4]);
            end
          end else begin
            ev[EV_MISS]++;
            pf_line_set.delete(addr[c][31:4]);
          end
        end
        // returned instructions
        if (rvalid[c]) begin
          checks++;
          if (pend[c].size() == 0) begin
            failures++; $display("core %0d: rvalid with nothing pending", c);
          end else begin
            logic [31:0] a;
            a = pend[c].pop_front();
            if (rdata[c] != mem_word(a)) begin
              failures++;
              if (failures < 10) $display("core %0d: %h returned %h", c, a, rdata[c]);
            end
            done[c]++;
          end
        end
      end
    end
  end

  // ---------------- response checking ----------------
  // lookup result of each core controller for the fetch it is granting
  logic [NC-1:0] hit_now;
  for (genvar c = 0; c < NC; c++) begin : g_hit
    assign hit_now[c] = dut.g_core[c].i_pcache.hit;
  end

  // ---------------- register bus ----------------
  semaphore cfg_lock = new(1);
  task automatic cfg_write(logic [3:0] a, logic [31:0] d);
    cfg_lock.get(1);
    @(negedge clk); cfg_req = 1; cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_req = 0; cfg_we = 0;
    cfg_lock.put(1);
  endtask

  // ---------------- programs ----------------
  localparam logic [31:0] LOOP_BASE  = 32'h1C00_0000;
  localparam int unsigned LOOP_BYTES = 1536;
  localparam int unsigned LOOP_ITERS = 3;
  localparam logic [31:0] MAIN_BASE  = 32'h1C01_0000;
  localparam int unsigned MAIN_BYTES = 64;
  localparam logic [31:0] FUNC_BASE  = 32'h1C02_0000;
  localparam int unsigned FUNC_BYTES = 192;
  localparam int unsigned CALL_ITERS = 12;

  bit use_swp;

  // Fetch address stream of a core, one element per instruction.
  function automatic void build_prog(int prog, int c, ref logic [31:0] pcs[$]);
    pcs.delete();
    if (prog == 0) begin
      for (int it = 0; it < LOOP_ITERS; it++)
        for (int o = 0; o < LOOP_BYTES; o += 4) pcs.push_back(LOOP_BASE + 32'(o));
    end else begin
      for (int it = 0; it < CALL_ITERS; it++) begin
        logic [31:0] f;
        f = FUNC_BASE + 32'(((it + c) % 3) * 32'h800);
        for (int o = 0; o < MAIN_BYTES; o += 4) pcs.push_back(MAIN_BASE + 32'(o));
        for (int o = 0; o < FUNC_BYTES; o += 4) pcs.push_back(f + 32'(o));
      end
    end
  endfunction

  task automatic run_core(int c, int prog);
    logic [31:0] pcs[$];
    int i;
    build_prog(prog, c, pcs);
    i = 0;
    while (i < pcs.size()) begin
      @(negedge clk);
      req[c] = 1; addr[c] = pcs[i];
      #1;
      if (gnt[c]) begin
        pend[c].push_back(pcs[i]);
        // "software prefetch" of core 0, placed in the middle of main loop:
        // fetch the function about to be called
        if (use_swp && c == 0 && pcs[i] == MAIN_BASE + 32) begin
          int it;
          it = (i / ((MAIN_BYTES + FUNC_BYTES) / 4));
          fork
            begin
              cfg_write(REG_SWP_ADDR, FUNC_BASE + 32'(((it + 1) % 3) * 32'h800));
              cfg_write(REG_SWP_SIZE, FUNC_BYTES);
            end
          join_none
        end
        i++;
      end
    end
    @(negedge clk); req[c] = 0;
    while (pend[c].size() != 0) @(negedge clk);
  endtask

  // one run from reset; returns its cycle count
  task automatic run(int prog, bit nlp, bit stp, bit swp, int burst, int waitc, output longint cycles);
    longint t0;
    rst_n = 0; req = '0; addr = '0; cfg_req = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    use_swp = swp;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cfg_write(REG_NLP_CFG, {15'd0, nlp, 16'(burst)});
    cfg_write(REG_STP_CFG, {15'd0, stp, 16'(waitc)});
    for (int c = 0; c < NC; c++) done[c] = 0;
    t0 = cyc;
    // core start is staggered, as cores leave reset through software
    fork
      run_core(0, prog);
      begin repeat (3)  @(negedge clk); run_core(1, prog); end
      begin repeat (7)  @(negedge clk); run_core(2, prog); end
      begin repeat (11) @(negedge clk); run_core(3, prog); end
    join
    cycles = cyc - t0;
    for (int c = 0; c < NC; c++) begin
      logic [31:0] pcs[$];
      build_prog(prog, c, pcs);
      checks++;
      if (done[c] != pcs.size()) begin failures++; $display("core %0d: %0d of %0d instructions", c, done[c], pcs.size()); end
    end
    $display("program %s nlp=%0d stp=%0d swp=%0d burst=%0d wait=%0d: %0d cycles, %0d L2 bursts",
             prog == 0 ? "LOOP" : "CALLS", nlp, stp, swp, burst, waitc, cycles, nb_bursts);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint c_base, c_nlp, c_stp, c_cbase, c_swp;
    req = '0; addr = '0; cfg_req = 0; cfg_we = 0; cfg_addr = 0; cfg_wdata = 0;
    rvalid_prev = '0; src_prev = PF_NONE;
    foreach (ev[e]) ev[e] = 0;
    run(0, 0, 0, 0, 256, 50, c_base);
    run(0, 1, 0, 0, 256, 50, c_nlp);
    run(0, 1, 1, 0, 256, 20, c_stp);
    run(1, 0, 0, 0, 256, 50, c_cbase);
    run(1, 1, 0, 1, 64, 50, c_swp);
    checks++;
    if (c_nlp >= c_base) begin failures++; $display("NLP does not speed up LOOP"); end
    checks++;
    if (c_stp >= c_base) begin failures++; $display("NLP+STP does not speed up LOOP"); end
    checks++;
    if (c_swp >= c_cbase) begin failures++; $display("SWP+NLP does not speed up CALLS"); end
    $display("speed-up LOOP: NLP %0.2fx, NLP+STP %0.2fx; CALLS: SWP+NLP %0.2fx",
             real'(c_base) / real'(c_nlp), real'(c_base) / real'(c_stp), real'(c_cbase) / real'(c_swp));
    for (int e = 0; e < EV_NUM; e++) begin
      checks++;
      $display("  %-24s %0d", ev_name[e], ev[e]);
      if (ev[e] == 0) begin failures++; $display("mechanism never seen: %s", ev_name[e]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
