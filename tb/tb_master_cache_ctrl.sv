// Self-checking testbench of master_cache_ctrl, with the behavioural L2
// model (20-cycle latency) on its AXI read port. Scenarios:
//   1. one demand miss: one 2-beat burst, refill written to the banks and
//      returned to that core, one miss event, latency checked;
//   2. two cores missing on the same line: merged into one burst, both
//      answered in the same cycle;
//   3. eight (NB_MSHR) different lines: all bursts outstanding at once,
//      and a ninth request is held off until an entry frees;
//   4. a prefetch request: burst and refill, but no core answered and no
//      miss event; a core that misses on the line meanwhile is merged in;
//   5. random traffic from all five sources on 16 lines: every core request
//      answered exactly once, with the right line, way and refill.
module tb_master_cache_ctrl;
  localparam int unsigned LAT = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic logic [31:0] mem_word(logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_A5A5;
  endfunction
  function automatic logic [127:0] mem_line(logic [27:0] l);
    for (int w = 0; w < 4; w++) mem_line[w*32 +: 32] = mem_word({l, 4'h0} + 32'(4 * w));
  endfunction

  logic req_v, req_r, req_pref; logic [27:0] req_line; logic [0:0] req_way; logic [2:0] req_src;
  logic ar_v, ar_r, r_v, r_r, r_last; logic [31:0] ar_addr; logic [2:0] ar_id, r_id;
  logic [7:0] ar_len; logic [2:0] ar_size; logic [1:0] ar_burst; logic [63:0] r_data;
  logic tw_en, dw_en; logic [4:0] tw_set; logic [0:0] tw_way; logic [22:0] tw_tag; logic [127:0] dw_line;
  logic [3:0] resp_v; logic [0:0] resp_way; logic [127:0] resp_line;
  logic evt_v; logic [27:0] evt_line;
  int unsigned nb_bursts;

  master_cache_ctrl dut (.clk_i(clk), .rst_ni(rst_n),
    .req_valid_i(req_v), .req_ready_o(req_r), .req_line_i(req_line), .req_way_i(req_way),
    .req_pref_i(req_pref), .req_src_i(req_src),
    .axi_ar_valid_o(ar_v), .axi_ar_ready_i(ar_r), .axi_ar_addr_o(ar_addr), .axi_ar_id_o(ar_id),
    .axi_ar_len_o(ar_len), .axi_ar_size_o(ar_size), .axi_ar_burst_o(ar_burst),
    .axi_r_valid_i(r_v), .axi_r_ready_o(r_r), .axi_r_data_i(r_data), .axi_r_id_i(r_id), .axi_r_last_i(r_last),
    .tag_wr_en_o(tw_en), .tag_wr_set_o(tw_set), .tag_wr_way_o(tw_way), .tag_wr_tag_o(tw_tag),
    .data_wr_en_o(dw_en), .data_wr_line_o(dw_line),
    .resp_valid_o(resp_v), .resp_way_o(resp_way), .resp_line_o(resp_line),
    .miss_evt_valid_o(evt_v), .miss_evt_line_o(evt_line));

  l2_mem_model #(.DATA_W(64), .ID_W(3), .LATENCY(LAT)) l2 (.clk_i(clk), .rst_ni(rst_n),
    .ar_valid_i(ar_v), .ar_ready_o(ar_r), .ar_addr_i(ar_addr), .ar_id_i(ar_id), .ar_len_i(ar_len),
    .r_valid_o(r_v), .r_ready_i(r_r), .r_data_o(r_data), .r_id_o(r_id), .r_last_o(r_last),
    .nb_bursts_o(nb_bursts));

  longint cyc = 0;
  int nb_evt = 0, nb_refill = 0, max_out = 0, outstanding = 0;
  longint resp_t [4];
  int     resp_n [4];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (evt_v) nb_evt++;
    if (ar_v && ar_r) begin
      checks++;
      if (ar_len != 8'd1 || ar_size != 3'd3 || ar_burst != 2'b01 || ar_addr[3:0] != 0) begin
        failures++; $display("bad AR");
      end
    end
    outstanding = outstanding + ((ar_v && ar_r) ? 1 : 0) - ((r_v && r_last) ? 1 : 0);
    if (outstanding > max_out) max_out = outstanding;
    if (tw_en) begin
      nb_refill++;
      checks++;
      if (dw_line != mem_line({tw_tag, tw_set}) || resp_line != dw_line || !dw_en) begin
        failures++; $display("refill line %h wrong", {tw_tag, tw_set});
      end
    end
    for (int c = 0; c < 4; c++) if (resp_v[c]) begin resp_t[c] = cyc; resp_n[c]++; end
  end

  // reference for the random phase: the line each core waits for
  bit        rnd_on = 0;
  logic [3:0] rnd_pend = '0;
  logic [27:0] rnd_line [4];
  int rnd_ans = 0;
  always @(posedge clk) if (rst_n && rnd_on) begin
    // a core request accepted in this cycle may be answered in this cycle
    if (req_v && req_r && !req_pref) begin
      rnd_pend[req_src[1:0]] = 1'b1;
      rnd_line[req_src[1:0]] = req_line;
    end
    for (int c = 0; c < 4; c++) if (resp_v[c]) begin
      checks++;
      if (!rnd_pend[c] || !tw_en || {tw_tag, tw_set} != rnd_line[c] || resp_way != tw_way ||
          resp_line != mem_line(rnd_line[c])) begin
        failures++;
        if (failures < 10) $display("random: core %0d answered wrongly", c);
      end
      rnd_pend[c] = 1'b0;
      rnd_ans++;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(logic [27:0] line, int src, bit pref, logic [0:0] way = 1'b0);
    @(negedge clk);
    req_v = 1; req_line = line; req_src = 3'(src); req_pref = pref; req_way = way;
    #1;
    while (!req_r) begin @(negedge clk); #1; end
    @(negedge clk);
    req_v = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0;
    req_v = 0; req_line = 0; req_src = 0; req_pref = 0; req_way = 0;
    for (int c = 0; c < 4; c++) begin resp_n[c] = 0; resp_t[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. single demand miss
    t0 = cyc;
    send(28'h1C0_0012, 0, 0, 1'b1);
    repeat (LAT + 10) @(negedge clk);
    check(nb_bursts == 1 && nb_evt == 1 && nb_refill == 1, "one burst, one event, one refill");
    check(resp_n[0] == 1, "core 0 answered");
    // accept at t0+1, AR same cycle, data after LAT, 2 beats
    check(resp_t[0] - t0 <= LAT + 4, $sformatf("miss latency %0d", resp_t[0] - t0));

    // 2. merge
    send(28'h1C0_0020, 1, 0);
    send(28'h1C0_0020, 2, 0);
    repeat (LAT + 10) @(negedge clk);
    check(nb_bursts == 2, "merged requests make one burst");
    check(resp_n[1] == 1 && resp_n[2] == 1 && resp_t[1] == resp_t[2], "both merged cores answered together");

    // 3. eight outstanding, ninth waits
    begin
      int waited;
      for (int i = 0; i < 8; i++) send(28'h1C0_0030 + 28'(i), i % 4, 0);
      @(negedge clk);
      req_v = 1; req_line = 28'h1C0_0040; req_src = 3'd0; req_pref = 0; req_way = 0;
      #1;
      waited = 0;
      while (!req_r) begin waited++; @(negedge clk); #1; end
      @(negedge clk); req_v = 0;
      check(waited > 0, $sformatf("ninth request held off %0d cycles", waited));
    end
    repeat (2 * LAT + 20) @(negedge clk);
    check(max_out == 8, $sformatf("max outstanding bursts %0d", max_out));
    check(nb_bursts == 11 && resp_n[0] == 4 && resp_n[3] == 2, "all nine answered");

    // 4. prefetch, then a demand miss merged into it
    begin
      int e0, r0;
      e0 = nb_evt; r0 = resp_n[3];
      send(28'h1C0_0050, 4, 1);
      repeat (LAT + 10) @(negedge clk);
      check(nb_evt == e0 && resp_n == '{4, 3, 3, 2}, "prefetch: no event, nobody answered");
      check(nb_bursts == 12, "prefetch burst");
      send(28'h1C0_0060, 4, 1);
      send(28'h1C0_0060, 3, 0);
      repeat (LAT + 10) @(negedge clk);
      check(nb_bursts == 13 && resp_n[3] == r0 + 1, "demand merged into a prefetch");
    end
    check(nb_refill == 13, "one refill per burst");

    // 5. random traffic from the four cores and the prefetcher on a pool of
    //    16 lines, so that merges, full MSHRs and refill races all happen;
    //    a core waits for its answer before it asks again, as a P$C does
    begin
      int b0, sent_core;
      b0 = nb_bursts; sent_core = 0; rnd_on = 1;
      for (int n = 0; n < 1500; n++) begin
        int src;
        src = $urandom_range(0, 4);
        if (src < 4 && rnd_pend[src]) begin @(negedge clk); continue; end
        if (src < 4) sent_core++;
        send(28'h1C0_0100 + 28'($urandom_range(0, 15)), src, src == 4, 1'($urandom_range(0, 1)));
      end
      repeat (3 * LAT) @(negedge clk);
      check(rnd_pend == '0, $sformatf("random: cores still waiting %b", rnd_pend));
      check(rnd_ans == sent_core, $sformatf("random: %0d answers for %0d core requests", rnd_ans, sent_core));
      check(nb_bursts - b0 < 1500, "random: some requests merged");
      $display("random traffic: %0d core requests, %0d bursts", sent_core, nb_bursts - b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
