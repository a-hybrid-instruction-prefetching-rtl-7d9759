// Self-checking testbench of prefetch_pcache_ctrl, with a tag_array instance
// as the tag banks. Some lines are written into the tags first; then a
// random stream of line requests is fed in. Lines already cached must be
// dropped without a miss request (at one per cycle); every other line must
// produce exactly one prefetch request with the right line address and the
// way rule: lowest invalid way of the set, else the victim the pseudo-LRU
// input names.
module tb_prefetch_pcache_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic pf_v, pf_r, miss_v, miss_r, drop;
  logic [27:0] pf_line, miss_line;
  logic [0:0]  miss_way, lru_victim;
  logic [0:0][4:0] tag_set;
  logic [0:0][1:0] tag_valid;
  logic [0:0][1:0][22:0] tag_tag;
  logic wr_en; logic [4:0] wr_set; logic [0:0] wr_way; logic [22:0] wr_tag;

  tag_array #(.NB_RD_PORTS(1)) tags (.clk_i(clk), .rst_ni(rst_n), .rd_set_i(tag_set),
    .rd_valid_o(tag_valid), .rd_tag_o(tag_tag), .wr_en_i(wr_en), .wr_set_i(wr_set),
    .wr_way_i(wr_way), .wr_tag_i(wr_tag));

  prefetch_pcache_ctrl dut (.clk_i(clk), .rst_ni(rst_n), .pf_valid_i(pf_v), .pf_ready_o(pf_r),
    .pf_line_i(pf_line), .tag_set_o(tag_set[0]), .tag_valid_i(tag_valid[0]), .tag_tag_i(tag_tag[0]),
    .lru_victim_i(lru_victim), .miss_valid_o(miss_v), .miss_ready_i(miss_r),
    .miss_line_o(miss_line), .miss_way_o(miss_way), .drop_o(drop));

  // reference of what is cached
  bit          rv [32][2];
  logic [22:0] rt [32][2];
  logic [27:0] exp_line[$];
  logic [0:0]  exp_way[$];
  int nb_drop = 0, exp_drop = 0, nb_req = 0;

  function automatic logic [0:0] lru_of(logic [4:0] s);
    return s[1] ^ s[3];
  endfunction
  assign lru_victim = lru_of(tag_set[0]);

  always @(posedge clk) if (rst_n) begin
    if (drop) nb_drop++;
    if (miss_v && miss_r) begin
      nb_req++;
      checks++;
      if (exp_line.size() == 0 || miss_line != exp_line[0] || miss_way != exp_way[0]) begin
        failures++;
        $display("unexpected request line %h way %0d", miss_line, miss_way);
      end
      if (exp_line.size() > 0) begin void'(exp_line.pop_front()); void'(exp_way.pop_front()); end
    end
  end
  always @(negedge clk) miss_r <= ($urandom_range(0, 2) == 0);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pf_v = 0; pf_line = 0; wr_en = 0; wr_set = 0; wr_way = 0; wr_tag = 0;
    foreach (rv[s, w]) rv[s][w] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // preload: sets 0..15 fully, sets 16..23 way 0 only, others empty
    for (int s = 0; s < 24; s++) for (int w = 0; w < 2; w++) begin
      if (s >= 16 && w == 1) continue;
      @(negedge clk);
      wr_en = 1; wr_set = 5'(s); wr_way = 1'(w); wr_tag = 23'(100 + w);
      rv[s][w] = 1; rt[s][w] = 23'(100 + w);
    end
    @(negedge clk); wr_en = 0;
    // a run of cached lines must be dropped at one per cycle
    begin
      int t0;
      t0 = nb_drop;
      for (int s = 0; s < 8; s++) begin
        pf_v = 1; pf_line = {23'd100, 5'(s)};
        @(negedge clk);
      end
      pf_v = 0;
      checks++;
      if (nb_drop - t0 != 8) begin failures++; $display("drops %0d", nb_drop - t0); end
      exp_drop = 8;
    end
    // random stream
    for (int i = 0; i < 400; i++) begin
      logic [4:0] s; logic [22:0] t; bit hit; logic [0:0] way;
      s = 5'($urandom_range(0, 31));
      t = 23'($urandom_range(100, 103));
      pf_v = 1; pf_line = {t, s};
      #1;
      while (!pf_r) begin @(negedge clk); #1; end
      hit = (rv[s][0] && rt[s][0] == t) || (rv[s][1] && rt[s][1] == t);
      if (hit) exp_drop++;
      else begin
        way = !rv[s][0] ? 1'b0 : !rv[s][1] ? 1'b1 : lru_of(s);
        exp_line.push_back({t, s}); exp_way.push_back(way);
      end
      @(negedge clk);
      pf_v = 0;
      // occasionally let the refill land, as the master would
      if (!hit && $urandom_range(0, 1) == 0) begin
        while (exp_line.size() != 0) @(negedge clk);
        wr_en = 1; wr_set = s; wr_way = way; wr_tag = t;
        rv[s][way] = 1; rt[s][way] = t;
        @(negedge clk); wr_en = 0;
      end
    end
    while (exp_line.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (nb_drop != exp_drop) begin failures++; $display("drops %0d expected %0d", nb_drop, exp_drop); end
    checks++;
    if (nb_req == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
