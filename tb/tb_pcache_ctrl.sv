// Self-checking testbench of pcache_ctrl, with tag_array, data_array and
// plru_table instances as the shared banks; the testbench plays the master
// cache controller (refill after a random delay, written into the banks and
// returned on the response port). A core issues random fetches over a
// region twice the cache size. Checks: every instruction returned equals
// the memory content; hits return exactly one cycle after the grant; hits
// and misses match a reference copy of the cache; each miss names the
// right line and the way a reference pseudo-LRU predicts (first invalid
// way, else the way not used last), which also checks the LRU updates.
module tb_pcache_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic logic [31:0] mem_word(logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_A5A5;
  endfunction
  function automatic logic [127:0] mem_line(logic [27:0] l);
    for (int w = 0; w < 4; w++) mem_line[w*32 +: 32] = mem_word({l, 4'h0} + 32'(4 * w));
  endfunction

  logic req, gnt, rvalid; logic [31:0] addr, rdata;
  logic [0:0][4:0] tag_set; logic [0:0][1:0] tag_valid; logic [0:0][1:0][22:0] tag_tag;
  logic [0:0][4:0] d_set; logic [0:0][0:0] d_way; logic [0:0][127:0] d_line;
  logic [0:0][0:0] victim; logic [0:0] up_v; logic [0:0][4:0] up_set; logic [0:0][0:0] up_way;
  logic miss_v, miss_r; logic [27:0] miss_line; logic [0:0] miss_way;
  logic resp_v; logic [0:0] resp_way; logic [127:0] resp_line;
  logic wr_en; logic [4:0] wr_set; logic [0:0] wr_way; logic [22:0] wr_tag;

  tag_array #(.NB_RD_PORTS(1)) tags (.clk_i(clk), .rst_ni(rst_n), .rd_set_i(tag_set),
    .rd_valid_o(tag_valid), .rd_tag_o(tag_tag), .wr_en_i(wr_en), .wr_set_i(wr_set),
    .wr_way_i(wr_way), .wr_tag_i(wr_tag));
  data_array #(.NB_RD_PORTS(1)) data (.clk_i(clk), .rd_set_i(d_set), .rd_way_i(d_way),
    .rd_line_o(d_line), .wr_en_i(wr_en), .wr_set_i(wr_set), .wr_way_i(wr_way), .wr_line_i(resp_line));
  plru_table #(.NB_RD_PORTS(1), .NB_UPD_PORTS(1)) lru (.clk_i(clk), .rst_ni(rst_n),
    .rd_set_i(tag_set), .victim_o(victim), .upd_valid_i(up_v), .upd_set_i(up_set), .upd_way_i(up_way));

  pcache_ctrl dut (.clk_i(clk), .rst_ni(rst_n), .fetch_req_i(req), .fetch_addr_i(addr),
    .fetch_gnt_o(gnt), .fetch_rvalid_o(rvalid), .fetch_rdata_o(rdata),
    .tag_set_o(tag_set[0]), .tag_valid_i(tag_valid[0]), .tag_tag_i(tag_tag[0]),
    .data_set_o(d_set[0]), .data_way_o(d_way[0]), .data_line_i(d_line[0]),
    .lru_victim_i(victim[0]), .lru_upd_valid_o(up_v[0]), .lru_upd_set_o(up_set[0]),
    .lru_upd_way_o(up_way[0]), .miss_valid_o(miss_v), .miss_ready_i(miss_r),
    .miss_line_o(miss_line), .miss_way_o(miss_way), .resp_valid_i(resp_v),
    .resp_way_i(resp_way), .resp_line_i(resp_line));

  // reference cache
  bit          rv [32][2];
  logic [22:0] rt [32][2];
  int          last [32];
  int nb_hit = 0, nb_miss = 0;

  // master stand-in
  logic [27:0] pend_line; logic [0:0] pend_way; bit pend = 0; int delay;
  assign wr_set = pend_line[4:0];
  assign wr_way = pend_way;
  assign wr_tag = pend_line[27:5];
  assign resp_way  = pend_way;
  assign resp_line = mem_line(pend_line);
  always @(negedge clk) begin
    miss_r <= ($urandom_range(0, 1) == 0);
    wr_en  <= 1'b0; resp_v <= 1'b0;
    if (pend) begin
      if (delay == 0) begin wr_en <= 1'b1; resp_v <= 1'b1; pend = 0; end
      else delay--;
    end
  end
  always @(posedge clk) if (rst_n && miss_v && miss_r) begin
    pend <= 1; pend_line <= miss_line; pend_way <= miss_way; delay <= $urandom_range(0, 25);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; addr = 0; resp_v = 0; wr_en = 0; miss_r = 0;
    foreach (rv[s, w]) rv[s][w] = 0;
    foreach (last[s]) last[s] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      logic [31:0] a; logic [4:0] s; logic [22:0] t; bit hit; int hw, ew;
      a = 32'h1C00_0000 + 32'($urandom_range(0, 2047)) & ~32'h3;
      // mostly sequential runs for a realistic hit mix
      if (i > 0 && $urandom_range(0, 3) != 0) a = addr + 4;
      s = a[8:4]; t = a[31:9];
      @(negedge clk);
      req = 1; addr = a;
      #1;
      checks++;
      if (!gnt) begin failures++; $display("not granted when idle"); end
      hit = 0; hw = 0;
      for (int w = 0; w < 2; w++) if (rv[s][w] && rt[s][w] == t) begin hit = 1; hw = w; end
      @(negedge clk);
      req = 0;
      if (hit) begin
        nb_hit++;
        checks++;
        if (!rvalid || rdata != mem_word(a)) begin
          failures++;
          $display("hit at %h: rvalid %0d data %h", a, rvalid, rdata);
        end
        last[s] = hw;
      end else begin
        nb_miss++;
        ew = !rv[s][0] ? 0 : !rv[s][1] ? 1 : 1 - last[s];
        checks++;
        if (rvalid) begin failures++; $display("rvalid on a miss"); end
        while (!(miss_v && miss_r)) @(posedge clk);
        checks++;
        if (miss_line != a[31:4] || int'(miss_way) != ew) begin
          failures++;
          $display("miss at %h: line %h way %0d, expected way %0d", a, miss_line, miss_way, ew);
        end
        while (!rvalid) @(negedge clk);
        checks++;
        if (rdata != mem_word(a)) begin failures++; $display("refill data at %h: %h", a, rdata); end
        rv[s][ew] = 1; rt[s][ew] = t; last[s] = ew;
      end
    end
    checks++;
    if (nb_hit < 100 || nb_miss < 100) begin failures++; $display("hits %0d misses %0d", nb_hit, nb_miss); end
    $display("hits %0d misses %0d", nb_hit, nb_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
