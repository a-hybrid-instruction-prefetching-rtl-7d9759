// Self-checking testbench of miss_interconnect. Five requesters issue random
// requests and hold them until accepted; the sink applies random
// back-pressure. Checks: every transfer carries the payload of the
// requester it names, only one requester is accepted per cycle, every
// request is delivered exactly once, and with all five requesting the
// grants rotate round-robin.
module tb_miss_interconnect;
  localparam int unsigned N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] v, rdy, pref;
  logic [N-1:0][27:0] line;
  logic [N-1:0][0:0]  way;
  logic ov, ordy, opref; logic [27:0] oline; logic [0:0] oway; logic [2:0] osrc;

  miss_interconnect dut (.clk_i(clk), .rst_ni(rst_n), .req_valid_i(v), .req_ready_o(rdy),
    .req_line_i(line), .req_way_i(way), .req_pref_i(pref), .out_valid_o(ov), .out_ready_i(ordy),
    .out_line_o(oline), .out_way_o(oway), .out_pref_o(opref), .out_src_o(osrc));

  int sent [N], got [N];
  int seq [N];
  int last_src;
  bit saturate;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = '0; pref = '0; line = '0; way = '0; ordy = 0; saturate = 0;
    for (int r = 0; r < N; r++) begin sent[r] = 0; got[r] = 0; seq[r] = 0; end
    last_src = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4100; cyc++) begin
      logic [N-1:0] acc;
      @(negedge clk);
      saturate = (cyc >= 3000 && cyc < 4000);
      for (int r = 0; r < N; r++) begin
        if (!v[r] && cyc < 4000 && (saturate || $urandom_range(0, 2) == 0)) begin
          v[r] = 1; pref[r] = (r == N - 1);
          line[r] = {4'(r), 24'(seq[r])}; way[r] = 1'(seq[r] & 1);
          seq[r]++; sent[r]++;
        end
      end
      ordy = saturate || cyc >= 4000 || ($urandom_range(0, 3) != 0);
      #1;
      acc = v & rdy;
      checks++;
      if ($countones(rdy) > 1 || (ov != (v != 0))) begin failures++; if (failures<5) $display("cyc %0d v=%b rdy=%b ov=%b", cyc, v, rdy, ov); end
      if (ov && ordy) begin
        checks++;
        if (!v[osrc] || !rdy[osrc] || oline !== line[osrc] || oway !== way[osrc] || opref !== pref[osrc])
          failures++;
        if (saturate && cyc > 3005) begin
          checks++;
          if (int'(osrc) != (last_src + 1) % N) begin
            failures++;
            $display("round-robin broken: %0d after %0d", osrc, last_src);
          end
        end
        last_src = int'(osrc);
      end
      @(posedge clk); #1;
      for (int r = 0; r < N; r++) if (acc[r]) begin got[r]++; v[r] = 0; end
    end
    for (int r = 0; r < N; r++) begin
      checks++;
      if (got[r] != sent[r]) begin
        failures++;
        $display("requester %0d: sent %0d delivered %0d", r, sent[r], got[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
