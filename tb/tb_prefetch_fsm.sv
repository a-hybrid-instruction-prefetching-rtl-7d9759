// Self-checking testbench of prefetch_fsm. The line requests the FSM issues
// (with random back-pressure) are compared with the lines each scenario
// should produce, and the stream wait state is timed:
//   1. SWP of 40 bytes from an unaligned address: 3 lines.
//   2. NLP on a demand miss, 64-byte burst: the 4 lines after the miss.
//   3. NLP disabled: a miss issues nothing.
//   4. STP: NLP burst, then WAIT cycles idle, then the next burst, repeated;
//      and with 0 wait cycles, bursts back to back.
//   5. Preemption: SWP drops a running NLP burst; NLP during SWP is ignored.
module tb_prefetch_fsm;
  import icache_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic swp_v, miss_v, nlp_en, stp_en, pf_v, pf_r, busy, preempt, waiting;
  logic [31:0] swp_addr; logic [15:0] swp_size, burst, waitc;
  line_addr_t miss_line, pf_line; pf_src_e src;

  prefetch_fsm dut (.clk_i(clk), .rst_ni(rst_n), .swp_valid_i(swp_v), .swp_addr_i(swp_addr),
    .swp_size_i(swp_size), .miss_evt_valid_i(miss_v), .miss_evt_line_i(miss_line),
    .nlp_en_i(nlp_en), .burst_bytes_i(burst), .stp_en_i(stp_en), .wait_cycles_i(waitc),
    .pf_valid_o(pf_v), .pf_ready_i(pf_r), .pf_line_o(pf_line), .busy_o(busy), .src_o(src),
    .preempt_o(preempt), .waiting_o(waiting));

  line_addr_t got[$];
  longint     got_t[$];
  longint     cyc = 0;
  int         nb_preempt = 0;
  bit         rand_ready = 1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pf_v && pf_r) begin got.push_back(pf_line); got_t.push_back(cyc); end
    if (preempt) nb_preempt++;
  end
  always @(negedge clk) pf_r <= rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_lines(line_addr_t first, int n, string what);
    check(got.size() == n, $sformatf("%s: %0d lines, expected %0d", what, got.size(), n));
    for (int i = 0; i < n && i < got.size(); i++)
      check(got[i] == first + line_addr_t'(i), $sformatf("%s: line %0d = %h", what, i, got[i]));
  endtask

  task automatic idle_wait();
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    swp_v = 0; miss_v = 0; nlp_en = 0; stp_en = 0; swp_addr = 0; swp_size = 0;
    burst = 16'd64; waitc = 16'd10; miss_line = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. SWP
    swp_v = 1; swp_addr = 32'h0000_1008; swp_size = 16'd40;
    @(negedge clk); swp_v = 0;
    idle_wait();
    expect_lines(28'h100, 3, "SWP");
    got.delete(); got_t.delete();

    // 2. NLP
    nlp_en = 1;
    miss_v = 1; miss_line = 28'h200;
    @(negedge clk); miss_v = 0;
    idle_wait();
    expect_lines(28'h201, 4, "NLP");
    got.delete(); got_t.delete();

    // 3. NLP disabled
    nlp_en = 0;
    miss_v = 1; miss_line = 28'h300;
    @(negedge clk); miss_v = 0;
    repeat (10) @(negedge clk);
    check(got.size() == 0 && !busy, "NLP disabled issues nothing");

    // 4. STP with full-rate ready so the gap can be timed
    rand_ready = 0;
    nlp_en = 1; stp_en = 1; waitc = 16'd10;
    miss_v = 1; miss_line = 28'h400;
    @(negedge clk); miss_v = 0;
    while (got.size() < 12) @(negedge clk);
    stp_en = 0;
    idle_wait();
    expect_lines(28'h401, 12, "NLP+STP stream");
    // last line of a burst at t, WAIT lasts WAIT cycles from t+1, the next
    // burst's first line at t+WAIT+1.
    check(got_t[4] - got_t[3] == longint'(waitc) + 1, $sformatf("STP gap %0d", got_t[4] - got_t[3]));
    check(got_t[8] - got_t[7] == longint'(waitc) + 1, $sformatf("STP gap %0d", got_t[8] - got_t[7]));
    check(got_t[3] - got_t[0] == 3, "burst issued at one line per cycle");
    got.delete(); got_t.delete();

    // 4b. STP with zero wait cycles: the stream goes on without a gap
    stp_en = 1; waitc = 16'd0;
    miss_v = 1; miss_line = 28'h480;
    @(negedge clk); miss_v = 0;
    while (got.size() < 12) @(negedge clk);
    stp_en = 0;
    idle_wait();
    // the burst running when STP is switched off may already have chained on
    check(got.size() >= 12, $sformatf("zero-wait stream gave %0d lines", got.size()));
    expect_lines(28'h481, got.size(), "STP without wait");
    check(got_t[11] - got_t[0] == 11, $sformatf("zero-wait stream took %0d cycles", got_t[11] - got_t[0]));
    got.delete(); got_t.delete();
    rand_ready = 1;

    // 5a. SWP preempts NLP
    burst = 16'd256;
    miss_v = 1; miss_line = 28'h500;
    @(negedge clk); miss_v = 0;
    while (got.size() < 2) @(negedge clk);
    swp_v = 1; swp_addr = 32'h0000_6000; swp_size = 16'd32;
    @(negedge clk); swp_v = 0;
    // 5b. NLP during SWP is ignored
    miss_v = 1; miss_line = 28'h700;
    @(negedge clk); miss_v = 0;
    idle_wait();
    check(nb_preempt == 1, $sformatf("preemptions %0d", nb_preempt));
    check(got.size() >= 4 && got.size() <= 5, $sformatf("lines after preemption %0d", got.size()));
    check(got[got.size()-2] == 28'h600 && got[got.size()-1] == 28'h601, "SWP lines after preemption");
    check(got[0] == 28'h501 && got[1] == 28'h502, "NLP lines before preemption");
    foreach (got[i]) check(got[i] < 28'h700, "NLP during SWP ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
