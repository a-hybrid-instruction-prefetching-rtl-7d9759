// Self-checking testbench of prefetch_regs: reset values, write/read-back of
// every register, and the one-cycle SWP trigger pulse that follows a write
// of the size register (and only that write); then random bus traffic
// checked cycle by cycle against a reference copy of the registers.
module tb_prefetch_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req, we; logic [3:0] addr; logic [31:0] wdata, rdata;
  logic swp_valid, nlp_en, stp_en; logic [31:0] swp_addr; logic [15:0] swp_size, burst, waitc;

  prefetch_regs dut (.clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .addr_i(addr),
    .wdata_i(wdata), .rdata_o(rdata), .swp_valid_o(swp_valid), .swp_addr_o(swp_addr),
    .swp_size_o(swp_size), .nlp_en_o(nlp_en), .burst_bytes_o(burst), .stp_en_o(stp_en),
    .wait_cycles_o(waitc));

  int pulses = 0;
  always @(posedge clk) if (rst_n && swp_valid) pulses++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(logic [3:0] a, logic [31:0] d);
    @(negedge clk); req = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); req = 0; we = 0;
  endtask

  task automatic rd(logic [3:0] a, logic [31:0] exp);
    @(negedge clk); req = 1; we = 0; addr = a; #1;
    check(rdata == exp, $sformatf("read %h = %h, expected %h", a, rdata, exp));
    @(negedge clk); req = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; we = 0; addr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!nlp_en && !stp_en && burst == 16'd256 && waitc == 16'd50 && !swp_valid, "reset values");
    rd(4'h8, 32'h0000_0100);
    rd(4'hC, 32'h0000_0032);
    wr(4'h0, 32'h1C00_0040);
    check(swp_addr == 32'h1C00_0040 && pulses == 0, "address write does not trigger");
    // size write: pulse exactly one cycle later, for one cycle
    @(negedge clk); req = 1; we = 1; addr = 4'h4; wdata = 32'd96;
    @(negedge clk); req = 0; we = 0;
    check(swp_valid && swp_size == 16'd96 && swp_addr == 32'h1C00_0040, "SWP pulse after size write");
    @(negedge clk);
    check(!swp_valid && pulses == 1, "SWP pulse lasts one cycle");
    wr(4'h8, 32'h0001_0120);
    check(nlp_en && burst == 16'd288, "NLP config");
    wr(4'hC, 32'h0001_003C);
    check(stp_en && waitc == 16'd60, "STP config");
    rd(4'h0, 32'h1C00_0040);
    rd(4'h4, 32'd96);
    rd(4'h8, 32'h0001_0120);
    rd(4'hC, 32'h0001_003C);
    wr(4'h8, 32'h0000_0000);
    check(!nlp_en && burst == 0 && pulses == 1, "NLP disabled, no extra pulse");

    // random bus traffic against a reference copy of the registers: every
    // address (unmapped ones too), idle cycles with we set, back-to-back
    // size writes; outputs, read data and the pulse are checked each cycle
    begin
      logic [31:0] m_addr; logic [15:0] m_size, m_burst, m_wait; logic m_nlp, m_stp, m_pulse;
      logic [31:0] exp_rd;
      m_addr = swp_addr; m_size = swp_size; m_nlp = nlp_en; m_burst = burst;
      m_stp = stp_en; m_wait = waitc; m_pulse = 1'b0;
      for (int n = 0; n < 3000; n++) begin
        @(negedge clk);
        req = ($urandom_range(0, 3) != 0); we = $urandom_range(0, 1);
        addr = 4'($urandom_range(0, 15)); wdata = $urandom();
        #1;
        unique case (addr)
          4'h0:    exp_rd = m_addr;
          4'h4:    exp_rd = {16'd0, m_size};
          4'h8:    exp_rd = {15'd0, m_nlp, m_burst};
          4'hC:    exp_rd = {15'd0, m_stp, m_wait};
          default: exp_rd = '0;
        endcase
        check(rdata == exp_rd, $sformatf("random read %h = %h, expected %h", addr, rdata, exp_rd));
        check(swp_valid == m_pulse && swp_addr == m_addr && swp_size == m_size &&
              nlp_en == m_nlp && burst == m_burst && stp_en == m_stp && waitc == m_wait,
              $sformatf("random step %0d: register outputs", n));
        // what the coming edge does
        m_pulse = 1'b0;
        if (req && we) begin
          unique case (addr)
            4'h0: m_addr = wdata;
            4'h4: begin m_size = wdata[15:0]; m_pulse = 1'b1; end
            4'h8: begin m_nlp = wdata[16]; m_burst = wdata[15:0]; end
            4'hC: begin m_stp = wdata[16]; m_wait = wdata[15:0]; end
            default: ;
          endcase
        end
      end
      @(negedge clk); req = 0; we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
