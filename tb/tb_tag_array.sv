// Self-checking testbench of tag_array: random refill writes against a
// reference copy of the banks, every read port checked every cycle on
// random sets, including the all-invalid state after reset.
module tb_tag_array;
  localparam int unsigned NB_SETS = 32, NB_WAYS = 2, P = 5, TAG_W = 23;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [P-1:0][4:0]                    rd_set;
  logic [P-1:0][NB_WAYS-1:0]            rd_valid;
  logic [P-1:0][NB_WAYS-1:0][TAG_W-1:0] rd_tag;
  logic wr_en; logic [4:0] wr_set; logic [0:0] wr_way; logic [TAG_W-1:0] wr_tag;

  tag_array dut (.clk_i(clk), .rst_ni(rst_n), .rd_set_i(rd_set), .rd_valid_o(rd_valid),
                 .rd_tag_o(rd_tag), .wr_en_i(wr_en), .wr_set_i(wr_set), .wr_way_i(wr_way), .wr_tag_i(wr_tag));

  bit              ref_v [NB_SETS][NB_WAYS];
  logic [TAG_W-1:0] ref_t [NB_SETS][NB_WAYS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_set = 0; wr_way = 0; wr_tag = 0; rd_set = '0;
    foreach (ref_v[s, w]) ref_v[s][w] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) rd_set[p] = 5'($urandom_range(0, NB_SETS - 1));
      wr_en  = ($urandom_range(0, 3) == 0);
      wr_set = 5'($urandom_range(0, NB_SETS - 1));
      wr_way = 1'($urandom_range(0, 1));
      wr_tag = TAG_W'($urandom);
      #1;
      for (int p = 0; p < P; p++) begin
        for (int w = 0; w < NB_WAYS; w++) begin
          checks++;
          if (rd_valid[p][w] !== ref_v[rd_set[p]][w] ||
              (ref_v[rd_set[p]][w] && rd_tag[p][w] !== ref_t[rd_set[p]][w])) begin
            failures++;
            if (failures < 10) $display("mismatch port %0d set %0d way %0d", p, rd_set[p], w);
          end
        end
      end
      @(posedge clk);
      if (wr_en) begin ref_v[wr_set][wr_way] = 1; ref_t[wr_set][wr_way] = wr_tag; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
