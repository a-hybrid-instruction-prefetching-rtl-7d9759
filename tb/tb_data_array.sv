// Self-checking testbench of data_array: random line writes against a
// reference copy, every read port checked on random set/way pairs that have
// been written.
module tb_data_array;
  localparam int unsigned NB_SETS = 32, NB_WAYS = 2, P = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [P-1:0][4:0]   rd_set;
  logic [P-1:0][0:0]   rd_way;
  logic [P-1:0][127:0] rd_line;
  logic wr_en; logic [4:0] wr_set; logic [0:0] wr_way; logic [127:0] wr_line;

  data_array dut (.clk_i(clk), .rd_set_i(rd_set), .rd_way_i(rd_way), .rd_line_o(rd_line),
                  .wr_en_i(wr_en), .wr_set_i(wr_set), .wr_way_i(wr_way), .wr_line_i(wr_line));

  logic [127:0] ref_l [NB_SETS][NB_WAYS];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_set = 0; wr_way = 0; wr_line = 0; rd_set = '0; rd_way = '0;
    // fill every line once
    for (int s = 0; s < NB_SETS; s++) for (int w = 0; w < NB_WAYS; w++) begin
      @(negedge clk);
      wr_en = 1; wr_set = 5'(s); wr_way = 1'(w);
      wr_line = {$urandom, $urandom, $urandom, $urandom};
      ref_l[s][w] = wr_line;
    end
    @(negedge clk); wr_en = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        rd_set[p] = 5'($urandom_range(0, NB_SETS - 1));
        rd_way[p] = 1'($urandom_range(0, 1));
      end
      wr_en   = ($urandom_range(0, 2) == 0);
      wr_set  = 5'($urandom_range(0, NB_SETS - 1));
      wr_way  = 1'($urandom_range(0, 1));
      wr_line = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (rd_line[p] !== ref_l[rd_set[p]][rd_way[p]]) begin
          failures++;
          if (failures < 10) $display("mismatch port %0d set %0d way %0d", p, rd_set[p], rd_way[p]);
        end
      end
      @(posedge clk);
      if (wr_en) ref_l[wr_set][wr_way] = wr_line;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
