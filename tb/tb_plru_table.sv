// Self-checking testbench of plru_table, for the 2-way default and for a
// 4-way instance. Random accesses are recorded through the update ports and
// the victim of every read port is compared with a reference that tracks,
// per set, the most recently used way of each half and which half was used
// last (an independent description of tree pseudo-LRU).
module tb_plru_table;
  localparam int unsigned NB_SETS = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // 2-way instance (default parameters)
  logic [4:0][4:0] rd2_set;  logic [4:0][0:0] vic2;
  logic [3:0] up2_v; logic [3:0][4:0] up2_set; logic [3:0][0:0] up2_way;
  plru_table dut2 (.clk_i(clk), .rst_ni(rst_n), .rd_set_i(rd2_set), .victim_o(vic2),
                   .upd_valid_i(up2_v), .upd_set_i(up2_set), .upd_way_i(up2_way));

  // 4-way instance, one update port
  logic [1:0][4:0] rd4_set;  logic [1:0][1:0] vic4;
  logic [0:0] up4_v; logic [0:0][4:0] up4_set; logic [0:0][1:0] up4_way;
  plru_table #(.NB_SETS(NB_SETS), .NB_WAYS(4), .NB_RD_PORTS(2), .NB_UPD_PORTS(1)) dut4 (
    .clk_i(clk), .rst_ni(rst_n), .rd_set_i(rd4_set), .victim_o(vic4),
    .upd_valid_i(up4_v), .upd_set_i(up4_set), .upd_way_i(up4_way));

  int last2 [NB_SETS];                          // 2-way: last used way
  int lastL [NB_SETS], lastR [NB_SETS], lastH [NB_SETS];  // 4-way

  function automatic int ref4(int s);
    if (lastH[s] == 0) return (lastR[s] == 2) ? 3 : 2;
    else               return (lastL[s] == 0) ? 1 : 0;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd2_set = '0; up2_v = '0; up2_set = '0; up2_way = '0;
    rd4_set = '0; up4_v = '0; up4_set = '0; up4_way = '0;
    for (int s = 0; s < NB_SETS; s++) begin
      last2[s] = 1; lastH[s] = 1; lastL[s] = 1; lastR[s] = 3;   // reset: victim way 0
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < 5; p++) rd2_set[p] = 5'($urandom_range(0, 7));
      for (int p = 0; p < 2; p++) rd4_set[p] = 5'($urandom_range(0, 7));
      #1;
      for (int p = 0; p < 5; p++) begin
        checks++;
        if (int'(vic2[p]) != 1 - last2[rd2_set[p]]) begin
          failures++;
          if (failures < 10) $display("2-way: set %0d victim %0d", rd2_set[p], vic2[p]);
        end
      end
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (int'(vic4[p]) != ref4(rd4_set[p])) begin
          failures++;
          if (failures < 10) $display("4-way: set %0d victim %0d exp %0d", rd4_set[p], vic4[p], ref4(rd4_set[p]));
        end
      end
      for (int u = 0; u < 4; u++) begin
        up2_v[u]   = ($urandom_range(0, 2) == 0);
        up2_set[u] = 5'($urandom_range(0, 7));
        up2_way[u] = 1'($urandom_range(0, 1));
      end
      up4_v[0]   = ($urandom_range(0, 1) == 0);
      up4_set[0] = 5'($urandom_range(0, 7));
      up4_way[0] = 2'($urandom_range(0, 3));
      @(posedge clk);
      for (int u = 0; u < 4; u++) if (up2_v[u]) last2[up2_set[u]] = int'(up2_way[u]);
      if (up4_v[0]) begin
        int w; int s;
        w = int'(up4_way[0]); s = int'(up4_set[0]);
        if (w < 2) begin lastH[s] = 0; lastL[s] = w; end
        else       begin lastH[s] = 1; lastR[s] = w; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
