// Memory-mapped control registers of the hybrid prefetcher.
//
// Register map (byte offsets on a 4-bit register address):
//   0x0 SWP_ADDR  start address of a software prefetch
//   0x4 SWP_SIZE  size in bytes (bits 15:0); writing it starts the software
//                 prefetch of SWP_ADDR..SWP_ADDR+size-1
//   0x8 NLP_CFG   bit 16: next-line prefetch enable, bits 15:0: burst size
//                 in bytes (0 disables NLP and STP)
//   0xC STP_CFG   bit 16: stream prefetch enable, bits 15:0: wait cycles
// A software prefetch therefore costs two stores, one per register. All
// registers read back. The bus is a simple single-cycle register bus
// (req/we/addr/wdata, rdata valid in the same cycle). swp_valid_o is a
// one-cycle pulse in the cycle after the SWP_SIZE write. After reset NLP
// and STP are off, with a burst size of 256 bytes and 50 wait cycles, the
// settings that worked well for loop-heavy code. The bus, the map and the
// reset values are this design's choices.
module prefetch_regs
  import icache_pkg::*;
#(
  parameter logic [15:0] RST_BURST_BYTES = 16'd256,
  parameter logic [15:0] RST_WAIT_CYCLES = 16'd50
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        req_i,
  input  logic        we_i,
  input  logic [3:0]  addr_i,
  input  logic [31:0] wdata_i,
  output logic [31:0] rdata_o,
  output logic        swp_valid_o,
  output logic [31:0] swp_addr_o,
  output logic [15:0] swp_size_o,
  output logic        nlp_en_o,
  output logic [15:0] burst_bytes_o,
  output logic        stp_en_o,
  output logic [15:0] wait_cycles_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      swp_valid_o   <= 1'b0;
      swp_addr_o    <= '0;
      swp_size_o    <= '0;
      nlp_en_o      <= 1'b0;
      burst_bytes_o <= RST_BURST_BYTES;
      stp_en_o      <= 1'b0;
      wait_cycles_o <= RST_WAIT_CYCLES;
    end else begin
      swp_valid_o <= 1'b0;
      if (req_i && we_i) begin
        unique case (addr_i)
          REG_SWP_ADDR: swp_addr_o <= wdata_i;
          REG_SWP_SIZE: begin
            swp_size_o  <= wdata_i[15:0];
            swp_valid_o <= 1'b1;
          end
          REG_NLP_CFG: begin
            nlp_en_o      <= wdata_i[16];
            burst_bytes_o <= wdata_i[15:0];
          end
          REG_STP_CFG: begin
            stp_en_o      <= wdata_i[16];
            wait_cycles_o <= wdata_i[15:0];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr_i)
      REG_SWP_ADDR: rdata_o = swp_addr_o;
      REG_SWP_SIZE: rdata_o = {16'd0, swp_size_o};
      REG_NLP_CFG:  rdata_o = {15'd0, nlp_en_o, burst_bytes_o};
      REG_STP_CFG:  rdata_o = {15'd0, stp_en_o, wait_cycles_o};
      default:      rdata_o = '0;
    endcase
  end

endmodule
