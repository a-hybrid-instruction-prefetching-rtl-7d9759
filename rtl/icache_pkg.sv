// Shared constants and types of the shared instruction cache and its hybrid
// prefetcher.
//
// The cache works on 32-bit byte addresses and 16-byte lines (the line size
// is the one the prefetcher issues line by line). A "line address" is the
// byte address with the 4 offset bits dropped. The prefetch source encoding
// and the register map of the prefetch registers are this design's own
// choice.
package icache_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned LINE_BYTES = 16;
  localparam int unsigned OFFSET_W   = $clog2(LINE_BYTES);      // 4
  localparam int unsigned LADDR_W    = ADDR_W - OFFSET_W;       // 28

  typedef logic [LADDR_W-1:0] line_addr_t;

  // Which mechanism a prefetch burst comes from; lower value = higher priority.
  typedef enum logic [1:0] {
    PF_SWP  = 2'd0,
    PF_NLP  = 2'd1,
    PF_STP  = 2'd2,
    PF_NONE = 2'd3
  } pf_src_e;

  // Register offsets of the prefetch registers (byte offsets).
  localparam logic [3:0] REG_SWP_ADDR = 4'h0;
  localparam logic [3:0] REG_SWP_SIZE = 4'h4;
  localparam logic [3:0] REG_NLP_CFG  = 4'h8;
  localparam logic [3:0] REG_STP_CFG  = 4'hC;

endpackage
