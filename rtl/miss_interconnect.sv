// Miss interconnect of the shared instruction cache.
//
// Collects the miss requests of the core private cache controllers and of
// the prefetcher's controller and passes one per cycle to the master cache
// controller. Arbitration is round-robin over all requesters, the
// prefetcher included (the arbitration scheme is this design's choice).
// Requests use a valid/ready handshake: a requester holds valid and its
// payload until ready; the output carries the index of the granted
// requester in out_src_o. The output is combinational from the inputs; the
// round-robin pointer moves past the granted requester after each accepted
// transfer.
module miss_interconnect #(
  parameter int unsigned NB_REQ  = 5,
  parameter int unsigned LADDR_W = 28,
  parameter int unsigned WAY_W   = 1,
  localparam int unsigned SRC_W  = (NB_REQ > 1) ? $clog2(NB_REQ) : 1
) (
  input  logic                              clk_i,
  input  logic                              rst_ni,
  input  logic [NB_REQ-1:0]                 req_valid_i,
  output logic [NB_REQ-1:0]                 req_ready_o,
  input  logic [NB_REQ-1:0][LADDR_W-1:0]    req_line_i,
  input  logic [NB_REQ-1:0][WAY_W-1:0]      req_way_i,
  input  logic [NB_REQ-1:0]                 req_pref_i,
  output logic                              out_valid_o,
  input  logic                              out_ready_i,
  output logic [LADDR_W-1:0]                out_line_o,
  output logic [WAY_W-1:0]                  out_way_o,
  output logic                              out_pref_o,
  output logic [SRC_W-1:0]                  out_src_o
);

  logic [SRC_W-1:0] ptr_q;   // requester with the highest priority
  logic [SRC_W-1:0] sel;
  logic             found;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int unsigned k = 0; k < NB_REQ; k++) begin
      logic [SRC_W-1:0] idx;
      idx = SRC_W'((int'(ptr_q) + k) % NB_REQ);
      if (!found && req_valid_i[idx]) begin
        found = 1'b1;
        sel   = idx;
      end
    end
  end

  assign out_valid_o = found;
  assign out_line_o  = req_line_i[sel];
  assign out_way_o   = req_way_i[sel];
  assign out_pref_o  = req_pref_i[sel];
  assign out_src_o   = sel;

  always_comb begin
    req_ready_o = '0;
    if (found) req_ready_o[sel] = out_ready_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      ptr_q <= '0;
    end else if (found && out_ready_i) begin
      ptr_q <= (int'(sel) == NB_REQ - 1) ? '0 : sel + 1'b1;
    end
  end

  // A requester must keep its request stable until it is accepted.
  for (genvar r = 0; r < NB_REQ; r++) begin : g_hs_check
    assert property (@(posedge clk_i) disable iff (!rst_ni)
      req_valid_i[r] && !req_ready_o[r] |=> req_valid_i[r] && $stable(req_line_i[r]))
      else $error("miss request %0d dropped or changed before it was accepted", r);
  end

endmodule
