// Hybrid prefetch FSM: software (SWP), next-line (NLP) and stream (STP)
// prefetching in one state machine.
//
//   S_IDLE      nothing to do.
//   S_PREFETCH  issues the lines of the current burst, one line per
//               accepted pf_valid_o/pf_ready_i handshake, to the prefetch
//               cache controller.
//   S_WAIT      stream wait state: after an NLP or STP burst, with STP
//               enabled, the FSM stays here for exactly wait_cycles_i
//               cycles and then starts an STP burst at the line after the
//               last one issued, so that line goes out wait_cycles_i + 1
//               cycles after the last line of the previous burst. With 0
//               wait cycles the next burst follows at once.
//
// Triggers and priority (SWP highest, STP lowest):
//   * swp_valid_i (a write of the SWP size register) starts a burst covering
//     swp_size_i bytes from swp_addr_i, whatever the FSM was doing;
//   * miss_evt_valid_i (a demand miss seen on the L2 bus) with NLP enabled
//     starts a burst of burst_bytes_i bytes from the line after the miss
//     line, unless an SWP burst is being issued, in which case it is dropped;
//   * the end of the wait state starts the STP burst.
// A new trigger drops the burst in progress (preemption), so stale lines are
// not prefetched; preempt_o pulses when that happens. Sizes are rounded up
// to whole 16-byte lines; a burst size of 0 disables NLP and STP.
// The state names, the byte-to-line rounding, the STP start address and the
// rule that STP follows only NLP/STP bursts are this design's choices.
module prefetch_fsm
  import icache_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_ni,
  // software prefetch command
  input  logic              swp_valid_i,
  input  logic [31:0]       swp_addr_i,
  input  logic [15:0]       swp_size_i,
  // demand miss observed on the L2 bus
  input  logic              miss_evt_valid_i,
  input  line_addr_t        miss_evt_line_i,
  // configuration
  input  logic              nlp_en_i,
  input  logic [15:0]       burst_bytes_i,
  input  logic              stp_en_i,
  input  logic [15:0]       wait_cycles_i,
  // line requests to the prefetch cache controller
  output logic              pf_valid_o,
  input  logic              pf_ready_i,
  output line_addr_t        pf_line_o,
  // observation
  output logic              busy_o,
  output pf_src_e           src_o,
  output logic              preempt_o,
  output logic              waiting_o
);

  typedef enum logic [1:0] {S_IDLE, S_PREFETCH, S_WAIT} state_e;

  state_e      state_q, state_d;
  pf_src_e     src_q, src_d;
  line_addr_t  line_q, line_d;
  logic [16:0] left_q, left_d;      // lines still to issue
  logic [15:0] cnt_q, cnt_d;        // wait-state counter

  logic [16:0] burst_lines, swp_lines;
  logic        nlp_trig, pf_fire;

  assign burst_lines = (17'(burst_bytes_i) + 17'(LINE_BYTES - 1)) >> OFFSET_W;
  assign swp_lines   = (swp_size_i == '0) ? '0 :
                       (17'(swp_size_i) + 17'(swp_addr_i[OFFSET_W-1:0]) + 17'(LINE_BYTES - 1)) >> OFFSET_W;

  assign nlp_trig = miss_evt_valid_i && nlp_en_i && (burst_lines != '0) &&
                    !(state_q == S_PREFETCH && src_q == PF_SWP);
  assign pf_valid_o = (state_q == S_PREFETCH);
  assign pf_line_o  = line_q;
  assign pf_fire    = pf_valid_o && pf_ready_i;

  always_comb begin
    state_d   = state_q;
    src_d     = src_q;
    line_d    = line_q;
    left_d    = left_q;
    cnt_d     = cnt_q;
    preempt_o = 1'b0;

    unique case (state_q)
      S_IDLE: ;
      S_PREFETCH: begin
        if (pf_fire) begin
          line_d = line_q + 1'b1;
          left_d = left_q - 1'b1;
          if (left_q == 17'd1) begin
            if (src_q != PF_SWP && stp_en_i && burst_lines != '0) begin
              // the stream continues at line_d after exactly wait_cycles_i
              // cycles in S_WAIT (none at all for 0)
              if (wait_cycles_i == '0) begin
                src_d  = PF_STP;
                left_d = burst_lines;
              end else begin
                state_d = S_WAIT;
                cnt_d   = wait_cycles_i - 1'b1;
              end
            end else begin
              state_d = S_IDLE;
              src_d   = PF_NONE;
            end
          end
        end
      end
      S_WAIT: begin
        if (!stp_en_i || burst_lines == '0) begin
          state_d = S_IDLE;
          src_d   = PF_NONE;
        end else if (cnt_q == '0) begin
          state_d = S_PREFETCH;
          src_d   = PF_STP;
          left_d  = burst_lines;
        end else begin
          cnt_d = cnt_q - 1'b1;
        end
      end
      default: state_d = S_IDLE;
    endcase

    // New requests preempt what is going on, SWP before NLP.
    if (swp_valid_i || nlp_trig) begin
      preempt_o = (state_q == S_PREFETCH) && !(pf_fire && left_q == 17'd1);
      if (swp_valid_i) begin
        src_d  = PF_SWP;
        line_d = swp_addr_i[31:OFFSET_W];
        left_d = swp_lines;
      end else begin
        src_d  = PF_NLP;
        line_d = miss_evt_line_i + 1'b1;
        left_d = burst_lines;
      end
      state_d = S_PREFETCH;
      if (left_d == '0) begin
        state_d = S_IDLE;
        src_d   = PF_NONE;
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      src_q   <= PF_NONE;
      line_q  <= '0;
      left_q  <= '0;
      cnt_q   <= '0;
    end else begin
      state_q <= state_d;
      src_q   <= src_d;
      line_q  <= line_d;
      left_q  <= left_d;
      cnt_q   <= cnt_d;
    end
  end

  assign busy_o    = (state_q != S_IDLE);
  assign src_o     = src_q;
  assign waiting_o = (state_q == S_WAIT);

endmodule
