// Behavioural model of the L2 memory seen through the AXI4 read channels.
//
// Not synthesizable logic: a testbench stand-in for the cluster-external L2
// memory that holds all code. Every read burst is answered LATENCY cycles
// after its AR handshake, beats in order, one beat per cycle, bursts in the
// order they were accepted. AR is always accepted. The content is a fixed
// function of the address, so testbenches can compute expected instructions
// on their own: the 32-bit word at byte address a is l2_word(a).
module l2_mem_model #(
  parameter int unsigned DATA_W  = 64,
  parameter int unsigned ID_W    = 2,
  parameter int unsigned LATENCY = 20
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              ar_valid_i,
  output logic              ar_ready_o,
  input  logic [31:0]       ar_addr_i,
  input  logic [ID_W-1:0]   ar_id_i,
  input  logic [7:0]        ar_len_i,
  output logic              r_valid_o,
  input  logic              r_ready_i,
  output logic [DATA_W-1:0] r_data_o,
  output logic [ID_W-1:0]   r_id_o,
  output logic              r_last_o,
  output int unsigned       nb_bursts_o
);

  function automatic logic [31:0] l2_word(logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_A5A5;
  endfunction

  typedef struct {
    logic [31:0]    addr;
    logic [ID_W-1:0] id;
    int unsigned    len;
    longint unsigned due;
  } burst_t;

  burst_t          q[$];
  longint unsigned now;
  int unsigned     beat;

  assign ar_ready_o = 1'b1;

  always_comb begin
    r_valid_o = 1'b0;
    r_data_o  = '0;
    r_id_o    = '0;
    r_last_o  = 1'b0;
    if (q.size() > 0 && q[0].due <= now) begin
      r_valid_o = 1'b1;
      r_id_o    = q[0].id;
      r_last_o  = (beat == q[0].len);
      for (int w = 0; w < DATA_W / 32; w++) begin
        r_data_o[w*32 +: 32] = l2_word(q[0].addr + 32'(beat * (DATA_W / 8) + w * 4));
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      q.delete();
      now         <= 0;
      beat        <= 0;
      nb_bursts_o <= 0;
    end else begin
      now <= now + 1;
      if (r_valid_o && r_ready_i) begin
        if (r_last_o) begin
          void'(q.pop_front());
          beat <= 0;
        end else begin
          beat <= beat + 1;
        end
      end
      if (ar_valid_i) begin
        q.push_back('{addr: ar_addr_i, id: ar_id_i, len: int'(ar_len_i), due: now + LATENCY});
        nb_bursts_o <= nb_bursts_o + 1;
      end
    end
  end

endmodule
