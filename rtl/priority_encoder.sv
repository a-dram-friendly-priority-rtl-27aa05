// priority_encoder: the EDF arbiter in front of the skip-FIFOs.
//
// Each skip-FIFO offers its head packet with that packet's absolute deadline.
// When idle, the encoder looks at all offered heads:
//   - with cfg_drop_en set, a head whose deadline has already passed is
//     discarded (cmd_drop to that queue, lowest index first, one per cycle):
//     this catches packets that the timestamp granularity of the skip logic
//     let through, at the cost of reading them from memory;
//   - otherwise the head with the earliest deadline (lowest index on a tie)
//     is granted (cmd_send) and its beats are passed to m_* until tlast.
// A grant is held back while any queue raises head_soon (its next head is
// already buffered and appears within two cycles), so the comparison sees
// every head that is about to be available; a head still in memory is not
// waited for, which keeps the output busy.
// Deadlines are compared modulo 2^32 (edfr_pkg::ts_before). A decision takes
// one cycle; the packet's first beat can leave in the next cycle.
module priority_encoder #(
  parameter int unsigned NUM_Q = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  edfr_pkg::ts_t                t_now_us,
  input  logic                         cfg_drop_en,
  input  logic [NUM_Q-1:0]             head_valid,
  input  logic [NUM_Q-1:0]             head_soon,
  input  edfr_pkg::ts_t                head_deadline [NUM_Q],
  output logic [NUM_Q-1:0]             cmd_send,
  output logic [NUM_Q-1:0]             cmd_drop,
  input  logic [NUM_Q-1:0]             q_valid,
  output logic [NUM_Q-1:0]             q_ready,
  input  edfr_pkg::axis_beat_t         q_beat [NUM_Q],
  output logic                         m_valid,
  input  logic                         m_ready,
  output edfr_pkg::axis_beat_t         m_beat,
  output logic                         busy,
  output logic [$clog2(NUM_Q)-1:0]     cur_q
);
  import edfr_pkg::*;
  localparam int QW = $clog2(NUM_Q);

  logic [QW-1:0] best, late_q;
  logic          any_head, any_late;

  always_comb begin
    best     = '0;
    any_head = 1'b0;
    late_q   = '0;
    any_late = 1'b0;
    for (int q = NUM_Q - 1; q >= 0; q--) begin
      if (head_valid[q] && ts_before(head_deadline[q], t_now_us)) begin
        any_late = 1'b1;
        late_q   = QW'(q);
      end
    end
    for (int q = 0; q < NUM_Q; q++) begin
      if (head_valid[q] && (!any_head || ts_before(head_deadline[q], head_deadline[best]))) begin
        any_head = 1'b1;
        best     = QW'(q);
      end
    end
  end

  always_comb begin
    cmd_send = '0;
    cmd_drop = '0;
    if (!busy) begin
      if (cfg_drop_en && any_late) cmd_drop[late_q] = 1'b1;
      else if (any_head && head_soon == '0) cmd_send[best] = 1'b1;
    end
  end

  assign m_valid = busy && q_valid[cur_q];
  assign m_beat  = q_beat[cur_q];
  always_comb begin
    q_ready        = '0;
    q_ready[cur_q] = busy && m_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cur_q <= '0;
    end else if (!busy) begin
      if (cmd_send != 0) begin
        busy  <= 1'b1;
        cur_q <= best;
      end
    end else if (m_valid && m_ready && m_beat.tlast) begin
      busy <= 1'b0;
    end
  end

  a_onehot_cmd: assert property (@(posedge clk) disable iff (!rst_n)
                                 $onehot0(cmd_send | cmd_drop));
endmodule
