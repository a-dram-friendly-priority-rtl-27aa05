// deadline_classifier: steers each incoming packet to the skip-FIFO of its
// deadline class.
//
// End systems state the latency they want in the IPv4 ToS byte, read as a
// deadline in milliseconds (1 ms steps, so 8 bits reach 255 ms). On the first
// beat of a packet the classifier checks the EtherType (bytes 12-13, 0x0800)
// and takes the ToS byte (byte 15); byte 0 of the frame is tdata[7:0]. The
// packet goes to the first queue whose configured deadline cfg_deadline_ms
// equals the ToS value; a non-IPv4 packet, or a ToS value no queue serves,
// goes to cfg_default_q. The choice is held until the beat with tlast.
// The stream passes straight through: m_valid[q] = s_valid for the chosen
// queue and s_ready is that queue's ready, with no added latency.
module deadline_classifier #(
  parameter int unsigned NUM_Q = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [7:0]                   cfg_deadline_ms [NUM_Q],
  input  logic [$clog2(NUM_Q)-1:0]     cfg_default_q,
  input  logic                         s_valid,
  output logic                         s_ready,
  input  edfr_pkg::axis_beat_t         s_beat,
  output logic [NUM_Q-1:0]             m_valid,
  input  logic [NUM_Q-1:0]             m_ready,
  output edfr_pkg::axis_beat_t         m_beat,
  output logic [$clog2(NUM_Q)-1:0]     sel,          // queue of the current packet
  output logic                         first_beat    // s_valid is on a packet's first beat
);
  localparam int QW = $clog2(NUM_Q);

  logic          in_pkt;       // between first and last beat
  logic [QW-1:0] sel_q, sel_new;
  logic [15:0]   ethertype;
  logic [7:0]    tos;

  assign ethertype = {s_beat.tdata[12*8 +: 8], s_beat.tdata[13*8 +: 8]};
  assign tos       = s_beat.tdata[15*8 +: 8];

  always_comb begin
    sel_new = cfg_default_q;
    if (ethertype == 16'h0800) begin
      for (int q = NUM_Q - 1; q >= 0; q--)
        if (cfg_deadline_ms[q] == tos) sel_new = QW'(q);
    end
  end

  assign first_beat = !in_pkt;
  assign sel        = in_pkt ? sel_q : sel_new;
  assign m_beat     = s_beat;
  assign s_ready    = m_ready[sel];

  always_comb begin
    m_valid      = '0;
    m_valid[sel] = s_valid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pkt <= 1'b0;
      sel_q  <= '0;
    end else if (s_valid && s_ready) begin
      if (!in_pkt) sel_q <= sel_new;
      in_pkt <= !s_beat.tlast;
    end
  end
endmodule
