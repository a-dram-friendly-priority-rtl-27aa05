// rb_reader: dequeue side of a skip-FIFO's ring buffer.
//
// A fetch engine reads the packet memory sequentially from fetch_ptr up to
// the committed wr_ptr, keeping up to 2^PF_LOG2 words outstanding or
// buffered, so the memory sees long sequential read bursts whatever its
// latency. Returned words fill a prefetch FIFO, from which a parser takes the
// header and control word of the packet at rd_ptr. It then offers that packet
// as the head (head_valid, head_deadline, head_tuser) until the priority
// encoder either sends it (cmd_send: its data words leave on m_* as AXI4-
// Stream beats, tkeep and tlast rebuilt from the control bytes) or drops it
// (cmd_drop: its data words are read and discarded). rd_ptr advances past a
// packet when its last data word has been taken. head_soon is high while the
// next packet's header is already in the prefetch FIFO but still being
// parsed (at most two cycles), so that the encoder can wait for it instead of
// granting a later-deadline packet of another class in that gap.
//
// Skip: skip_valid/skip_ptr ask to move rd_ptr forward to skip_ptr, a packet
// boundary recorded by the timestamp FIFO, discarding every packet before it
// without reading them. The request is taken (skip_ack, combinational) when
// the reader is between packets or holding an unclaimed head and no command
// arrives in the same cycle. Taking it restarts fetching at skip_ptr, empties
// the prefetch FIFO and discards the responses still in flight.
//
// Memory read port: a request is accepted when mem_rd_valid and mem_rd_ready
// are both high; responses return in order on mem_rsp_valid, any number of
// cycles later, and cannot be refused (the reader only issues reads it has
// room for).
module rb_reader #(
  parameter int unsigned AW      = 23,
  parameter int unsigned PF_LOG2 = 6
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [AW:0]               wr_ptr,
  output logic [AW:0]               rd_ptr,
  // skip request from the timestamp FIFO logic
  input  logic                      skip_valid,
  input  logic [AW:0]               skip_ptr,
  output logic                      skip_ack,
  // head packet and commands from the priority encoder
  output logic                      head_valid,
  output logic                      head_soon,
  output edfr_pkg::ts_t             head_deadline,
  output logic [edfr_pkg::TUSER_W-1:0] head_tuser,
  input  logic                      cmd_send,
  input  logic                      cmd_drop,
  // packet output
  output logic                      m_valid,
  input  logic                      m_ready,
  output edfr_pkg::axis_beat_t      m_beat,
  // packet memory read port
  output logic                      mem_rd_valid,
  input  logic                      mem_rd_ready,
  output logic [AW-1:0]             mem_rd_addr,
  input  logic                      mem_rsp_valid,
  input  edfr_pkg::word_t           mem_rsp_data,
  // events
  output logic                      sent_pulse,
  output logic                      drop_pulse
);
  import edfr_pkg::*;

  typedef enum logic [2:0] {R_HDR, R_CTRL, R_HEAD, R_SEND, R_DROP} rstate_e;

  rstate_e             state;
  logic [AW:0]         fetch_ptr;
  logic [PF_LOG2:0]    inflight, discard;
  pkt_hdr_t            hdr_q;
  word_t               ctrl_q;
  logic [BEAT_W-1:0]   beat;

  logic                pf_push, pf_pop, pf_empty;
  word_t               pf_dout;
  logic [PF_LOG2:0]    pf_count;
  logic                issue, last_word;
  logic [CTRL_W-1:0]   cbyte;

  word_fifo #(.W(DATA_W), .DEPTH_LOG2(PF_LOG2)) u_prefetch (
    .clk, .rst_n, .flush(skip_ack), .push(pf_push), .din(mem_rsp_data),
    .pop(pf_pop), .dout(pf_dout), .empty(pf_empty), .count(pf_count)
  );

  assign skip_ack = skip_valid && !cmd_send && !cmd_drop &&
                    (state == R_HDR || state == R_CTRL || state == R_HEAD);

  // (PF_LOG2+2)-bit sum so that a full budget does not wrap
  assign issue        = (fetch_ptr != wr_ptr) && !skip_ack &&
                        ((PF_LOG2+2)'(inflight) + (PF_LOG2+2)'(pf_count) < (PF_LOG2+2)'(1 << PF_LOG2));
  assign mem_rd_valid = issue;
  assign mem_rd_addr  = AW'(fetch_ptr);
  assign pf_push      = mem_rsp_valid && (discard == 0) && !skip_ack;

  assign head_valid    = (state == R_HEAD);
  assign head_soon     = (state == R_HDR || state == R_CTRL) && !pf_empty;
  assign head_deadline = hdr_q.deadline;
  assign head_tuser    = hdr_q.tuser;

  assign cbyte     = ctrl_q[beat*CTRL_W +: CTRL_W];
  assign last_word = (beat == hdr_q.nbeats - 1'b1);
  assign m_valid   = (state == R_SEND) && !pf_empty;
  assign m_beat    = '{tdata: pf_dout, tkeep: keep_of_count(cbyte[6:0]),
                       tuser: hdr_q.tuser, tlast: cbyte[7]};

  always_comb begin
    pf_pop = 1'b0;
    unique case (state)
      R_HDR, R_CTRL: pf_pop = !pf_empty && !skip_ack;
      R_SEND:        pf_pop = !pf_empty && m_ready;
      R_DROP:        pf_pop = !pf_empty;
      default:       pf_pop = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= R_HDR;
      rd_ptr     <= '0;
      fetch_ptr  <= '0;
      inflight   <= '0;
      discard    <= '0;
      hdr_q      <= '0;
      ctrl_q     <= '0;
      beat       <= '0;
      sent_pulse <= 1'b0;
      drop_pulse <= 1'b0;
    end else begin
      sent_pulse <= 1'b0;
      drop_pulse <= 1'b0;
      inflight   <= inflight + (PF_LOG2+1)'(issue && mem_rd_ready) - (PF_LOG2+1)'(mem_rsp_valid);
      if (issue && mem_rd_ready) fetch_ptr <= fetch_ptr + 1'b1;

      if (skip_ack) begin
        rd_ptr    <= skip_ptr;
        fetch_ptr <= skip_ptr;
        discard   <= inflight - (PF_LOG2+1)'(mem_rsp_valid);
        state     <= R_HDR;
      end else begin
        if (mem_rsp_valid && discard != 0) discard <= discard - 1'b1;
        unique case (state)
          R_HDR:  if (pf_pop) begin
            hdr_q <= pkt_hdr_t'(pf_dout[HDR_W-1:0]);
            state <= R_CTRL;
          end
          R_CTRL: if (pf_pop) begin
            ctrl_q <= pf_dout;
            state  <= R_HEAD;
          end
          R_HEAD: begin
            beat <= '0;
            if (cmd_send)      state <= R_SEND;
            else if (cmd_drop) state <= R_DROP;
          end
          R_SEND, R_DROP: if (pf_pop) begin
            beat <= beat + 1'b1;
            if (last_word) begin
              rd_ptr     <= rd_ptr + (AW+1)'(hdr_q.nbeats) + (AW+1)'(2);
              sent_pulse <= (state == R_SEND);
              drop_pulse <= (state == R_DROP);
              state      <= R_HDR;
            end
          end
          default: state <= R_HDR;
        endcase
      end
    end
  end

  a_cmd_only_on_head: assert property (@(posedge clk) disable iff (!rst_n)
                                       (cmd_send || cmd_drop) |-> state == R_HEAD);
  a_one_cmd:          assert property (@(posedge clk) disable iff (!rst_n)
                                       !(cmd_send && cmd_drop));
  a_rsp_expected:     assert property (@(posedge clk) disable iff (!rst_n)
                                       mem_rsp_valid |-> inflight != 0);
endmodule
