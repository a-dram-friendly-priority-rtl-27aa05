// edfr_scheduler: earliest-deadline-first with reneging (EDFR) packet
// scheduler for one output port, built from skip-FIFOs.
//
// Packets enter on an AXI4-Stream port (512-bit tdata, 128-bit tuser with the
// length in tuser[15:0]). The deadline_classifier reads the deadline that the
// sender put in the IPv4 ToS byte and hands the packet to the skip-FIFO of
// that deadline class (NUM_Q classes, each with a configured deadline in ms).
// Each skip-FIFO keeps its packets in arrival order in its own ring buffer in
// external memory (one memory port per class, e.g. one HBM pseudo channel
// each) and drops, without reading them, packets whose deadline has passed,
// using its timestamp FIFO. The priority_encoder sends the head packet with
// the earliest absolute deadline; with cfg_pe_drop_en it also discards head
// packets that are already late. time_base supplies T_now (microseconds) and
// the skip tick (200 ms / 2^14 by default).
//
// Memory port q (per class): write requests mem_wr_*[q]; read requests
// mem_rd_*[q]; read data returns in order on mem_rsp_*[q] with any latency.
// Addresses are 64-byte word addresses within the class's own region.
// Counters (32-bit, wrapping, cleared at reset) report per class: packets
// enqueued, tail drops (ring full), packets sent, packets discarded by the
// priority encoder, skip events, words skipped, timestamp FIFO overflows.
// Reset is synchronous, active low. Configuration inputs are expected to be
// static while traffic flows.
module edfr_scheduler #(
  parameter int unsigned NUM_Q                = 3,
  parameter int unsigned AW                   = 23,
  parameter int unsigned TS_LOG2              = 14,
  parameter int unsigned PF_LOG2              = 6,
  parameter int unsigned CLK_PER_US           = 250,
  parameter int unsigned SKIP_INTERVAL_CYCLES = 3052
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // configuration
  input  logic [7:0]                    cfg_deadline_ms [NUM_Q],
  input  logic [$clog2(NUM_Q)-1:0]      cfg_default_q,
  input  logic                          cfg_pe_drop_en,
  // packet input
  input  logic                          s_axis_tvalid,
  output logic                          s_axis_tready,
  input  logic [edfr_pkg::DATA_W-1:0]   s_axis_tdata,
  input  logic [edfr_pkg::KEEP_W-1:0]   s_axis_tkeep,
  input  logic [edfr_pkg::TUSER_W-1:0]  s_axis_tuser,
  input  logic                          s_axis_tlast,
  // packet output
  output logic                          m_axis_tvalid,
  input  logic                          m_axis_tready,
  output logic [edfr_pkg::DATA_W-1:0]   m_axis_tdata,
  output logic [edfr_pkg::KEEP_W-1:0]   m_axis_tkeep,
  output logic [edfr_pkg::TUSER_W-1:0]  m_axis_tuser,
  output logic                          m_axis_tlast,
  // packet memory, one port per class
  output logic [NUM_Q-1:0]              mem_wr_valid,
  input  logic [NUM_Q-1:0]              mem_wr_ready,
  output logic [AW-1:0]                 mem_wr_addr [NUM_Q],
  output edfr_pkg::word_t               mem_wr_data [NUM_Q],
  output logic [NUM_Q-1:0]              mem_rd_valid,
  input  logic [NUM_Q-1:0]              mem_rd_ready,
  output logic [AW-1:0]                 mem_rd_addr [NUM_Q],
  input  logic [NUM_Q-1:0]              mem_rsp_valid,
  input  edfr_pkg::word_t               mem_rsp_data [NUM_Q],
  // status
  output edfr_pkg::ts_t                 t_now_us,
  output logic [31:0]                   cnt_enq        [NUM_Q],
  output logic [31:0]                   cnt_tail_drop  [NUM_Q],
  output logic [31:0]                   cnt_sent       [NUM_Q],
  output logic [31:0]                   cnt_pe_drop    [NUM_Q],
  output logic [31:0]                   cnt_skip       [NUM_Q],
  output logic [31:0]                   cnt_skip_words [NUM_Q],
  output logic [31:0]                   cnt_ts_ovf     [NUM_Q],
  output logic [AW:0]                   q_fill_words   [NUM_Q],  // ring buffer words in use
  output logic [TS_LOG2:0]              ts_fill        [NUM_Q]   // timestamp FIFO entries
);
  import edfr_pkg::*;

  logic                 skip_tick;
  axis_beat_t           in_beat, cls_beat, out_beat;
  logic [NUM_Q-1:0]     cls_valid, cls_ready;

  logic [NUM_Q-1:0]     head_valid, head_soon, cmd_send, cmd_drop, q_valid, q_ready;
  ts_t                  head_deadline [NUM_Q];
  axis_beat_t           q_beat [NUM_Q];

  time_base #(.CLK_PER_US(CLK_PER_US), .SKIP_INTERVAL_CYCLES(SKIP_INTERVAL_CYCLES)) u_time (
    .clk, .rst_n, .t_now_us, .skip_tick
  );

  assign in_beat = '{tdata: s_axis_tdata, tkeep: s_axis_tkeep, tuser: s_axis_tuser, tlast: s_axis_tlast};

  deadline_classifier #(.NUM_Q(NUM_Q)) u_cls (
    .clk, .rst_n, .cfg_deadline_ms, .cfg_default_q,
    .s_valid(s_axis_tvalid), .s_ready(s_axis_tready), .s_beat(in_beat),
    .m_valid(cls_valid), .m_ready(cls_ready), .m_beat(cls_beat),
    .sel(), .first_beat()
  );

  for (genvar q = 0; q < NUM_Q; q++) begin : g_q
    logic [AW:0]               wr_ptr, rd_ptr, skip_words;
    logic                      tail_drop, enq, sent, pe_drop, skip, ts_ovf;
    ts_t                       deadline_us;

    assign q_fill_words[q] = wr_ptr - rd_ptr;
    assign deadline_us = ts_t'(cfg_deadline_ms[q]) * ts_t'(1000);

    skip_fifo #(.AW(AW), .TS_LOG2(TS_LOG2), .PF_LOG2(PF_LOG2)) u_sf (
      .clk, .rst_n, .t_now_us, .skip_tick, .deadline_us,
      .s_valid(cls_valid[q]), .s_ready(cls_ready[q]), .s_beat(cls_beat),
      .head_valid(head_valid[q]), .head_soon(head_soon[q]), .head_deadline(head_deadline[q]), .head_tuser(),
      .cmd_send(cmd_send[q]), .cmd_drop(cmd_drop[q]),
      .m_valid(q_valid[q]), .m_ready(q_ready[q]), .m_beat(q_beat[q]),
      .mem_wr_valid(mem_wr_valid[q]), .mem_wr_ready(mem_wr_ready[q]),
      .mem_wr_addr(mem_wr_addr[q]), .mem_wr_data(mem_wr_data[q]),
      .mem_rd_valid(mem_rd_valid[q]), .mem_rd_ready(mem_rd_ready[q]),
      .mem_rd_addr(mem_rd_addr[q]),
      .mem_rsp_valid(mem_rsp_valid[q]), .mem_rsp_data(mem_rsp_data[q]),
      .wr_ptr, .rd_ptr,
      .tail_drop_pulse(tail_drop), .enq_pulse(enq), .sent_pulse(sent),
      .pe_drop_pulse(pe_drop), .skip_pulse(skip), .skip_words,
      .ts_overflow_pulse(ts_ovf), .ts_level(ts_fill[q])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        cnt_enq[q]        <= '0;
        cnt_tail_drop[q]  <= '0;
        cnt_sent[q]       <= '0;
        cnt_pe_drop[q]    <= '0;
        cnt_skip[q]       <= '0;
        cnt_skip_words[q] <= '0;
        cnt_ts_ovf[q]     <= '0;
      end else begin
        cnt_enq[q]        <= cnt_enq[q] + 32'(enq);
        cnt_tail_drop[q]  <= cnt_tail_drop[q] + 32'(tail_drop);
        cnt_sent[q]       <= cnt_sent[q] + 32'(sent);
        cnt_pe_drop[q]    <= cnt_pe_drop[q] + 32'(pe_drop);
        cnt_skip[q]       <= cnt_skip[q] + 32'(skip);
        cnt_skip_words[q] <= cnt_skip_words[q] + (skip ? 32'(skip_words) : 32'd0);
        cnt_ts_ovf[q]     <= cnt_ts_ovf[q] + 32'(ts_ovf);
      end
    end
  end

  priority_encoder #(.NUM_Q(NUM_Q)) u_pe (
    .clk, .rst_n, .t_now_us, .cfg_drop_en(cfg_pe_drop_en),
    .head_valid, .head_soon, .head_deadline, .cmd_send, .cmd_drop,
    .q_valid, .q_ready, .q_beat,
    .m_valid(m_axis_tvalid), .m_ready(m_axis_tready), .m_beat(out_beat),
    .busy(), .cur_q()
  );

  assign m_axis_tdata = out_beat.tdata;
  assign m_axis_tkeep = out_beat.tkeep;
  assign m_axis_tuser = out_beat.tuser;
  assign m_axis_tlast = out_beat.tlast;
endmodule
