// skip_fifo: one deadline class of the EDFR scheduler.
//
// A skip-FIFO pairs two FIFOs. The ring buffer (rb_writer + rb_reader over an
// external packet memory) holds the packets in arrival order and is only ever
// accessed sequentially, which suits DRAM. The timestamp FIFO (ts_fifo)
// records, at every skip tick, the ring buffer's committed write pointer
// together with T_now + deadline. Every packet written before that pointer
// arrived before the tick, so its own deadline is no later than the recorded
// one. The oldest entry is handled as follows:
//   - if its pointer (elapsed_ptr) is not newer than rd_ptr, every packet it
//     covers has already left, so the entry is stale and is popped at once,
//     whether or not its deadline has passed (this keeps the timestamp FIFO
//     short while the queue keeps up);
//   - if it is newer, the entry waits until its T_deadline has passed; then
//     rd_ptr jumps to it: all packets in between miss their deadline and are
//     dropped without being read from memory (the skip), and the entry is
//     popped.
// "Newer" means ahead of rd_ptr and not beyond wr_ptr on the ring.
//
// deadline_us is the class deadline in microseconds; every packet accepted
// here gets T_now + deadline_us as its absolute deadline in its header. A tick
// that finds the timestamp FIFO full records nothing and raises
// ts_overflow_pulse. The memory ports are those of rb_writer and rb_reader.
module skip_fifo #(
  parameter int unsigned AW          = 23,   // 2^23 x 64 B = 512 MB ring buffer
  parameter int unsigned TS_LOG2     = 14,   // timestamp FIFO depth 2^14
  parameter int unsigned PF_LOG2     = 6     // prefetch window 64 words
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  edfr_pkg::ts_t             t_now_us,
  input  logic                      skip_tick,
  input  edfr_pkg::ts_t             deadline_us,
  // packet input
  input  logic                      s_valid,
  output logic                      s_ready,
  input  edfr_pkg::axis_beat_t      s_beat,
  // head packet, commands, packet output
  output logic                      head_valid,
  output logic                      head_soon,
  output edfr_pkg::ts_t             head_deadline,
  output logic [edfr_pkg::TUSER_W-1:0] head_tuser,
  input  logic                      cmd_send,
  input  logic                      cmd_drop,
  output logic                      m_valid,
  input  logic                      m_ready,
  output edfr_pkg::axis_beat_t      m_beat,
  // packet memory
  output logic                      mem_wr_valid,
  input  logic                      mem_wr_ready,
  output logic [AW-1:0]             mem_wr_addr,
  output edfr_pkg::word_t           mem_wr_data,
  output logic                      mem_rd_valid,
  input  logic                      mem_rd_ready,
  output logic [AW-1:0]             mem_rd_addr,
  input  logic                      mem_rsp_valid,
  input  edfr_pkg::word_t           mem_rsp_data,
  // state and events
  output logic [AW:0]               wr_ptr,
  output logic [AW:0]               rd_ptr,
  output logic                      tail_drop_pulse,
  output logic                      enq_pulse,
  output logic                      sent_pulse,
  output logic                      pe_drop_pulse,
  output logic                      skip_pulse,
  output logic [AW:0]               skip_words,      // words skipped, valid with skip_pulse
  output logic                      ts_overflow_pulse,
  output logic [TS_LOG2:0]          ts_level         // timestamp FIFO entries
);
  import edfr_pkg::*;

  logic              ts_full, ts_head_valid, ts_pop;
  logic [AW:0]       ts_head_ptr;
  ts_t               ts_head_deadline;
  logic              expired, newer, skip_valid, skip_ack;
  logic [AW:0]       d_elapsed, d_written;

  rb_writer #(.AW(AW)) u_writer (
    .clk, .rst_n, .s_valid, .s_ready, .s_beat,
    .deadline_ts(t_now_us + deadline_us),
    .rd_ptr, .wr_ptr,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data,
    .drop_pulse(tail_drop_pulse), .commit_pulse(enq_pulse)
  );

  rb_reader #(.AW(AW), .PF_LOG2(PF_LOG2)) u_reader (
    .clk, .rst_n, .wr_ptr, .rd_ptr,
    .skip_valid, .skip_ptr(ts_head_ptr), .skip_ack,
    .head_valid, .head_soon, .head_deadline, .head_tuser, .cmd_send, .cmd_drop,
    .m_valid, .m_ready, .m_beat,
    .mem_rd_valid, .mem_rd_ready, .mem_rd_addr, .mem_rsp_valid, .mem_rsp_data,
    .sent_pulse, .drop_pulse(pe_drop_pulse)
  );

  ts_fifo #(.PTR_W(AW+1), .DEPTH_LOG2(TS_LOG2)) u_ts (
    .clk, .rst_n,
    .push(skip_tick), .push_ptr(wr_ptr), .push_deadline(t_now_us + deadline_us),
    .full(ts_full),
    .head_valid(ts_head_valid), .head_ptr(ts_head_ptr), .head_deadline(ts_head_deadline),
    .pop(ts_pop), .count(ts_level)
  );

  assign d_elapsed  = ts_head_ptr - rd_ptr;
  assign d_written  = wr_ptr - rd_ptr;
  assign expired    = ts_head_valid && ts_before(ts_head_deadline, t_now_us);
  assign newer      = (d_elapsed != 0) && (d_elapsed <= d_written);
  assign skip_valid = expired && newer;
  assign ts_pop     = ts_head_valid && (!newer || skip_ack);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      skip_pulse        <= 1'b0;
      skip_words        <= '0;
      ts_overflow_pulse <= 1'b0;
    end else begin
      skip_pulse        <= skip_ack;
      skip_words        <= d_elapsed;
      ts_overflow_pulse <= skip_tick && ts_full;
    end
  end

  a_skip_on_boundary_only: assert property (@(posedge clk) disable iff (!rst_n)
                                            skip_ack |-> ts_pop);
endmodule
