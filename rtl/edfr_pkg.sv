// edfr_pkg: types and constants shared by the skip-FIFO EDFR scheduler.
//
// The scheduler moves packets as AXI4-Stream beats of 512 data bits with a
// 128-bit tuser side band (the NetFPGA convention, tuser[15:0] = packet length
// in bytes). In the external packet memory each packet is stored as
//   word 0      header  : tuser, deadline timestamp, number of data beats
//   word 1      control : one control byte per data beat
//   word 2..N+1 data    : the tdata of each beat
// so a one-beat packet costs three memory words. The control byte of a beat
// is {tlast, valid byte count - 1}; tkeep is rebuilt from the count, which
// assumes contiguous tkeep, as Ethernet streams have.
//
// Time is a 32-bit microsecond count. Deadlines are compared with wrap-around
// (serial-number) arithmetic, so the counter may wrap freely.
package edfr_pkg;

  localparam int DATA_W    = 512;           // memory and stream data width
  localparam int KEEP_W    = DATA_W / 8;    // bytes per beat
  localparam int TUSER_W   = 128;           // AXI-stream tuser width
  localparam int TS_W      = 32;            // timestamp width, microseconds
  localparam int CTRL_W    = 8;             // control byte per beat
  localparam int MAX_BEATS = DATA_W / CTRL_W; // beats whose control fits one word (64 = 4096 B)
  localparam int BEAT_W    = $clog2(MAX_BEATS + 1);
  localparam int LEN_W     = 16;            // tuser[15:0], packet length in bytes

  typedef logic [TS_W-1:0]   ts_t;
  typedef logic [DATA_W-1:0] word_t;

  // One AXI4-Stream beat (valid/ready travel separately).
  typedef struct packed {
    logic [DATA_W-1:0]  tdata;
    logic [KEEP_W-1:0]  tkeep;
    logic [TUSER_W-1:0] tuser;
    logic               tlast;
  } axis_beat_t;

  // Header word of a stored packet (occupies the low bits of a memory word).
  typedef struct packed {
    logic [BEAT_W-1:0]  nbeats;    // number of data words that follow the control word
    ts_t                deadline;  // absolute deadline, T_now + class deadline at enqueue
    logic [TUSER_W-1:0] tuser;
  } pkt_hdr_t;

  localparam int HDR_W = $bits(pkt_hdr_t);

  // a is strictly earlier than b, modulo 2^TS_W.
  function automatic logic ts_before(ts_t a, ts_t b);
    ts_t d;
    d = a - b;
    return d[TS_W-1];
  endfunction

  // Number of 64-byte beats for a packet of len bytes.
  function automatic logic [LEN_W-1:0] beats_of_len(logic [LEN_W-1:0] len);
    return (len + LEN_W'(KEEP_W - 1)) / LEN_W'(KEEP_W);
  endfunction

  // tkeep with the low n bytes set (n = 1..KEEP_W).
  function automatic logic [KEEP_W-1:0] keep_of_count(logic [6:0] n_minus_1);
    logic [KEEP_W-1:0] k;
    for (int i = 0; i < KEEP_W; i++) k[i] = (i <= int'(n_minus_1));
    return k;
  endfunction

  // Number of set bits in tkeep, minus one (0 when tkeep is empty).
  function automatic logic [6:0] count_of_keep(logic [KEEP_W-1:0] k);
    logic [6:0] n;
    n = '0;
    for (int i = 0; i < KEEP_W; i++) n += 7'(k[i]);
    return (n == 0) ? 7'd0 : n - 7'd1;
  endfunction

endpackage
