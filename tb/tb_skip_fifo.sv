// tb_skip_fifo: one skip-FIFO with a behavioural memory, the time and the
// skip tick driven by the testbench. Checks, in order:
//   1. skip: packets enqueued before a tick are dropped without being read
//      once that tick's deadline passes; rd_ptr lands on the first later
//      packet, skip_words equals the words of the skipped packets, and a
//      second expiry empties the queue;
//   2. a stale timestamp entry (pointer not newer than rd_ptr) is popped
//      at once, before its deadline, without a skip;
//   3. normal service: head deadline = enqueue time + class deadline, the
//      data comes out in order and intact;
//   4. the timestamp FIFO overflows (ts_overflow_pulse) when ticks outrun
//      expiries while a packet waits; 5. the ring tail-drops when full.
module tb_skip_fifo;
  import edfr_pkg::*;
  localparam int AW = 8, TSL = 3, PF = 4, DL = 100;

  logic clk = 0, rst_n = 0;
  ts_t t_now = 0;
  logic tick = 0;
  logic s_valid = 0, s_ready;
  axis_beat_t s_beat = '0, m_beat;
  logic head_valid; ts_t head_dl; logic [TUSER_W-1:0] head_tuser;
  logic cmd_send = 0, cmd_drop = 0, m_valid, m_ready = 1;
  logic mem_wr_valid, mem_wr_ready, mem_rd_valid, mem_rd_ready, mem_rsp_valid;
  logic [AW-1:0] mem_wr_addr, mem_rd_addr;
  word_t mem_wr_data, mem_rsp_data;
  logic [AW:0] wr_ptr, rd_ptr, skip_words;
  logic tail_drop, enq, sent, pe_drop, skip, ts_ovf;
  logic [TSL:0] ts_level;
  int checks = 0, failures = 0;
  int n_skip = 0, n_tail = 0, n_ovf = 0, n_enq = 0, last_skip_words = 0;

  always #5 clk = ~clk;

  skip_fifo #(.AW(AW), .TS_LOG2(TSL), .PF_LOG2(PF)) dut (.clk, .rst_n, .t_now_us(t_now), .skip_tick(tick),
    .deadline_us(ts_t'(DL)), .s_valid, .s_ready, .s_beat, .head_valid, .head_soon(), .head_deadline(head_dl), .head_tuser,
    .cmd_send, .cmd_drop, .m_valid, .m_ready, .m_beat,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data,
    .mem_rd_valid, .mem_rd_ready, .mem_rd_addr, .mem_rsp_valid, .mem_rsp_data,
    .wr_ptr, .rd_ptr, .tail_drop_pulse(tail_drop), .enq_pulse(enq), .sent_pulse(sent),
    .pe_drop_pulse(pe_drop), .skip_pulse(skip), .skip_words, .ts_overflow_pulse(ts_ovf), .ts_level);

  tb_mem_model #(.AW(AW), .LATENCY(12), .STALL_PCT(10)) u_mem (.clk, .rst_n, .wr_valid(mem_wr_valid), .wr_ready(mem_wr_ready),
    .wr_addr(mem_wr_addr), .wr_data(mem_wr_data), .rd_valid(mem_rd_valid), .rd_ready(mem_rd_ready),
    .rd_addr(mem_rd_addr), .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  always @(posedge clk) if (rst_n) begin
    if (skip) begin n_skip++; last_skip_words = int'(skip_words); end
    if (tail_drop) n_tail++;
    if (ts_ovf) n_ovf++;
    if (enq) n_enq++;
  end

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic word_t pat(int pkt, int b);
    word_t w;
    for (int i = 0; i < DATA_W / 32; i++) w[i*32 +: 32] = 32'(pkt * 7919 + b * 101 + i);
    return w;
  endfunction

  function automatic int words_of(int len);
    return (len + 63) / 64 + 2;
  endfunction

  task automatic send_pkt(int id, int len);
    int nb;
    nb = (len + 63) / 64;
    for (int b = 0; b < nb; b++) begin
      s_valid = 1;
      s_beat.tdata = pat(id, b);
      s_beat.tuser = {112'(id), 16'(len)};
      s_beat.tlast = (b == nb - 1);
      s_beat.tkeep = (b == nb - 1) ? keep_of_count(7'((len - 1) % 64)) : '1;
      #1;
      while (!s_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    s_valid = 0;
    repeat (4) @(posedge clk);
    #1;
  endtask

  task automatic do_tick();
    tick = 1; @(posedge clk); #1; tick = 0;
  endtask

  task automatic set_time(int t);
    t_now = ts_t'(t);
    repeat (40) @(posedge clk);
    #1;
  endtask

  task automatic recv_pkt(int id, int len);
    int nb, b;
    nb = (len + 63) / 64;
    while (!head_valid) begin @(posedge clk); #1; end
    check(head_tuser == {112'(id), 16'(len)}, $sformatf("head is pkt %0d (got %0d)", id, head_tuser[127:16]));
    cmd_send = 1; @(posedge clk); #1; cmd_send = 0;
    b = 0;
    while (b < nb) begin
      if (m_valid && m_ready) begin
        check(m_beat.tdata == pat(id, b) && m_beat.tlast == (b == nb - 1), $sformatf("pkt %0d beat %0d", id, b));
        b++;
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    int lens[8], exp_words, t0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;

    // 1. skip
    for (int i = 0; i < 8; i++) lens[i] = 1 + $urandom % 300;
    set_time(0);
    exp_words = 0;
    for (int i = 0; i < 5; i++) begin send_pkt(i, lens[i]); exp_words += words_of(lens[i]); end
    set_time(10); do_tick();                         // entry: after pkt 4, deadline 110
    for (int i = 5; i < 8; i++) send_pkt(i, lens[i]);
    set_time(30); do_tick();                         // entry: after pkt 7, deadline 130
    check(ts_level == 2, "two timestamp entries");
    set_time(110);
    check(n_skip == 0, "no skip at the deadline itself");
    check(head_valid && head_tuser[127:16] == 0, "pkt 0 still at head before expiry");
    set_time(111);
    check(n_skip == 1, "skip after first deadline");
    check(last_skip_words == exp_words, $sformatf("skipped %0d words, expected %0d", last_skip_words, exp_words));
    check(head_valid && head_tuser[127:16] == 5, "pkt 5 at head after skip");
    check(ts_level == 1, "entry popped");
    set_time(131);
    check(n_skip == 2, "second skip");
    check(rd_ptr == wr_ptr && !head_valid, "queue empty after second skip");

    // 2. stale entry
    set_time(140); do_tick();                        // pointer == rd_ptr
    repeat (3) @(posedge clk);
    #1;
    check(n_skip == 2 && ts_level == 0, "stale entry popped at once, before its deadline, without skip");
    set_time(241);
    check(n_skip == 2, "no skip for the stale entry");

    // 3. normal service
    set_time(300);
    t0 = 300;
    for (int i = 10; i < 16; i++) send_pkt(i, 1 + $urandom % 400);
    while (!head_valid) begin @(posedge clk); #1; end
    check(head_dl == ts_t'(t0 + DL), "head deadline = enqueue time + class deadline");
    for (int i = 10; i < 16; i++) begin
      int len;
      while (!head_valid) begin @(posedge clk); #1; end
      len = int'(head_tuser[15:0]);
      m_ready = 1;
      recv_pkt(i, len);
    end

    // 4. timestamp FIFO overflow: one unserved packet so that every entry
    //    is newer than rd_ptr; 2^3 + 1 entries fit, then more ticks
    set_time(1000);
    send_pkt(19, 448);
    for (int i = 0; i < 12; i++) do_tick();
    repeat (3) @(posedge clk);
    check(n_ovf == 12 - ((1 << TSL) + 1), $sformatf("overflow count %0d", n_ovf));

    // 5. tail drop: 256-word ring, 9-word packets, no service
    for (int i = 20; i < 50; i++) send_pkt(i, 448);
    check(n_tail == 31 - 256 / 9, $sformatf("tail drops %0d", n_tail));
    check(n_enq == 8 + 6 + 256 / 9, $sformatf("enqueue count %0d", n_enq));

    $display("skips=%0d ovf=%0d tail=%0d", n_skip, n_ovf, n_tail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
