// tb_workload_deadlines: two deadline classes sharing an overloaded 1 Gb/s
// link, in the manner of a bottleneck router port carrying a 30 ms flow
// group and a 100 ms flow group. The time base runs ten times faster per
// clock than at 250 MHz (25 cycles per us, skip tick every 305 cycles =
// 200 ms / 2^14) so that 360 ms of traffic fits in 9 M cycles; all other
// sizes are the defaults. The output accepts 1 Gb/s (40 bits per cycle);
// 1514-byte packets arrive alternately for the two classes at 1.5 Gb/s for
// 250 ms, then the input stops and the queues drain.
//
// Checked: every delivered packet waited no longer than its class deadline
// plus two skip intervals plus one packet time on the link (the encoder
// drop is off, so this bound comes from the skip rule alone); both classes
// are served; the link stays busy (>= 95 %) while overloaded; both classes
// skip; data arrive intact and in order per class. Delay percentiles and
// drop rates per class are printed.
module tb_workload_deadlines;
  import edfr_pkg::*;
  localparam int NQ = 3, CPU = 25;
  localparam int DL_A = 30, DL_B = 100;           // ms
  localparam int OVERLOAD_US = 250_000, DRAIN_US = 110_000;

  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_dl [NQ];
  logic s_valid = 0, s_ready, s_last = 0;
  logic [DATA_W-1:0] s_data = '0;
  logic [KEEP_W-1:0] s_keep = '0;
  logic [TUSER_W-1:0] s_user = '0;
  logic m_valid, m_ready, m_last;
  logic [DATA_W-1:0] m_data;
  logic [KEEP_W-1:0] m_keep;
  logic [TUSER_W-1:0] m_user;
  logic [NQ-1:0] mwv, mwr, mrv, mrr, mrsp;
  logic [22:0] mwa [NQ], mra [NQ];
  word_t mwd [NQ], mrd [NQ];
  ts_t t_now;
  logic [31:0] c_enq [NQ], c_tail [NQ], c_sent [NQ], c_pdrop [NQ], c_skip [NQ], c_skipw [NQ], c_ovf [NQ];
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  edfr_scheduler #(.CLK_PER_US(CPU), .SKIP_INTERVAL_CYCLES(305)) dut (
    .clk, .rst_n, .cfg_deadline_ms(cfg_dl), .cfg_default_q(2'd2), .cfg_pe_drop_en(1'b0),
    .s_axis_tvalid(s_valid), .s_axis_tready(s_ready), .s_axis_tdata(s_data), .s_axis_tkeep(s_keep),
    .s_axis_tuser(s_user), .s_axis_tlast(s_last),
    .m_axis_tvalid(m_valid), .m_axis_tready(m_ready), .m_axis_tdata(m_data), .m_axis_tkeep(m_keep),
    .m_axis_tuser(m_user), .m_axis_tlast(m_last),
    .mem_wr_valid(mwv), .mem_wr_ready(mwr), .mem_wr_addr(mwa), .mem_wr_data(mwd),
    .mem_rd_valid(mrv), .mem_rd_ready(mrr), .mem_rd_addr(mra), .mem_rsp_valid(mrsp), .mem_rsp_data(mrd),
    .t_now_us(t_now), .cnt_enq(c_enq), .cnt_tail_drop(c_tail), .cnt_sent(c_sent), .cnt_pe_drop(c_pdrop),
    .cnt_skip(c_skip), .cnt_skip_words(c_skipw), .cnt_ts_ovf(c_ovf), .q_fill_words(), .ts_fill());

  for (genvar q = 0; q < NQ; q++) begin : g_mem
    tb_mem_model #(.AW(23), .LATENCY(60), .STALL_PCT(5)) u_mem (.clk, .rst_n,
      .wr_valid(mwv[q]), .wr_ready(mwr[q]), .wr_addr(mwa[q]), .wr_data(mwd[q]),
      .rd_valid(mrv[q]), .rd_ready(mrr[q]), .rd_addr(mra[q]), .rsp_valid(mrsp[q]), .rsp_data(mrd[q]));
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic word_t beat_word(int id, int b, logic [7:0] tos);
    word_t w;
    for (int i = 0; i < DATA_W / 32; i++) w[i*32 +: 32] = 32'(id * 31337 + b * 7 + i);
    if (b == 0) begin
      w[12*8 +: 16] = 16'h0008;
      w[15*8 +: 8]  = tos;
      w[16*8 +: 32] = 32'(id);
    end
    return w;
  endfunction

  // 1 Gb/s output: one 512-bit beat per 12.8 cycles
  int credit = 0;
  always @(posedge clk) begin
    if (m_valid && m_ready) credit <= credit - 512 + 40;
    else if (credit < 1024) credit <= credit + 40;
  end
  always_comb m_ready = (credit >= 512);

  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // records
  longint unsigned t_in [int];
  int cls_of [int];
  int delays [2][$];
  int last_id [2] = '{-1, -1};
  int offered [2] = '{0, 0};
  int cur_id = -1, cur_beat = 0;
  longint unsigned busy_beats = 0, overload_cycles = 0;
  bit overloaded = 0;

  always @(posedge clk) if (rst_n) begin
    if (overloaded) begin
      overload_cycles++;
      if (m_valid && m_ready) busy_beats++;
    end
    if (m_valid && m_ready) begin
      if (cur_id < 0) begin
        int c, d_us, bound;
        cur_id = int'(m_data[16*8 +: 32]);
        cur_beat = 0;
        c = cls_of[cur_id];
        d_us = int'((cyc - t_in[cur_id]) / longint'(CPU));
        delays[c].push_back(d_us);
        bound = (c == 0 ? DL_A : DL_B) * 1000 + 2 * 13 + 13;
        check(d_us <= bound, $sformatf("class %0d packet %0d waited %0d us > %0d", c, cur_id, d_us, bound));
        check(cur_id > last_id[c], "order within class");
        last_id[c] = cur_id;
      end
      check(m_data == beat_word(cur_id, cur_beat, cls_of[cur_id] == 0 ? 8'(DL_A) : 8'(DL_B)), "data");
      cur_beat++;
      if (m_last) cur_id = -1;
    end
  end

  function automatic int pct(int q[$], int p);
    int s[$];
    s = q;
    s.sort();
    if (s.size() == 0) return -1;
    return s[(s.size() - 1) * p / 100];
  endfunction

  initial begin
    int id;
    longint unsigned t_stop;
    cfg_dl[0] = 8'(DL_A); cfg_dl[1] = 8'(DL_B); cfg_dl[2] = 8'd255;
    repeat (4) @(posedge clk);
    #1;
    rst_n = 1;
    overloaded = 1;
    t_stop = cyc + longint'(OVERLOAD_US) * CPU;
    id = 0;
    while (cyc < t_stop) begin
      longint unsigned t_next;
      int c;
      t_next = cyc + 202;                 // 1514 B every 8.07 us = 1.5 Gb/s
      c = id % 2;
      cls_of[id] = c;
      offered[c]++;
      for (int b = 0; b < 24; b++) begin
        s_valid = 1;
        s_data = beat_word(id, b, c == 0 ? 8'(DL_A) : 8'(DL_B));
        s_user = {112'(id), 16'd1514};
        s_last = (b == 23);
        s_keep = (b == 23) ? keep_of_count(7'(1514 - 23 * 64 - 1)) : '1;
        #1;
        while (!s_ready) begin @(posedge clk); #1; end
        if (b == 0) t_in[id] = cyc;
        @(posedge clk); #1;
      end
      s_valid = 0;
      id++;
      while (cyc < t_next) begin @(posedge clk); #1; end
    end
    overloaded = 0;
    repeat (DRAIN_US * CPU) @(posedge clk);
    #1;
    for (int c = 0; c < 2; c++) begin
      $display("class %0d (%0d ms): offered %0d delivered %0d loss %0.1f %% skips %0d tail %0d | delay us p50 %0d p90 %0d p99 %0d max %0d",
               c, c == 0 ? DL_A : DL_B, offered[c], delays[c].size(),
               100.0 * real'(offered[c] - delays[c].size()) / real'(offered[c]), c_skip[c], c_tail[c],
               pct(delays[c], 50), pct(delays[c], 90), pct(delays[c], 99), pct(delays[c], 100));
      check(delays[c].size() > 0, "class served");
      check(c_skip[c] > 0, "class skipped late packets");
    end
    $display("link utilisation while overloaded: %0.1f %%", 100.0 * real'(busy_beats) * 12.8 / real'(overload_cycles));
    check(real'(busy_beats) * 12.8 >= 0.95 * real'(overload_cycles), "link busy while overloaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
