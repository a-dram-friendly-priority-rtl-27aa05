// tb_edfr_full: the scheduler at its default sizes (three classes, 2^23-word
// rings, 2^14-entry timestamp FIFOs, 250 MHz clock, skip tick every 3052
// cycles) with a behavioural memory per class.
// Part 1: with the output stalled, packets arrive for the 3 ms, 2 ms and 1 ms
// classes (in that order); once the output runs, the first packet (granted
// while it was alone) is followed by the 1 ms packets, then 2 ms, then 3 ms:
// earliest deadline first, FIFO within a class. Part 2: the output is
// stalled in the middle of a 2 ms packet while two 1 ms packets arrive; after
// more than 1 ms the 1 ms class skips them without reading them, so only the
// 2 ms packet comes out. Data of every delivered packet is checked.
// Part 0 measures the scheduler latency of a lone 1514-byte packet, from its
// first input beat to its first output beat, with a 60-cycle memory latency
// (DDR4-like); the measured DDR4 figure for the FPGA prototype this design
// follows was about 190 cycles, which this store-and-forward design must
// not exceed.
module tb_edfr_full;
  import edfr_pkg::*;
  localparam int NQ = 3, AW = 23;

  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_dl [NQ];
  logic s_valid = 0, s_ready, s_last = 0;
  logic [DATA_W-1:0] s_data = '0;
  logic [KEEP_W-1:0] s_keep = '0;
  logic [TUSER_W-1:0] s_user = '0;
  logic m_valid, m_ready = 0, m_last;
  logic [DATA_W-1:0] m_data;
  logic [KEEP_W-1:0] m_keep;
  logic [TUSER_W-1:0] m_user;
  logic [NQ-1:0] mwv, mwr, mrv, mrr, mrsp;
  logic [AW-1:0] mwa [NQ], mra [NQ];
  word_t mwd [NQ], mrd [NQ];
  ts_t t_now;
  logic [31:0] c_enq [NQ], c_tail [NQ], c_sent [NQ], c_pdrop [NQ], c_skip [NQ], c_skipw [NQ], c_ovf [NQ];
  logic [AW:0] q_fill [NQ];
  logic [14:0] ts_fill [NQ];
  int checks = 0, failures = 0;
  int out_ids [$];
  int cur_id = -1, cur_beat = 0;
  int rec_len [int];
  longint unsigned cyc = 0, t_first_in = 0, t_first_out = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always #2 clk = ~clk;   // 250 MHz with 1 ns units

  edfr_scheduler dut (
    .clk, .rst_n, .cfg_deadline_ms(cfg_dl), .cfg_default_q(2'd2), .cfg_pe_drop_en(1'b0),
    .s_axis_tvalid(s_valid), .s_axis_tready(s_ready), .s_axis_tdata(s_data), .s_axis_tkeep(s_keep),
    .s_axis_tuser(s_user), .s_axis_tlast(s_last),
    .m_axis_tvalid(m_valid), .m_axis_tready(m_ready), .m_axis_tdata(m_data), .m_axis_tkeep(m_keep),
    .m_axis_tuser(m_user), .m_axis_tlast(m_last),
    .mem_wr_valid(mwv), .mem_wr_ready(mwr), .mem_wr_addr(mwa), .mem_wr_data(mwd),
    .mem_rd_valid(mrv), .mem_rd_ready(mrr), .mem_rd_addr(mra), .mem_rsp_valid(mrsp), .mem_rsp_data(mrd),
    .t_now_us(t_now), .cnt_enq(c_enq), .cnt_tail_drop(c_tail), .cnt_sent(c_sent), .cnt_pe_drop(c_pdrop),
    .cnt_skip(c_skip), .cnt_skip_words(c_skipw), .cnt_ts_ovf(c_ovf), .q_fill_words(q_fill), .ts_fill(ts_fill));

  for (genvar q = 0; q < NQ; q++) begin : g_mem
    tb_mem_model #(.AW(AW), .LATENCY(60), .STALL_PCT(5)) u_mem (.clk, .rst_n,
      .wr_valid(mwv[q]), .wr_ready(mwr[q]), .wr_addr(mwa[q]), .wr_data(mwd[q]),
      .rd_valid(mrv[q]), .rd_ready(mrr[q]), .rd_addr(mra[q]), .rsp_valid(mrsp[q]), .rsp_data(mrd[q]));
  end

  initial begin
    #4000000;   // 1,000,000 cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic word_t pat(int id, int b);
    word_t w;
    for (int i = 0; i < DATA_W / 32; i++) w[i*32 +: 32] = 32'(id * 7001 + b * 13 + i);
    return w;
  endfunction

  task automatic send_pkt(int id, logic [7:0] tos, int len);
    int nb;
    nb = (len + 63) / 64;
    rec_len[id] = len;
    for (int b = 0; b < nb; b++) begin
      s_valid = 1;
      s_data = pat(id, b);
      if (b == 0) begin
        s_data[12*8 +: 16] = 16'h0008;
        s_data[15*8 +: 8]  = tos;
        s_data[16*8 +: 32] = 32'(id);
      end
      s_user = {112'(id), 16'(len)};
      s_last = (b == nb - 1);
      s_keep = (b == nb - 1) ? keep_of_count(7'((len - 1) % 64)) : '1;
      #1;
      while (!s_ready) begin @(posedge clk); #1; end
      if (b == 0 && id == 5) t_first_in = cyc;
      @(posedge clk); #1;
    end
    s_valid = 0;
  endtask

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    if (cur_id < 0) begin
      cur_id = int'(m_data[16*8 +: 32]);
      cur_beat = 0;
      out_ids.push_back(cur_id);
      if (cur_id == 5) t_first_out = cyc;
    end else begin
      check(m_data == pat(cur_id, cur_beat), $sformatf("pkt %0d beat %0d", cur_id, cur_beat));
    end
    cur_beat++;
    if (m_last) begin
      check(rec_len.exists(cur_id) && cur_beat == (rec_len[cur_id] + 63) / 64, "packet length");
      cur_id = -1;
    end
  end

  initial begin
    int expect_order [$];
    cfg_dl[0] = 8'd1; cfg_dl[1] = 8'd2; cfg_dl[2] = 8'd3;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;

    // part 0: latency of a lone 1514-byte packet
    m_ready = 1;
    send_pkt(5, 8'd2, 1514);
    repeat (400) @(posedge clk);
    #1;
    check(out_ids.size() == 1 && out_ids[0] == 5, "lone packet delivered");
    $display("latency first beat in to first beat out: %0d cycles", t_first_out - t_first_in);
    check(t_first_out > t_first_in && t_first_out - t_first_in <= 190, "latency within 190 cycles");
    out_ids.delete();
    m_ready = 0;

    // part 1: earliest deadline first across classes
    send_pkt(30, 8'd3, 1514); send_pkt(31, 8'd3, 64);
    send_pkt(20, 8'd2, 300);  send_pkt(21, 8'd2, 1514);
    send_pkt(10, 8'd1, 128);  send_pkt(11, 8'd1, 1000);
    repeat (400) @(posedge clk);
    #1;
    m_ready = 1;
    repeat (2000) @(posedge clk);
    #1;
    expect_order = '{30, 10, 11, 20, 21, 31};
    check(out_ids.size() == 6, $sformatf("six packets out (%0d)", out_ids.size()));
    foreach (expect_order[i]) check(i < out_ids.size() && out_ids[i] == expect_order[i],
                                    $sformatf("position %0d: id %0d", i, i < out_ids.size() ? out_ids[i] : -1));

    // part 2: skip of expired 1 ms packets
    m_ready = 0;
    out_ids.delete();
    send_pkt(40, 8'd2, 1514);
    repeat (200) @(posedge clk);
    #1;
    m_ready = 1;
    @(posedge clk); #1;        // one beat of packet 40 leaves, then the output stalls
    m_ready = 0;
    send_pkt(50, 8'd1, 700); send_pkt(51, 8'd1, 200);
    repeat (263000) @(posedge clk);   // > 1 ms + one skip interval at 250 MHz
    #1;
    check(c_skip[0] >= 1, "1 ms class skipped");
    check(c_skipw[0] == 32'((700 + 63) / 64 + 2 + (200 + 63) / 64 + 2), $sformatf("skipped words %0d", c_skipw[0]));
    m_ready = 1;
    repeat (2000) @(posedge clk);
    #1;
    check(out_ids.size() == 1 && out_ids[0] == 40, "only the 2 ms packet is delivered");
    check(q_fill[0] == 0 && q_fill[1] == 0 && q_fill[2] == 0, "rings empty");
    check(c_enq[0] == 4 && c_sent[0] == 2 && c_sent[1] == 4, "class counters");
    $display("t_now=%0d us, skips=%0d words=%0d", t_now, c_skip[0], c_skipw[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
