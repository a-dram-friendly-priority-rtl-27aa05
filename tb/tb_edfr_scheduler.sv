// tb_edfr_scheduler: end-to-end test of the EDFR scheduler at reduced sizes
// (512-word rings, 64-entry timestamp FIFOs, 1 us = 1 cycle, skip tick every
// 16 cycles) with three deadline classes of 1, 2 and 3 ms and a behavioural
// memory (latency, random stalls) on each class's port.
//
// Traffic: IPv4 packets whose ToS byte carries 1, 2, 3 ms or an unknown
// value, plus non-IPv4 frames; each carries its id in bytes 16-19.
// Phase A: light load, encoder drop disabled. Phase B: heavy load with the
// output throttled to a quarter, encoder drop enabled, so rings fill and
// deadlines pass. Phase C: no input, output free, everything drains.
//
// Checked: every delivered packet is one that was sent, intact (data,
// tkeep, tlast), delivered once, from the class its ToS selects, in FIFO
// order within the class; every grant goes to the head with the earliest
// deadline; with encoder drop on, no packet is granted after its deadline;
// the counters add up and the rings end empty. Each mechanism -- tail drop,
// skip, encoder drop, timestamp FIFO overflow, output back-pressure, memory
// stall, default-class routing, a grant that is not to the lowest-index
// head -- must happen at least once.
module tb_edfr_scheduler;
  import edfr_pkg::*;
  localparam int NQ = 3, AW = 9, TSL = 6, PFL = 4;

  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_dl [NQ];
  logic [1:0] cfg_def = 2'd2;
  logic cfg_pe_drop = 0;
  logic s_valid = 0, s_ready, s_last = 0;
  logic [DATA_W-1:0] s_data = '0;
  logic [KEEP_W-1:0] s_keep = '0;
  logic [TUSER_W-1:0] s_user = '0;
  logic m_valid, m_ready = 1, m_last;
  logic [DATA_W-1:0] m_data;
  logic [KEEP_W-1:0] m_keep;
  logic [TUSER_W-1:0] m_user;
  logic [NQ-1:0] mwv, mwr, mrv, mrr, mrsp;
  logic [AW-1:0] mwa [NQ], mra [NQ];
  word_t mwd [NQ], mrd [NQ];
  ts_t t_now;
  logic [31:0] c_enq [NQ], c_tail [NQ], c_sent [NQ], c_pdrop [NQ], c_skip [NQ], c_skipw [NQ], c_ovf [NQ];
  logic [AW:0] q_fill [NQ];
  logic [TSL:0] ts_fill [NQ];

  int checks = 0, failures = 0;
  int n_bp = 0, n_memstall = 0, n_default = 0, n_nonfirst = 0, n_grant = 0;
  int offered [NQ], received [NQ];
  int last_id [NQ];
  int rec_len [int], rec_q [int];
  bit rec_seen [int];
  int next_id = 0;

  always #5 clk = ~clk;

  edfr_scheduler #(.NUM_Q(NQ), .AW(AW), .TS_LOG2(TSL), .PF_LOG2(PFL), .CLK_PER_US(1),
                   .SKIP_INTERVAL_CYCLES(16)) dut (
    .clk, .rst_n, .cfg_deadline_ms(cfg_dl), .cfg_default_q(cfg_def), .cfg_pe_drop_en(cfg_pe_drop),
    .s_axis_tvalid(s_valid), .s_axis_tready(s_ready), .s_axis_tdata(s_data), .s_axis_tkeep(s_keep),
    .s_axis_tuser(s_user), .s_axis_tlast(s_last),
    .m_axis_tvalid(m_valid), .m_axis_tready(m_ready), .m_axis_tdata(m_data), .m_axis_tkeep(m_keep),
    .m_axis_tuser(m_user), .m_axis_tlast(m_last),
    .mem_wr_valid(mwv), .mem_wr_ready(mwr), .mem_wr_addr(mwa), .mem_wr_data(mwd),
    .mem_rd_valid(mrv), .mem_rd_ready(mrr), .mem_rd_addr(mra), .mem_rsp_valid(mrsp), .mem_rsp_data(mrd),
    .t_now_us(t_now), .cnt_enq(c_enq), .cnt_tail_drop(c_tail), .cnt_sent(c_sent), .cnt_pe_drop(c_pdrop),
    .cnt_skip(c_skip), .cnt_skip_words(c_skipw), .cnt_ts_ovf(c_ovf), .q_fill_words(q_fill), .ts_fill(ts_fill));

  for (genvar q = 0; q < NQ; q++) begin : g_mem
    tb_mem_model #(.AW(AW), .LATENCY(25 + 10 * q), .STALL_PCT(10)) u_mem (.clk, .rst_n,
      .wr_valid(mwv[q]), .wr_ready(mwr[q]), .wr_addr(mwa[q]), .wr_data(mwd[q]),
      .rd_valid(mrv[q]), .rd_ready(mrr[q]), .rd_addr(mra[q]), .rsp_valid(mrsp[q]), .rsp_data(mrd[q]));
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic bit earlier(ts_t a, ts_t b);
    return $signed(a - b) < 0;
  endfunction

  function automatic word_t pat(int id, int b);
    word_t w;
    for (int i = 0; i < DATA_W / 32; i++) w[i*32 +: 32] = 32'(id * 65537 + b * 257 + i);
    return w;
  endfunction

  // first beat: Ethernet + IPv4 header start, id in bytes 16..19, pattern above byte 32
  function automatic word_t first_word(int id, bit ip, logic [7:0] tos);
    word_t w;
    w = pat(id, 0);
    w[12*8 +: 8] = ip ? 8'h08 : 8'h86;
    w[13*8 +: 8] = ip ? 8'h00 : 8'hdd;
    w[14*8 +: 8] = 8'h45;
    w[15*8 +: 8] = tos;
    w[16*8 +: 32] = 32'(id);
    return w;
  endfunction

  task automatic send_pkt();
    int id, len, nb, kind, q; bit ip; logic [7:0] tos;
    id = next_id++;
    len = 60 + $urandom % 700;
    nb = (len + 63) / 64;
    kind = $urandom % 10;
    ip = (kind != 9);
    case (kind)
      0, 1, 2: begin tos = 8'd1; q = 0; end
      3, 4, 5: begin tos = 8'd2; q = 1; end
      6, 7:    begin tos = 8'd3; q = 2; end
      default: begin tos = 8'd77; q = 2; n_default++; end   // unknown ToS (8) or non-IP (9)
    endcase
    rec_len[id] = len; rec_q[id] = q; rec_seen[id] = 0;
    offered[q]++;
    for (int b = 0; b < nb; b++) begin
      s_valid = 1;
      s_data  = (b == 0) ? first_word(id, ip, tos) : pat(id, b);
      s_user  = {112'(id), 16'(len)};
      s_last  = (b == nb - 1);
      s_keep  = (b == nb - 1) ? keep_of_count(7'((len - 1) % 64)) : '1;
      #1;
      while (!s_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    s_valid = 0;
  endtask

  // output monitor
  int cur_id = -1, cur_beat = 0, cur_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (m_valid && !m_ready) n_bp++;
    if ((mwv & ~mwr) != 0 || (mrv & ~mrr) != 0) n_memstall++;
    if (m_valid && m_ready) begin
      if (cur_id < 0) begin
        cur_id = int'(m_data[16*8 +: 32]);
        cur_beat = 0;
        checks++;
        if (!rec_len.exists(cur_id)) begin
          failures++; $display("FAIL: unknown packet id %0d", cur_id); cur_id = -2;
        end else begin
          int q;
          q = rec_q[cur_id];
          cur_len = rec_len[cur_id];
          check(!rec_seen[cur_id], $sformatf("packet %0d delivered twice", cur_id));
          rec_seen[cur_id] = 1;
          check(cur_id > last_id[q], $sformatf("class %0d order: %0d after %0d", q, cur_id, last_id[q]));
          last_id[q] = cur_id;
          received[q]++;
          check(m_user == {112'(cur_id), 16'(cur_len)}, "tuser");
          check(m_data[32*8 +: 32] == pat(cur_id, 0)[32*8 +: 32], "first beat payload");
        end
      end else if (cur_id >= 0) begin
        check(m_data == pat(cur_id, cur_beat), $sformatf("pkt %0d beat %0d data", cur_id, cur_beat));
      end
      if (cur_id >= 0) begin
        int nb;
        nb = (cur_len + 63) / 64;
        check(m_last == (cur_beat == nb - 1), "tlast");
        check(m_keep == ((cur_beat == nb - 1) ? keep_of_count(7'((cur_len - 1) % 64)) : '1), "tkeep");
      end
      cur_beat++;
      if (m_last) cur_id = -1;
    end
  end

  // grant monitor: earliest-deadline choice and no late grant with drop on
  always @(posedge clk) if (rst_n) begin
    for (int q = 0; q < NQ; q++) if (dut.cmd_send[q]) begin
      n_grant++;
      for (int o = 0; o < NQ; o++) if (o != q && dut.head_valid[o])
        check(!earlier(dut.head_deadline[o], dut.head_deadline[q]), "grant to earliest deadline");
      for (int o = 0; o < q; o++) if (dut.head_valid[o]) begin n_nonfirst++; break; end
      if (cfg_pe_drop) check(!earlier(dut.head_deadline[q], t_now), "no grant after the deadline");
    end
  end

  initial begin
    int total_enq, total_offered;
    cfg_dl[0] = 8'd1; cfg_dl[1] = 8'd2; cfg_dl[2] = 8'd3;
    for (int q = 0; q < NQ; q++) begin offered[q] = 0; received[q] = 0; last_id[q] = -1; end
    repeat (4) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;

    // phase A: light load
    for (int i = 0; i < 150; i++) begin
      send_pkt();
      repeat (10 + $urandom % 20) @(posedge clk);
      #1;
    end
    // phase B: overload, output at a quarter rate, encoder drop on
    cfg_pe_drop = 1;
    fork
      begin
        for (int i = 0; i < 1500; i++) send_pkt();
      end
      begin
        repeat (15000) begin @(posedge clk); #1; m_ready = ($urandom % 4) == 0; end
      end
    join
    // phase C: drain
    m_ready = 1;
    repeat (12000) @(posedge clk);
    #1;

    total_enq = 0; total_offered = 0;
    for (int q = 0; q < NQ; q++) begin
      $display("class %0d: offered %0d enq %0d tail %0d sent %0d pe_drop %0d skips %0d skipped_words %0d ts_ovf %0d",
               q, offered[q], c_enq[q], c_tail[q], c_sent[q], c_pdrop[q], c_skip[q], c_skipw[q], c_ovf[q]);
      check(int'(c_enq[q] + c_tail[q]) == offered[q], $sformatf("class %0d: enq + tail drops = offered", q));
      check(int'(c_sent[q]) == received[q], $sformatf("class %0d: sent counter = received", q));
      check(received[q] + int'(c_pdrop[q]) <= int'(c_enq[q]), "no more out than in");
      check(received[q] + int'(c_pdrop[q]) == int'(c_enq[q]) || c_skip[q] > 0, "missing packets only by skips");
      check(q_fill[q] == 0, $sformatf("class %0d ring drained", q));
      check(received[q] > 0, "class served");
    end
    // mechanisms
    check(c_tail[0] + c_tail[1] + c_tail[2] > 0, "tail drop happened");
    check(c_skip[0] + c_skip[1] + c_skip[2] > 0, "skip happened");
    check(c_pdrop[0] + c_pdrop[1] + c_pdrop[2] > 0, "encoder drop happened");
    check(c_ovf[0] + c_ovf[1] + c_ovf[2] > 0, "timestamp FIFO overflow happened");
    check(n_bp > 0, "output back-pressure happened");
    check(n_memstall > 0, "memory stall happened");
    check(n_default > 0, "default-class routing happened");
    check(n_nonfirst > 0, "EDF grant past a lower-index head happened");
    $display("grants %0d nonfirst %0d backpressure %0d memstall %0d default %0d", n_grant, n_nonfirst, n_bp, n_memstall, n_default);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
