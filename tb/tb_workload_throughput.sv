// tb_workload_throughput: packet-size sweep of the scheduler at its default
// sizes. For each packet length (64, 128, 512, 1514 bytes) and each memory
// latency (2 cycles, on-chip-RAM-like; 60 cycles, DDR4-like), 300 packets of
// one class are streamed back to back with the output always ready, and the
// delivered rate is measured over the steady part of the run. A packet of N
// beats needs N+3 cycles on the write side and about as many on the read side,
// so the rate must reach N/(N+3) of the 128 Gb/s raw data path (512 bits at
// 250 MHz), less 3 %. Every delivered beat's data is checked. Before each
// sweep, a lone 1514-byte packet measures the latency from its first input
// beat to its first output beat; it must stay within 64 cycles on the fast
// memory and 190 cycles on the slow one, the figures reported for on-chip
// RAM and DDR4 with this packet size.
module tb_workload_throughput;
  import edfr_pkg::*;
  localparam int NQ = 3, AW = 23;

  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_dl [NQ];
  logic s_valid = 0, s_ready, s_last = 0;
  logic [DATA_W-1:0] s_data = '0;
  logic [KEEP_W-1:0] s_keep = '0;
  logic [TUSER_W-1:0] s_user = '0;
  logic m_valid, m_last;
  logic [DATA_W-1:0] m_data;
  logic [KEEP_W-1:0] m_keep;
  logic [TUSER_W-1:0] m_user;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pat(int id, int b);
    word_t w;
    for (int i = 0; i < DATA_W / 32; i++) w[i*32 +: 32] = 32'(id * 40503 + b * 9 + i);
    return w;
  endfunction

  function automatic word_t beat_word(int id, int b);
    word_t w;
    w = pat(id, b);
    if (b == 0) begin w[12*8 +: 16] = 16'h0008; w[15*8 +: 8] = 8'd10; end
    return w;
  endfunction

  // one scheduler per memory latency; only one is driven at a time
  logic sel = 0;
  logic [1:0] s_ready_v;
  logic [1:0] m_valid_v, m_last_v;
  logic [DATA_W-1:0] m_data_v [2];
  logic [KEEP_W-1:0] m_keep_v [2];
  logic [TUSER_W-1:0] m_user_v [2];

  for (genvar k = 0; k < 2; k++) begin : g_sys
    localparam int LAT = (k == 0) ? 2 : 60;
    logic [NQ-1:0] mwv, mwr, mrv, mrr, mrsp;
    logic [AW-1:0] mwa [NQ], mra [NQ];
    word_t mwd [NQ], mrd [NQ];
    edfr_scheduler dut (
      .clk, .rst_n, .cfg_deadline_ms(cfg_dl), .cfg_default_q(2'd2), .cfg_pe_drop_en(1'b0),
      .s_axis_tvalid(s_valid && sel == 1'(k)), .s_axis_tready(s_ready_v[k]), .s_axis_tdata(s_data),
      .s_axis_tkeep(s_keep), .s_axis_tuser(s_user), .s_axis_tlast(s_last),
      .m_axis_tvalid(m_valid_v[k]), .m_axis_tready(1'b1), .m_axis_tdata(m_data_v[k]), .m_axis_tkeep(m_keep_v[k]),
      .m_axis_tuser(m_user_v[k]), .m_axis_tlast(m_last_v[k]),
      .mem_wr_valid(mwv), .mem_wr_ready(mwr), .mem_wr_addr(mwa), .mem_wr_data(mwd),
      .mem_rd_valid(mrv), .mem_rd_ready(mrr), .mem_rd_addr(mra), .mem_rsp_valid(mrsp), .mem_rsp_data(mrd),
      .t_now_us(), .cnt_enq(), .cnt_tail_drop(), .cnt_sent(), .cnt_pe_drop(), .cnt_skip(), .cnt_skip_words(),
      .cnt_ts_ovf(), .q_fill_words(), .ts_fill());
    for (genvar q = 0; q < NQ; q++) begin : g_mem
      tb_mem_model #(.AW(AW), .LATENCY(LAT), .STALL_PCT(0)) u_mem (.clk, .rst_n,
        .wr_valid(mwv[q]), .wr_ready(mwr[q]), .wr_addr(mwa[q]), .wr_data(mwd[q]),
        .rd_valid(mrv[q]), .rd_ready(mrr[q]), .rd_addr(mra[q]), .rsp_valid(mrsp[q]), .rsp_data(mrd[q]));
    end
  end

  assign s_ready = s_ready_v[sel];
  assign m_valid = m_valid_v[sel];
  assign m_last  = m_last_v[sel];
  assign m_data  = m_data_v[sel];
  assign m_keep  = m_keep_v[sel];
  assign m_user  = m_user_v[sel];

  // output monitor: counts bytes and checks data
  longint unsigned cyc = 0;
  longint unsigned bytes_out = 0;
  int pkts_out = 0, out_beat = 0, out_id = 0;
  longint unsigned t_first_out = 0;
  longint unsigned t_mark_cyc = 0, t_mark_bytes = 0, t_end_cyc = 0, t_end_bytes = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && m_valid) begin
      if (pkts_out == 0 && out_beat == 0) t_first_out = cyc;
      check(m_data == beat_word(out_id, out_beat), $sformatf("pkt %0d beat %0d", out_id, out_beat));
      bytes_out += longint'($countones(m_keep));
      out_beat++;
      if (m_last) begin
        pkts_out++; out_id++; out_beat = 0;
        if (pkts_out == 50)  begin t_mark_cyc = cyc; t_mark_bytes = bytes_out; end
        if (pkts_out == 250) begin t_end_cyc = cyc;  t_end_bytes = bytes_out; end
      end
    end
  end

  initial begin
    automatic int lens [4] = '{64, 128, 512, 1514};
    cfg_dl[0] = 8'd10; cfg_dl[1] = 8'd20; cfg_dl[2] = 8'd30;
    for (int k = 0; k < 2; k++) begin
      begin : lone_packet
        longint unsigned t_in;
        int lat, limit;
        rst_n = 0; sel = 1'(k);
        repeat (4) @(posedge clk);
        #1;
        rst_n = 1;
        pkts_out = 0; out_id = 0; out_beat = 0; bytes_out = 0;
        repeat (10) @(posedge clk);
        #1;
        for (int b = 0; b < 24; b++) begin
          s_valid = 1;
          s_data = beat_word(0, b);
          s_user = {112'(0), 16'(1514)};
          s_last = (b == 23);
          s_keep = (b == 23) ? keep_of_count(7'((1514 - 1) % 64)) : '1;
          #1;
          while (!s_ready) begin @(posedge clk); #1; end
          if (b == 0) t_in = cyc;
          @(posedge clk); #1;
        end
        s_valid = 0;
        while (pkts_out < 1) begin @(posedge clk); #1; end
        lat = int'(t_first_out - t_in);
        limit = (k == 0) ? 64 : 190;
        $display("memory latency %0d: lone 1514-byte packet, first beat in to first beat out %0d cycles (limit %0d)",
                 k == 0 ? 2 : 60, lat, limit);
        check(lat <= limit, "lone-packet latency");
      end
      for (int li = 0; li < 4; li++) begin
        int len, nb; real gbps, need;
        len = lens[li]; nb = (len + 63) / 64;
        rst_n = 0; sel = 1'(k);
        repeat (4) @(posedge clk);
        #1;
        rst_n = 1;
        pkts_out = 0; out_id = 0; out_beat = 0; bytes_out = 0;
        for (int p = 0; p < 300; p++) begin
          for (int b = 0; b < nb; b++) begin
            s_valid = 1;
            s_data = beat_word(p, b);
            s_user = {112'(p), 16'(len)};
            s_last = (b == nb - 1);
            s_keep = (b == nb - 1) ? keep_of_count(7'((len - 1) % 64)) : '1;
            #1;
            while (!s_ready) begin @(posedge clk); #1; end
            @(posedge clk); #1;
          end
        end
        s_valid = 0;
        while (pkts_out < 300) begin @(posedge clk); #1; end
        gbps = real'(t_end_bytes - t_mark_bytes) * 8.0 / (real'(t_end_cyc - t_mark_cyc) * 4.0);
        need = 128.0 * real'(nb) / real'(nb + 3) * 0.97 * real'(len) / real'(nb * 64);
        $display("memory latency %0d, %0d-byte packets: %0.1f Gb/s of packet data (floor %0.1f)",
                 k == 0 ? 2 : 60, len, gbps, need);
        check(gbps >= need, $sformatf("rate for %0d-byte packets", len));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
