// tb_rb_reader: a producer thread lays packets out in a behavioural memory
// (header, control, data words, as the writer does) and advances wr_ptr; the
// consumer thread plays the priority encoder. For each head packet it checks
// the head deadline and tuser, then randomly sends it (checking every output
// beat, tkeep and tlast under random back-pressure), drops it (checking that
// rd_ptr moves past it) or skips ahead to a later packet boundary (checking
// that the next head is that packet). It also checks that a skip request is
// refused while a packet is being sent. The memory has latency and stalls.
module tb_rb_reader;
  import edfr_pkg::*;
  localparam int AW = 7, PF = 3, RING = 1 << AW, NPKT = 300;

  typedef struct { int id; int nb; int len; logic [AW:0] base; } pkt_t;

  logic clk = 0, rst_n = 0;
  logic [AW:0] wr_ptr = 0, rd_ptr;
  logic skip_valid = 0, skip_ack;
  logic [AW:0] skip_ptr = 0;
  logic head_valid; ts_t head_deadline; logic [TUSER_W-1:0] head_tuser;
  logic cmd_send = 0, cmd_drop = 0;
  logic m_valid, m_ready = 0; axis_beat_t m_beat;
  logic mem_rd_valid, mem_rd_ready, mem_rsp_valid; logic [AW-1:0] mem_rd_addr; word_t mem_rsp_data;
  logic sent_pulse, drop_pulse;
  logic unused_wr_ready;
  int checks = 0, failures = 0, n_send = 0, n_drop = 0, n_skip = 0, n_refused = 0;
  pkt_t exp_q [$];
  int produced = 0;

  always #5 clk = ~clk;

  rb_reader #(.AW(AW), .PF_LOG2(PF)) dut (.clk, .rst_n, .wr_ptr, .rd_ptr, .skip_valid, .skip_ptr, .skip_ack, .head_soon(),
    .head_valid, .head_deadline, .head_tuser, .cmd_send, .cmd_drop, .m_valid, .m_ready, .m_beat,
    .mem_rd_valid, .mem_rd_ready, .mem_rd_addr, .mem_rsp_valid, .mem_rsp_data, .sent_pulse, .drop_pulse);

  tb_mem_model #(.AW(AW), .LATENCY(9), .STALL_PCT(20)) u_mem (.clk, .rst_n, .wr_valid(1'b0), .wr_ready(unused_wr_ready),
    .wr_addr('0), .wr_data('0), .rd_valid(mem_rd_valid), .rd_ready(mem_rd_ready), .rd_addr(mem_rd_addr),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data));

  initial begin
    #5000000;
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
    for (int i = 0; i < DATA_W / 32; i++) w[i*32 +: 32] = 32'(pkt * 977 + b * 31 + i * 3);
    return w;
  endfunction

  // words in use on the ring, computed at pointer width so it wraps
  function automatic int fill();
    logic [AW:0] u;
    u = wr_ptr - rd_ptr;
    return int'(u);
  endfunction

  // producer: writes packets when there is room, like rb_writer would
  initial begin
    @(posedge rst_n);
    while (produced < NPKT) begin
      int len, nb;
      len = 1 + $urandom % 900;
      nb = (len + 63) / 64;
      while (fill() + nb + 2 > RING) begin @(posedge clk); #1; end
      repeat ($urandom % 20) @(posedge clk);
      #1;
      begin
        pkt_hdr_t h; word_t c; pkt_t p;
        h.nbeats = BEAT_W'(nb); h.deadline = 32'(produced * 13); h.tuser = {112'(produced), 16'(len)};
        c = '0;
        for (int b = 0; b < nb; b++) c[b*8 +: 8] = {b == nb - 1, 7'((b == nb - 1) ? (len - 1) % 64 : 63)};
        u_mem.mem[longint'(AW'(wr_ptr))] = DATA_W'(h);
        u_mem.mem[longint'(AW'(wr_ptr + 1))] = c;
        for (int b = 0; b < nb; b++) u_mem.mem[longint'(AW'(wr_ptr + (AW+1)'(2 + b)))] = pat(produced, b);
        p.id = produced; p.nb = nb; p.len = len; p.base = wr_ptr;
        exp_q.push_back(p);
        wr_ptr = wr_ptr + (AW+1)'(nb + 2);
        produced++;
      end
    end
  end

  initial begin
    int consumed;
    consumed = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    while (consumed < NPKT) begin
      pkt_t p; int r;
      while (!head_valid) begin @(posedge clk); #1; end
      p = exp_q[0];
      check(head_deadline == 32'(p.id * 13), $sformatf("head deadline of pkt %0d", p.id));
      check(head_tuser == {112'(p.id), 16'(p.len)}, $sformatf("head tuser of pkt %0d", p.id));
      check(rd_ptr == p.base, "rd_ptr at head");
      r = $urandom % 100;
      if (r >= 80 && exp_q.size() >= 3) begin
        int j;
        j = 1 + $urandom % (exp_q.size() - 1 < 3 ? exp_q.size() - 1 : 3);
        skip_valid = 1; skip_ptr = exp_q[j].base;
        #1;
        check(skip_ack == 1'b1, "skip taken at head");
        @(posedge clk); #1;
        skip_valid = 0;
        check(rd_ptr == exp_q[j].base, "rd_ptr after skip");
        repeat (j) void'(exp_q.pop_front());
        consumed += j; n_skip++;
      end else if (r >= 60) begin
        cmd_drop = 1;
        @(posedge clk); #1;
        cmd_drop = 0;
        while (rd_ptr != p.base + (AW+1)'(p.nb + 2)) begin
          check(!m_valid, "no output while dropping");
          @(posedge clk); #1;
        end
        void'(exp_q.pop_front());
        consumed++; n_drop++;
      end else begin
        int b;
        cmd_send = 1;
        @(posedge clk); #1;
        cmd_send = 0;
        b = 0;
        while (b < p.nb) begin
          m_ready = ($urandom % 4) != 0;
          if (b == p.nb / 2 && (p.id % 3 == 0) && exp_q.size() > 1) begin
            skip_valid = 1; skip_ptr = exp_q[1].base;
            #1;
            checks++; if (skip_ack) begin failures++; $display("FAIL: skip taken mid-packet"); end
            n_refused++;
          end
          if (m_valid && m_ready) begin
            check(m_beat.tdata == pat(p.id, b), $sformatf("data pkt %0d beat %0d", p.id, b));
            check(m_beat.tlast == (b == p.nb - 1), "tlast");
            check(m_beat.tkeep == ((b == p.nb - 1) ? keep_of_count(7'((p.len - 1) % 64)) : '1), "tkeep");
            b++;
          end
          @(posedge clk); #1;
          skip_valid = 0;
        end
        m_ready = 0;
        void'(exp_q.pop_front());
        consumed++; n_send++;
      end
    end
    check(n_send > 0 && n_drop > 0 && n_skip > 0 && n_refused > 0, "all paths exercised");
    $display("sent=%0d dropped=%0d skips=%0d refused=%0d", n_send, n_drop, n_skip, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
