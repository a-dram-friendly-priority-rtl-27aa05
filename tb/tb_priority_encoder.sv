// tb_priority_encoder: three modelled skip-FIFO heads with random deadlines
// around a moving T_now. At every decision the testbench works out which
// queue should be sent (earliest deadline, lowest index on a tie) or, with
// drop enabled, which late head should be discarded, and compares with
// cmd_send/cmd_drop. The granted queue then streams its packet with random
// gaps and back-pressure; every output beat is checked to come from that
// queue, and no other command may be issued until tlast. No grant may be
// made while a queue signals that its next head is about to appear.
module tb_priority_encoder;
  import edfr_pkg::*;
  localparam int NQ = 3;

  logic clk = 0, rst_n = 0;
  ts_t t_now = 32'hffff_ff00;      // start near wrap-around
  logic drop_en = 0;
  logic [NQ-1:0] head_valid = '0, head_soon = '0, cmd_send, cmd_drop, q_valid = '0, q_ready;
  ts_t head_dl [NQ];
  axis_beat_t q_beat [NQ];
  logic m_valid, m_ready = 1, busy;
  axis_beat_t m_beat;
  logic [1:0] cur_q;
  int checks = 0, failures = 0, n_wait = 0, n_send = 0, n_drop = 0, n_nonzero = 0;

  always #5 clk = ~clk;

  priority_encoder #(.NUM_Q(NQ)) dut (.clk, .rst_n, .t_now_us(t_now), .cfg_drop_en(drop_en),
    .head_valid, .head_soon, .head_deadline(head_dl), .cmd_send, .cmd_drop, .q_valid, .q_ready, .q_beat,
    .m_valid, .m_ready, .m_beat, .busy, .cur_q);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic bit earlier(ts_t a, ts_t b);
    return $signed(a - b) < 0;
  endfunction

  initial begin
    for (int q = 0; q < NQ; q++) begin head_dl[q] = 0; q_beat[q] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int it = 0; it < 1500; it++) begin
      int exp_send, exp_drop, nb, beats;
      drop_en = (it >= 500);
      t_now = t_now + ts_t'($urandom % 50);
      for (int q = 0; q < NQ; q++) begin
        head_valid[q] = ($urandom % 3) != 0;
        head_dl[q] = t_now + ts_t'(int'($urandom % 400) - 100);
        if ($urandom % 8 == 0 && q > 0) head_dl[q] = head_dl[q-1];   // ties
      end
      if (head_valid == 0) head_valid[$urandom % NQ] = 1'b1;
      head_soon = (($urandom % 5) == 0) ? NQ'($urandom) : '0;
      #1;
      exp_send = -1; exp_drop = -1;
      for (int q = 0; q < NQ; q++)
        if (head_valid[q] && earlier(head_dl[q], t_now) && exp_drop < 0) exp_drop = q;
      if (!drop_en) exp_drop = -1;
      if (exp_drop < 0 && head_soon == '0)
        for (int q = 0; q < NQ; q++)
          if (head_valid[q] && (exp_send < 0 || earlier(head_dl[q], head_dl[exp_send]))) exp_send = q;
      check(cmd_drop == (exp_drop >= 0 ? NQ'(1 << exp_drop) : '0), $sformatf("cmd_drop %b exp %0d", cmd_drop, exp_drop));
      check(cmd_send == (exp_send >= 0 ? NQ'(1 << exp_send) : '0), $sformatf("cmd_send %b exp %0d", cmd_send, exp_send));
      if (exp_drop < 0 && exp_send < 0) begin     // held back by head_soon
        n_wait++;
        @(posedge clk); #1;
        head_soon = '0;
        check(!busy, "no grant while a head is about to appear");
        continue;
      end
      if (exp_send > 0) n_nonzero++;
      @(posedge clk); #1;
      head_valid = '0;
      if (exp_drop >= 0) begin
        n_drop++;
        check(!busy, "drop leaves encoder idle");
        continue;
      end
      n_send++;
      check(busy && cur_q == 2'(exp_send), "busy on granted queue");
      nb = 1 + $urandom % 4;
      beats = 0;
      while (beats < nb) begin
        q_valid = '0;
        q_valid[exp_send] = ($urandom % 4) != 0;
        for (int q = 0; q < NQ; q++) if (q != exp_send) q_valid[q] = 1'($urandom);   // noise from idle queues
        q_beat[exp_send].tdata = DATA_W'({it, beats});
        q_beat[exp_send].tlast = (beats == nb - 1);
        for (int q = 0; q < NQ; q++) if (q != exp_send) q_beat[q].tdata = DATA_W'($urandom);
        m_ready = ($urandom % 4) != 0;
        head_valid = NQ'($urandom);          // other heads appear, must be ignored
        #1;
        check(cmd_send == '0 && cmd_drop == '0, "no command while busy");
        check(m_valid == q_valid[exp_send], "m_valid from granted queue");
        check(q_ready == (m_ready ? NQ'(1 << exp_send) : '0), "ready only to granted queue");
        if (m_valid) check(m_beat.tdata == DATA_W'({it, beats}), "beat data from granted queue");
        if (m_valid && m_ready) beats++;
        @(posedge clk); #1;
      end
      q_valid = '0; head_valid = '0; head_soon = '0;
      check(!busy, "idle after tlast");
    end
    check(n_send > 0 && n_drop > 0 && n_nonzero > 0 && n_wait > 0, "sends, drops and non-first winners seen");
    $display("send=%0d drop=%0d", n_send, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
