// tb_deadline_classifier: random IPv4 and non-IPv4 packets with random ToS
// values; checks that every beat of a packet is offered to the queue the
// reference mapping picks (deadline match, else the default queue), that
// s_ready follows that queue's ready, and that the choice holds for the
// whole packet even when later beats look like other classes.
module tb_deadline_classifier;
  import edfr_pkg::*;
  localparam int NQ = 3;
  logic clk = 0, rst_n = 0;
  logic [7:0] cfg_dl [NQ];
  logic [1:0] cfg_def = 2'd2;
  logic s_valid = 0, s_ready;
  axis_beat_t s_beat = '0, m_beat;
  logic [NQ-1:0] m_valid, m_ready = '1;
  logic [1:0] sel;
  logic first;
  int checks = 0, failures = 0, hits[NQ+1];

  always #5 clk = ~clk;

  deadline_classifier #(.NUM_Q(NQ)) dut (.clk, .rst_n, .cfg_deadline_ms(cfg_dl), .cfg_default_q(cfg_def),
    .s_valid, .s_ready, .s_beat, .m_valid, .m_ready, .m_beat, .sel, .first_beat(first));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    cfg_dl[0] = 8'd30; cfg_dl[1] = 8'd60; cfg_dl[2] = 8'd100;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int p = 0; p < 400; p++) begin
      int nb, want; logic [7:0] tos; bit ip;
      nb = 1 + $urandom % 5;
      ip = ($urandom % 5) != 0;
      case ($urandom % 5)
        0: tos = 8'd30; 1: tos = 8'd60; 2: tos = 8'd100; default: tos = 8'($urandom);
      endcase
      want = int'(cfg_def);
      if (ip) for (int q = 0; q < NQ; q++) if (cfg_dl[q] == tos) begin want = q; break; end
      if (!ip) hits[NQ]++; else hits[want]++;
      for (int b = 0; b < nb; b++) begin
        s_valid = 1;
        s_beat.tdata = {DATA_W/32{$urandom}};
        if (b == 0) begin
          s_beat.tdata[12*8 +: 16] = ip ? 16'h0008 : 16'hdd86;   // bytes 12,13 = 08 00 or 86 dd
          s_beat.tdata[15*8 +: 8]  = tos;
        end
        s_beat.tlast = (b == nb - 1);
        forever begin
          m_ready = NQ'($urandom);
          #1;
          check(m_valid == NQ'(1 << want), $sformatf("pkt %0d beat %0d routed to %b, want %0d", p, b, m_valid, want));
          check(s_ready == m_ready[want], "ready follows chosen queue");
          check(m_beat == s_beat, "beat passes through");
          check(first == (b == 0), "first beat flag");
          @(posedge clk); #1;
          if (m_ready[want]) break;
        end
        s_valid = 0;
      end
    end
    for (int q = 0; q <= NQ; q++) check(hits[q] > 0, "every class and non-IP seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
