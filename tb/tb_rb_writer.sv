// tb_rb_writer: sends packets of random length into the ring-buffer writer
// with random input gaps and memory stalls, and checks, for every packet, the
// header, control and data words in memory and the committed wr_ptr against
// a reference layout. The read pointer is held still for a while so that
// the ring fills and packets are tail-dropped, then released.
module tb_rb_writer;
  import edfr_pkg::*;
  localparam int AW = 6;
  localparam int RING = 1 << AW;

  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_ready;
  axis_beat_t s_beat = '0;
  ts_t deadline = 0;
  logic [AW:0] rd_ptr = 0, wr_ptr;
  logic mem_wr_valid, mem_wr_ready = 1;
  logic [AW-1:0] mem_wr_addr;
  word_t mem_wr_data;
  logic drop_pulse, commit_pulse;
  word_t mem [RING];
  int checks = 0, failures = 0, drops = 0, commits = 0, exp_drops = 0;
  logic [AW:0] ref_wr = 0;

  always #5 clk = ~clk;

  rb_writer #(.AW(AW)) dut (.clk, .rst_n, .s_valid, .s_ready, .s_beat, .deadline_ts(deadline),
    .rd_ptr, .wr_ptr, .mem_wr_valid, .mem_wr_ready, .mem_wr_addr, .mem_wr_data,
    .drop_pulse, .commit_pulse);

  always @(posedge clk) begin
    if (mem_wr_valid && mem_wr_ready) mem[mem_wr_addr] <= mem_wr_data;
    if (drop_pulse) drops++;
    if (commit_pulse) commits++;
    mem_wr_ready <= ($urandom % 4) != 0;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t pat(int pkt, int b);
    word_t w;
    for (int i = 0; i < DATA_W / 32; i++) w[i*32 +: 32] = 32'(pkt * 1000 + b * 37 + i);
    return w;
  endfunction

  task automatic send(int pkt, int len);
    int nb, used, before_drops, before_commits;
    bit expect_drop;
    nb = (len + 63) / 64;
    begin logic [AW:0] u; u = ref_wr - rd_ptr; used = int'(u); end
    expect_drop = (nb == 0) || (nb > MAX_BEATS) || (nb + 2 > RING - used);
    before_drops = drops; before_commits = commits;
    deadline = 32'(pkt * 11 + 5);
    for (int b = 0; b < (nb == 0 ? 1 : nb); b++) begin
      while (($urandom % 3) == 0) @(posedge clk);
      #1;
      s_valid = 1;
      s_beat.tdata = pat(pkt, b);
      s_beat.tuser = {112'(pkt), 16'(len)};
      s_beat.tlast = (b == nb - 1) || (nb == 0);
      s_beat.tkeep = (b == nb - 1) ? keep_of_count(7'((len - 1) % 64)) : '1;
      while (!s_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      s_valid = 0;
    end
    for (int t = 0; t < 40 && drops == before_drops && commits == before_commits; t++) @(posedge clk);
    @(posedge clk);
    if (expect_drop) begin
      exp_drops++;
      check(drops == before_drops + 1 && commits == before_commits, $sformatf("pkt %0d should drop", pkt));
      check(wr_ptr == ref_wr, "wr_ptr unchanged on drop");
    end else begin
      pkt_hdr_t h;
      logic [AW-1:0] base;
      base = AW'(ref_wr);
      h = pkt_hdr_t'(mem[base][HDR_W-1:0]);
      check(commits == before_commits + 1, $sformatf("pkt %0d should commit", pkt));
      check(h.nbeats == BEAT_W'(nb), "header beats");
      check(h.deadline == deadline, "header deadline");
      check(h.tuser == {112'(pkt), 16'(len)}, "header tuser");
      for (int b = 0; b < nb; b++) begin
        logic [7:0] cb;
        cb = mem[AW'(base + 1)][b*8 +: 8];
        check(cb == {b == nb - 1, 7'((b == nb - 1) ? (len - 1) % 64 : 63)}, $sformatf("ctrl byte %0d", b));
        check(mem[AW'(int'(base) + 2 + b)] == pat(pkt, b), $sformatf("data pkt %0d beat %0d", pkt, b));
      end
      ref_wr = ref_wr + (AW+1)'(nb + 2);
      check(wr_ptr == ref_wr, "wr_ptr after commit");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // phase 1: reader stalled, ring fills up
    for (int p = 0; p < 20; p++) send(p, 1 + $urandom % 600);
    // phase 2: reader keeps up, wrap around the ring many times
    for (int p = 20; p < 200; p++) begin
      rd_ptr = ref_wr - (AW+1)'($urandom % 8);
      
      send(p, (p % 10 == 0) ? 64 * (1 + $urandom % 4) : 1 + $urandom % 700);
    end
    check(exp_drops > 0, "tail drop happened");
    check(drops == exp_drops, "drop count");
    $display("drops=%0d commits=%0d", drops, commits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
