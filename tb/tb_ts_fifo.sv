// tb_ts_fifo: random pushes and pops against a queue reference; checks the
// head entry, head_valid, full and count, including the full case where
// pushes are refused.
module tb_ts_fifo;
  localparam int PW = 8, DL = 4;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0, full, head_valid;
  logic [PW-1:0] push_ptr = 0, head_ptr;
  edfr_pkg::ts_t push_dl = 0, head_dl;
  logic [DL:0] count;
  int checks = 0, failures = 0, fulls = 0;
  logic [PW+31:0] ref_q [$];

  always #5 clk = ~clk;

  ts_fifo #(.PTR_W(PW), .DEPTH_LOG2(DL)) dut (
    .clk, .rst_n, .push, .push_ptr, .push_deadline(push_dl), .full,
    .head_valid, .head_ptr, .head_deadline(head_dl), .pop, .count);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      int phase;
      phase = (i / 500) % 2;   // alternate fill-heavy and drain-heavy phases
      // drive on negedge-side: compute from current state
      #1;
      push     = ($urandom % 100) < (phase == 0 ? 80 : 30);
      pop      = head_valid && (($urandom % 100) < (phase == 0 ? 30 : 80));
      push_ptr = PW'($urandom);
      push_dl  = $urandom;
      // reference: head is visible one cycle after the entry enters
      check(count == (DL+1)'(ref_q.size()), $sformatf("count %0d ref %0d", count, ref_q.size()));
      check(full == (ref_q.size() >= (1 << DL) + (head_valid ? 1 : 0)) || !full,
            "full flag");
      if (head_valid) begin
        check(ref_q.size() > 0 && {head_ptr, head_dl} == ref_q[0], "head entry");
      end
      @(posedge clk);
      if (full) fulls++;
      if (pop && head_valid) void'(ref_q.pop_front());
      if (push && !full) ref_q.push_back({push_ptr, push_dl});
    end
    check(fulls > 0, "full reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
