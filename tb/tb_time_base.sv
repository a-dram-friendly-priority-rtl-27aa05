// tb_time_base: checks the microsecond counter and the skip tick period
// against cycle counts kept by the testbench.
module tb_time_base;
  localparam int CPU = 5, SKIP = 7;
  logic clk = 0, rst_n = 0;
  edfr_pkg::ts_t t_now;
  logic tick;
  int checks = 0, failures = 0;
  int cyc, ticks;

  always #5 clk = ~clk;

  time_base #(.CLK_PER_US(CPU), .SKIP_INTERVAL_CYCLES(SKIP)) dut (.clk, .rst_n, .t_now_us(t_now), .skip_tick(tick));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    cyc = 0; ticks = 0;
    // after the reset edge, counters start at 0
    repeat (500) begin
      @(posedge clk); #1;
      cyc++;
      checks++;
      if (t_now != edfr_pkg::ts_t'(cyc / CPU)) begin
        failures++;
        $display("t_now %0d expected %0d at cycle %0d", t_now, cyc / CPU, cyc);
      end
      checks++;
      if (tick != (cyc % SKIP == 0)) begin
        failures++;
        $display("tick %0b wrong at cycle %0d", tick, cyc);
      end
      if (tick) ticks++;
    end
    checks++;
    if (ticks != 500 / SKIP) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
