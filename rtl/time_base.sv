// time_base: the scheduler's notion of time.
//
// t_now_us is T_now, a free-running microsecond count, advanced once every
// CLK_PER_US clock cycles (250 at the 250 MHz scheduler clock). skip_tick is
// a one-cycle pulse every SKIP_INTERVAL_CYCLES cycles; at each pulse every
// skip-FIFO records its write pointer and deadline in its timestamp FIFO.
// The default interval is 200 ms / 2^14 (about 12 us) at 250 MHz, i.e. 3052
// cycles, so a timestamp FIFO of 2^14 entries spans 200 ms of arrivals.
// Both counters restart from zero at reset (active-low, synchronous).
module time_base #(
  parameter int unsigned CLK_PER_US           = 250,
  parameter int unsigned SKIP_INTERVAL_CYCLES = 3052
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output edfr_pkg::ts_t         t_now_us,
  output logic                  skip_tick
);
  localparam int PW = $clog2(CLK_PER_US + 1);
  localparam int SW = $clog2(SKIP_INTERVAL_CYCLES + 1);

  logic [PW-1:0] us_div;
  logic [SW-1:0] skip_div;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      us_div    <= '0;
      skip_div  <= '0;
      t_now_us  <= '0;
      skip_tick <= 1'b0;
    end else begin
      if (us_div == PW'(CLK_PER_US - 1)) begin
        us_div   <= '0;
        t_now_us <= t_now_us + 1'b1;
      end else begin
        us_div <= us_div + 1'b1;
      end
      if (skip_div == SW'(SKIP_INTERVAL_CYCLES - 1)) begin
        skip_div  <= '0;
        skip_tick <= 1'b1;
      end else begin
        skip_div  <= skip_div + 1'b1;
        skip_tick <= 1'b0;
      end
    end
  end
endmodule
