// word_fifo: small synchronous FIFO of memory words, used by the ring-buffer
// reader as its prefetch buffer. First-word fall-through: dout is the oldest
// word whenever empty is low, and pop removes it. flush empties the FIFO in
// one cycle (a push in the same cycle is discarded). Pushing while full or
// popping while empty is a caller error and is checked by assertions.
module word_fifo #(
  parameter int unsigned W          = 512,
  parameter int unsigned DEPTH_LOG2 = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 flush,
  input  logic                 push,
  input  logic [W-1:0]         din,
  input  logic                 pop,
  output logic [W-1:0]         dout,
  output logic                 empty,
  output logic [DEPTH_LOG2:0]  count
);
  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;

  logic [W-1:0]          mem [DEPTH];
  logic [DEPTH_LOG2-1:0] wr_idx, rd_idx;

  assign empty = (count == 0);
  assign dout  = mem[rd_idx];

  always_ff @(posedge clk) begin
    if (push && !flush) mem[wr_idx] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      wr_idx <= '0;
      rd_idx <= '0;
      count  <= '0;
    end else begin
      if (push) wr_idx <= wr_idx + 1'b1;
      if (pop)  rd_idx <= rd_idx + 1'b1;
      count <= count + (DEPTH_LOG2+1)'(push) - (DEPTH_LOG2+1)'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n || flush)
                                   push && !pop |-> count != (DEPTH_LOG2+1)'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                   pop |-> !empty);
endmodule
