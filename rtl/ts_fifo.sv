// ts_fifo: the timestamp FIFO of a skip-FIFO.
//
// Each entry pairs a ring-buffer pointer (elapsed_ptr, the write pointer at
// the moment the entry was made) with the deadline T_deadline = T_now +
// class deadline of that moment. Entries are pushed at each skip tick and
// popped by the skip logic once their deadline has passed or their pointer
// is stale. The storage is a 2^DEPTH_LOG2 array written and read in the
// same clock (block-RAM style, synchronous read) followed by an output
// register that presents the oldest entry (first-word fall-through): head_*
// is valid while head_valid is high and pop takes it. A push into an empty
// FIFO reaches the head one cycle later. A push while full is refused
// (full is high); the caller counts that as an overflow.
module ts_fifo #(
  parameter int unsigned PTR_W      = 24,  // ring pointer width incl. wrap bit
  parameter int unsigned DEPTH_LOG2 = 14   // 2^14 entries
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 push,
  input  logic [PTR_W-1:0]     push_ptr,
  input  edfr_pkg::ts_t        push_deadline,
  output logic                 full,
  output logic                 head_valid,
  output logic [PTR_W-1:0]     head_ptr,
  output edfr_pkg::ts_t        head_deadline,
  input  logic                 pop,
  output logic [DEPTH_LOG2:0]  count          // entries held, head register included
);
  typedef struct packed {
    logic [PTR_W-1:0] ptr;
    edfr_pkg::ts_t    deadline;
  } entry_t;

  localparam int unsigned DEPTH = 1 << DEPTH_LOG2;

  entry_t                mem [DEPTH];
  logic [DEPTH_LOG2-1:0] wr_idx, rd_idx;
  logic [DEPTH_LOG2:0]   mem_cnt;
  entry_t                head_q;
  logic                  do_push, take, from_mem, bypass;

  assign full     = (mem_cnt == (DEPTH_LOG2+1)'(DEPTH));
  assign do_push  = push && !full;
  // The head register is (re)loaded when it is empty or being popped.
  assign take     = !head_valid || pop;
  assign from_mem = take && (mem_cnt != 0);
  assign bypass   = take && (mem_cnt == 0) && do_push;

  always_ff @(posedge clk) begin
    if (do_push && !bypass) mem[wr_idx] <= '{ptr: push_ptr, deadline: push_deadline};
    if (from_mem)           head_q <= mem[rd_idx];
    else if (bypass)        head_q <= '{ptr: push_ptr, deadline: push_deadline};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_idx     <= '0;
      rd_idx     <= '0;
      mem_cnt    <= '0;
      head_valid <= 1'b0;
    end else begin
      if (do_push && !bypass) wr_idx <= wr_idx + 1'b1;
      if (from_mem)           rd_idx <= rd_idx + 1'b1;
      mem_cnt <= mem_cnt + (DEPTH_LOG2+1)'(do_push && !bypass) - (DEPTH_LOG2+1)'(from_mem);
      if (take) head_valid <= from_mem || bypass;
    end
  end

  assign head_ptr      = head_q.ptr;
  assign head_deadline = head_q.deadline;
  assign count         = mem_cnt + (DEPTH_LOG2+1)'(head_valid);
endmodule
