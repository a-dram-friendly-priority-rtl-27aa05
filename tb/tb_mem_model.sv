// tb_mem_model: behavioural model of one packet-memory channel (a DRAM or
// HBM channel behind its controller) for simulation only.
//
// Write requests and read requests are taken on valid && ready. ready is
// high except, when STALL_PCT > 0, on a pseudo-random STALL_PCT percent of
// cycles. A read returns the word as stored when the request was taken, in
// request order, LATENCY cycles later (at most one response per cycle).
// Storage is an associative array, so a 2^23-word address space costs only
// the words actually written. Unwritten words read as zero. While rst_n is
// low, requests are ignored and pending responses are discarded.
module tb_mem_model #(
  parameter int unsigned AW        = 23,
  parameter int unsigned LATENCY   = 20,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 wr_valid,
  output logic                 wr_ready,
  input  logic [AW-1:0]        wr_addr,
  input  edfr_pkg::word_t      wr_data,
  input  logic                 rd_valid,
  output logic                 rd_ready,
  input  logic [AW-1:0]        rd_addr,
  output logic                 rsp_valid,
  output edfr_pkg::word_t      rsp_data
);
  typedef struct {
    edfr_pkg::word_t data;
    longint unsigned due;
  } rsp_t;

  edfr_pkg::word_t mem [longint unsigned];
  rsp_t            pending [$];
  longint unsigned cyc = 0;

  initial begin
    wr_ready  = 1'b1;
    rd_ready  = 1'b1;
    rsp_valid = 1'b0;
    rsp_data  = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) pending.delete();
    if (rst_n && wr_valid && wr_ready) mem[longint'(wr_addr)] = wr_data;
    if (rst_n && rd_valid && rd_ready) begin
      rsp_t r;
      r.data = mem.exists(longint'(rd_addr)) ? mem[longint'(rd_addr)] : '0;
      r.due  = cyc + 64'(LATENCY);
      pending.push_back(r);
    end
    if (pending.size() != 0 && pending[0].due <= cyc) begin
      rsp_valid <= 1'b1;
      rsp_data  <= pending[0].data;
      void'(pending.pop_front());
    end else begin
      rsp_valid <= 1'b0;
    end
    wr_ready <= (STALL_PCT == 0) || (($urandom % 100) >= STALL_PCT);
    rd_ready <= (STALL_PCT == 0) || (($urandom % 100) >= STALL_PCT);
  end
endmodule
