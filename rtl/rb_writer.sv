// rb_writer: enqueue side of a skip-FIFO's ring buffer.
//
// Packets arrive as AXI4-Stream beats and are written into the packet memory
// sequentially from wr_ptr, so the memory sees one long sequential write
// stream. Layout per packet (see edfr_pkg): header word at wr_ptr, control
// word at wr_ptr+1, data beats from wr_ptr+2. Data beats are written as they
// arrive; the header (which holds the real beat count) and the control word
// (one control byte per beat) are written after the last beat, into the two
// slots reserved in front of the data. Only then is wr_ptr advanced (the
// commit), so the read side never sees a half-written packet.
//
// Admission: on the first beat the packet length in tuser[15:0] gives the
// beat count N. The packet is tail-dropped (all its beats consumed, nothing
// written, drop_pulse for one cycle) when N+2 words do not fit between
// wr_ptr and rd_ptr, or when N is 0 or above MAX_BEATS. A packet that turns
// out longer than its tuser length keeps only its first N beats, the last
// kept one marked tlast.
//
// Pointers are AW+1 bits: AW address bits plus a wrap bit, so full and empty
// are told apart. One cycle per packet is spent deciding; after that one word
// is written per cycle while mem_wr_ready is high. The deadline stamped into
// the header is sampled on that decision cycle.
module rb_writer #(
  parameter int unsigned AW = 23               // 2^AW memory words of 64 bytes
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // packet input
  input  logic                      s_valid,
  output logic                      s_ready,
  input  edfr_pkg::axis_beat_t      s_beat,
  input  edfr_pkg::ts_t             deadline_ts,   // T_now + class deadline
  // pointers
  input  logic [AW:0]               rd_ptr,
  output logic [AW:0]               wr_ptr,        // committed: start of the next packet
  // packet memory write port
  output logic                      mem_wr_valid,
  input  logic                      mem_wr_ready,
  output logic [AW-1:0]             mem_wr_addr,
  output edfr_pkg::word_t           mem_wr_data,
  // events
  output logic                      drop_pulse,
  output logic                      commit_pulse
);
  import edfr_pkg::*;

  typedef enum logic [2:0] {W_IDLE, W_DATA, W_HDR, W_CTRL, W_DROP} wstate_e;

  wstate_e                  state;
  logic [AW:0]              base;            // start of the packet being written
  logic [BEAT_W-1:0]        claim;           // beats admitted from tuser length
  logic [BEAT_W-1:0]        nbeat;           // beats stored so far
  logic [DATA_W-1:0]        ctrl_word;
  logic [TUSER_W-1:0]       tuser_q;
  ts_t                      deadline_q;

  logic [AW:0]              used;
  logic [AW+1:0]            capacity;
  logic [LEN_W-1:0]         want_beats;
  logic                     fits;
  pkt_hdr_t                 hdr;
  logic                     keep_beat, last_kept;

  assign used       = wr_ptr - rd_ptr;
  assign capacity = (AW+2)'(1) << AW;
  assign want_beats = beats_of_len(s_beat.tuser[LEN_W-1:0]);
  assign fits       = (want_beats != 0) && (want_beats <= LEN_W'(MAX_BEATS)) &&
                      ((AW+2)'(want_beats) + (AW+2)'(2) <= capacity - (AW+2)'(used));

  assign keep_beat  = (nbeat < claim);
  assign last_kept  = s_beat.tlast || (nbeat == claim - 1'b1);

  assign hdr = '{nbeats: nbeat, deadline: deadline_q, tuser: tuser_q};

  always_comb begin
    s_ready      = 1'b0;
    mem_wr_valid = 1'b0;
    mem_wr_addr  = '0;
    mem_wr_data  = '0;
    unique case (state)
      W_IDLE: ;
      W_DATA: begin
        mem_wr_valid = s_valid && keep_beat;
        mem_wr_addr  = AW'(base + (AW+1)'(2) + (AW+1)'(nbeat));
        mem_wr_data  = s_beat.tdata;
        s_ready      = keep_beat ? mem_wr_ready : 1'b1;
      end
      W_HDR: begin
        mem_wr_valid = 1'b1;
        mem_wr_addr  = AW'(base);
        mem_wr_data  = DATA_W'(hdr);
      end
      W_CTRL: begin
        mem_wr_valid = 1'b1;
        mem_wr_addr  = AW'(base + 1'b1);
        mem_wr_data  = ctrl_word;
      end
      W_DROP: s_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= W_IDLE;
      wr_ptr       <= '0;
      base         <= '0;
      claim        <= '0;
      nbeat        <= '0;
      ctrl_word    <= '0;
      tuser_q      <= '0;
      deadline_q   <= '0;
      drop_pulse   <= 1'b0;
      commit_pulse <= 1'b0;
    end else begin
      drop_pulse   <= 1'b0;
      commit_pulse <= 1'b0;
      unique case (state)
        W_IDLE: if (s_valid) begin
          base       <= wr_ptr;
          nbeat      <= '0;
          ctrl_word  <= '0;
          tuser_q    <= s_beat.tuser;
          deadline_q <= deadline_ts;
          claim      <= BEAT_W'(want_beats);
          if (fits) begin
            state <= W_DATA;
          end else begin
            state      <= W_DROP;
            drop_pulse <= 1'b1;
          end
        end
        W_DATA: if (s_valid && s_ready) begin
          if (keep_beat) begin
            ctrl_word[nbeat*CTRL_W +: CTRL_W] <= {last_kept, count_of_keep(s_beat.tkeep)};
            nbeat <= nbeat + 1'b1;
          end
          if (s_beat.tlast) state <= W_HDR;
        end
        W_HDR:  if (mem_wr_ready) state <= W_CTRL;
        W_CTRL: if (mem_wr_ready) begin
          wr_ptr       <= base + (AW+1)'(2) + (AW+1)'(nbeat);
          commit_pulse <= 1'b1;
          state        <= W_IDLE;
        end
        W_DROP: if (s_valid && s_beat.tlast) state <= W_IDLE;
        default: state <= W_IDLE;
      endcase
    end
  end
endmodule
