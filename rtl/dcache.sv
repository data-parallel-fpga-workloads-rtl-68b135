// dcache: direct-mapped, write-back, write-allocate data cache with a
// sequential prefetcher, shared by the scalar core and the vector unit.
//
// The cache is DD kilobytes deep with DW-byte lines (defaults 16 KB and 64 B,
// the configuration of the fastest and of the most area-efficient VESPA). All
// accesses are whole-line: a read returns the full line, and a write carries a
// line of data with one enable bit per byte, so a vector access can move up to
// a full line in one cycle while the scalar core writes one word.
//
// Timing: a hit is acknowledged in the same cycle the request is seen (ack is
// combinational, rdata is valid with it, write data is stored on that edge).
// A miss starts a fill sequence: the missing line and then n_extra following
// lines (from the prefetcher) are each looked up; a line already present is
// skipped, otherwise a dirty victim is first written back and the line is read
// from memory. The requester keeps its request up and gets its hit once the
// whole sequence is done; the cache serves nothing else meanwhile (a blocking
// cache, this design's choice).
//
// Dirty-line buffer: a dirty line evicted by a prefetched line is not written
// back inside the fill sequence but copied, in the lookup cycle, into a
// WB_N-entry buffer, so the sequence goes straight on to the next read. The
// buffer is emptied to memory whenever the fill machine is idle, while the
// cache keeps serving hits. A new miss waits until the buffer is empty, so a
// line is never read from memory while a newer copy of it is still buffered.
// A dirty line evicted by the demand line, or any victim when the buffer is
// full, is written back in place (one extra memory write before the read).
// Buffering the victims of prefetches follows the design; the buffer depth
// and the drain-before-miss rule are this design's choices.
//
// Memory port: m_valid held until m_ready; writes complete on acceptance,
// reads return later with m_rvalid. A buffer drain is not requested while
// rst_n is low, so the unreset buffer state cannot write to memory.
module dcache #(
  parameter int SIZE_KB = 16,
  parameter int LINE_B  = 64,
  parameter int DPK     = 0,
  parameter int DPV     = 8,
  parameter bit DPV_BY_VL = 1'b1,
  parameter int WB_N    = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  // request port
  input  logic                req,
  input  logic                we,
  input  logic [31:0]         addr,
  input  logic [LINE_B*8-1:0] wdata,
  input  logic [LINE_B-1:0]   wmask,
  input  logic                pf_vec,
  input  logic [7:0]          pf_vl,
  input  logic [31:0]         pf_stride_bytes,
  output logic                ack,
  output logic [LINE_B*8-1:0] rdata,
  // memory port
  output logic                m_valid,
  output logic                m_we,
  output logic [31:0]         m_addr,
  output logic [LINE_B*8-1:0] m_wdata,
  input  logic                m_ready,
  input  logic                m_rvalid,
  input  logic [LINE_B*8-1:0] m_rdata,
  // events
  output logic                ev_miss,
  output logic                ev_prefetch,
  output logic                ev_writeback
);
  localparam int NLINES = SIZE_KB * 1024 / LINE_B;
  localparam int OFFW   = $clog2(LINE_B);
  localparam int IDXW   = $clog2(NLINES);
  localparam int TAGW   = 32 - OFFW - IDXW;
  localparam int LNW    = 32 - OFFW;   // line-number width

  logic [LINE_B*8-1:0] data_q  [NLINES];
  logic [TAGW-1:0]     tag_q   [NLINES];
  logic [NLINES-1:0]   valid_q;
  logic [NLINES-1:0]   dirty_q;

  // dirty-line buffer (FIFO of evicted lines: line number and data)
  localparam int WBW = (WB_N > 1) ? $clog2(WB_N) : 1;
  logic [LNW-1:0]      wb_line [WB_N];
  logic [LINE_B*8-1:0] wb_data [WB_N];
  logic [WBW-1:0]      wb_rp, wb_wp;
  logic [WBW:0]        wb_cnt;
  logic                wb_push, wb_pop, wb_empty, wb_full;
  assign wb_empty = (wb_cnt == '0);
  assign wb_full  = (wb_cnt == (WBW+1)'(WB_N));

  logic [IDXW-1:0] idx;
  logic [TAGW-1:0] tag;
  logic            hit;
  assign idx = addr[OFFW +: IDXW];
  assign tag = addr[31 -: TAGW];
  assign hit = valid_q[idx] && (tag_q[idx] == tag);

  logic [15:0] n_extra;
  prefetcher #(.LINE_B(LINE_B), .NLINES(NLINES), .DPK(DPK), .DPV(DPV),
               .DPV_BY_VL(DPV_BY_VL)) u_pf (
    .is_vec      (pf_vec),
    .vl          (pf_vl),
    .stride_bytes(pf_stride_bytes),
    .n_extra     (n_extra)
  );

  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WB, S_FILL, S_WAIT} state_e;
  state_e state;

  logic [LNW-1:0]  cur_line;     // line number being brought in
  logic [15:0]     remaining;    // lines still to look at after cur_line
  logic            demand;       // cur_line is the line that missed
  logic [IDXW-1:0] cidx;
  logic [TAGW-1:0] ctag;
  assign cidx = cur_line[IDXW-1:0];
  assign ctag = cur_line[LNW-1 -: TAGW];

  assign ack   = (state == S_IDLE) && req && hit;
  assign rdata = data_q[idx];

  always_comb begin
    m_valid = 1'b0;
    m_we    = 1'b0;
    m_addr  = {cur_line, {OFFW{1'b0}}};
    m_wdata = data_q[cidx];
    if (state == S_WB) begin
      m_valid = 1'b1;
      m_we    = 1'b1;
      m_addr  = {tag_q[cidx], cidx, {OFFW{1'b0}}};
    end else if (state == S_FILL) begin
      m_valid = 1'b1;
    end else if (state == S_IDLE && !wb_empty) begin
      m_valid = rst_n;   // no request while the registers are being reset
      m_we    = 1'b1;
      m_addr  = {wb_line[wb_rp], {OFFW{1'b0}}};
      m_wdata = wb_data[wb_rp];
    end
  end

  // the victim of a prefetched line goes to the buffer if there is room
  assign wb_push = (state == S_LOOK) && !(valid_q[cidx] && tag_q[cidx] == ctag) &&
                   valid_q[cidx] && dirty_q[cidx] && !demand && !wb_full;
  assign wb_pop  = (state == S_IDLE) && !wb_empty && m_ready;

  assign ev_miss      = (state == S_IDLE) && req && !hit && wb_empty;
  assign ev_prefetch  = (state == S_WAIT) && m_rvalid && !demand;
  assign ev_writeback = ((state == S_WB) || wb_pop) && m_ready;

  logic last;
  assign last = (remaining == 16'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      valid_q   <= '0;
      dirty_q   <= '0;
      cur_line  <= '0;
      remaining <= '0;
      demand    <= 1'b0;
      wb_rp     <= '0;
      wb_wp     <= '0;
      wb_cnt    <= '0;
    end else begin
      if (wb_push) begin
        wb_line[wb_wp] <= {tag_q[cidx], cidx};
        wb_data[wb_wp] <= data_q[cidx];
        wb_wp          <= (wb_wp == WBW'(WB_N-1)) ? '0 : wb_wp + 1'b1;
      end
      if (wb_pop) wb_rp <= (wb_rp == WBW'(WB_N-1)) ? '0 : wb_rp + 1'b1;
      wb_cnt <= wb_cnt + (WBW+1)'(wb_push) - (WBW+1)'(wb_pop);
      unique case (state)
        S_IDLE: begin
          if (req && hit && we) begin
            for (int b = 0; b < LINE_B; b++)
              if (wmask[b]) data_q[idx][b*8 +: 8] <= wdata[b*8 +: 8];
            dirty_q[idx] <= 1'b1;
          end else if (req && !hit && wb_empty) begin
            cur_line  <= addr[31:OFFW];
            remaining <= n_extra;
            demand    <= 1'b1;
            state     <= S_LOOK;
          end
        end
        S_LOOK: begin
          if (valid_q[cidx] && tag_q[cidx] == ctag) begin
            // already present (only possible for a prefetch line)
            if (last) state <= S_IDLE;
            else begin
              cur_line  <= cur_line + 1'b1;
              remaining <= remaining - 1'b1;
              demand    <= 1'b0;
            end
          end else if (wb_push) begin
            dirty_q[cidx] <= 1'b0;
            state         <= S_FILL;
          end else if (valid_q[cidx] && dirty_q[cidx]) begin
            state <= S_WB;
          end else begin
            state <= S_FILL;
          end
        end
        S_WB: if (m_ready) begin
          dirty_q[cidx] <= 1'b0;
          state         <= S_FILL;
        end
        S_FILL: if (m_ready) state <= S_WAIT;
        S_WAIT: if (m_rvalid) begin
          data_q[cidx]  <= m_rdata;
          tag_q[cidx]   <= ctag;
          valid_q[cidx] <= 1'b1;
          dirty_q[cidx] <= 1'b0;
          if (last) state <= S_IDLE;
          else begin
            cur_line  <= cur_line + 1'b1;
            remaining <= remaining - 1'b1;
            demand    <= 1'b0;
            state     <= S_LOOK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request must hold still until it is acknowledged.
  property p_req_held;
    @(posedge clk) disable iff (!rst_n) (req && !ack) |=> (req && $stable(addr) && $stable(we));
  endproperty
  assert property (p_req_held);
  // The dirty-line buffer never overflows.
  assert property (@(posedge clk) disable iff (!rst_n) wb_full |-> !wb_push);
endmodule
