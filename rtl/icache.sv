// icache: direct-mapped, read-only instruction cache.
//
// Feeds the single instruction stream that the scalar core and the vector
// coprocessor share. A lookup is combinational: when the requested word's
// line is present, hit is high in the same cycle and rdata holds the word.
// On a miss the cache reads the whole line from memory through the arbiter
// (one read request, one response) and installs it; the request then hits.
// The missing address is latched, so the requester may change its address
// (a branch redirect) while the fill is under way.
// Size, line length and organisation are this design's choices, since the
// instruction cache is only named: direct-mapped, and its line is as wide as
// the memory port (LINE_B bytes).
//
// Memory port: m_valid/m_addr held until m_ready (read only, m_we = 0);
// the line returns later with m_rvalid/m_rdata.
module icache #(
  parameter int SIZE_B = 4096,
  parameter int LINE_B = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req,
  input  logic [31:0]         addr,
  output logic                hit,
  output logic [31:0]         rdata,
  output logic                m_valid,
  output logic                m_we,
  output logic [31:0]         m_addr,
  output logic [LINE_B*8-1:0] m_wdata,
  input  logic                m_ready,
  input  logic                m_rvalid,
  input  logic [LINE_B*8-1:0] m_rdata,
  output logic                ev_miss
);
  localparam int NLINES = SIZE_B / LINE_B;
  localparam int OFFW   = $clog2(LINE_B);
  localparam int IDXW   = $clog2(NLINES);
  localparam int TAGW   = 32 - OFFW - IDXW;

  logic [LINE_B*8-1:0] data_q [NLINES];
  logic [TAGW-1:0]     tag_q  [NLINES];
  logic [NLINES-1:0]   valid_q;

  logic [IDXW-1:0] idx;
  logic [TAGW-1:0] tag;
  logic [OFFW-3:0] word;
  assign idx  = addr[OFFW +: IDXW];
  assign tag  = addr[31 -: TAGW];
  assign word = addr[OFFW-1:2];

  assign hit   = req && valid_q[idx] && (tag_q[idx] == tag);
  assign rdata = data_q[idx][word*32 +: 32];

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  state_e state;
  logic [31:0] miss_addr;   // line being filled, latched at the miss

  assign m_valid = (state == S_REQ);
  assign m_we    = 1'b0;
  assign m_addr  = {miss_addr[31:OFFW], {OFFW{1'b0}}};
  assign m_wdata = '0;
  assign ev_miss = (state == S_IDLE) && req && !hit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      valid_q   <= '0;
      miss_addr <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req && !hit) begin
          state     <= S_REQ;
          miss_addr <= addr;
        end
        S_REQ:  if (m_ready) state <= S_WAIT;
        S_WAIT: if (m_rvalid) begin
          data_q[miss_addr[OFFW +: IDXW]]  <= m_rdata;
          tag_q[miss_addr[OFFW +: IDXW]]   <= miss_addr[31 -: TAGW];
          valid_q[miss_addr[OFFW +: IDXW]] <= 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
