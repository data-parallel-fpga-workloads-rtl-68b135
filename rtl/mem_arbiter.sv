// mem_arbiter: shares the single DDR memory port between the instruction
// cache (master 0) and the data cache (master 1).
//
// Both caches use the same line-wide port: a request (valid, write enable,
// line address, write data) is held until ready; a read returns its line
// later with rvalid. The arbiter grants the port round-robin when both
// request, forwards the winner's request, and for a read keeps the port
// locked until the response has been returned to that master, so only one
// read is outstanding at a time. The arbitration policy is this design's
// choice; the arbiter itself is only named. The read data bus goes to both
// masters unchanged (only rvalid is steered), and no request reaches memory
// while rst_n is low.
module mem_arbiter #(
  parameter int LINE_B = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  // masters
  input  logic [1:0]          s_valid,
  input  logic [1:0]          s_we,
  input  logic [31:0]         s_addr  [2],
  input  logic [LINE_B*8-1:0] s_wdata [2],
  output logic [1:0]          s_ready,
  output logic [1:0]          s_rvalid,
  output logic [LINE_B*8-1:0] s_rdata,
  // memory
  output logic                m_valid,
  output logic                m_we,
  output logic [31:0]         m_addr,
  output logic [LINE_B*8-1:0] m_wdata,
  input  logic                m_ready,
  input  logic                m_rvalid,
  input  logic [LINE_B*8-1:0] m_rdata
);
  logic busy;      // a read is outstanding
  logic owner;     // master of the outstanding read
  logic last;      // last master granted
  logic sel;

  always_comb begin
    if (s_valid[0] && s_valid[1]) sel = !last;
    else                          sel = s_valid[1];
  end

  assign m_valid = rst_n && !busy && s_valid[sel];
  assign m_we    = s_we[sel];
  assign m_addr  = s_addr[sel];
  assign m_wdata = s_wdata[sel];

  always_comb begin
    s_ready  = '0;
    s_rvalid = '0;
    if (!busy) s_ready[sel] = m_ready && s_valid[sel];
    if (busy && m_rvalid) s_rvalid[owner] = 1'b1;
  end
  assign s_rdata = m_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      owner <= 1'b0;
      last  <= 1'b0;
    end else begin
      if (m_valid && m_ready) begin
        last <= sel;
        if (!m_we) begin
          busy  <= 1'b1;
          owner <= sel;
        end
      end else if (busy && m_rvalid) begin
        busy <= 1'b0;
      end
    end
  end

  // A read response only arrives for an outstanding read.
  assert property (@(posedge clk) disable iff (!rst_n) m_rvalid |-> busy);
endmodule
