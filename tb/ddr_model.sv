// ddr_model: behavioural model of the DDR memory behind the line-wide memory
// port, for simulation only. One request is served at a time: the model is
// ready when idle, a write is stored on acceptance, and a read returns its
// line LAT cycles after acceptance with rvalid. Every access keeps the model
// busy for LAT cycles, like a controller that closes the page after each
// access. Memory is NLINES lines, word-addressable from the testbench through
// the wr_word/rd_word functions; addresses wrap at the memory size.
module ddr_model #(
  parameter int LINE_B = 64,
  parameter int NLINES = 4096,
  parameter int LAT    = 8
) (
  input  logic                clk,
  input  logic                m_valid,
  input  logic                m_we,
  input  logic [31:0]         m_addr,
  input  logic [LINE_B*8-1:0] m_wdata,
  output logic                m_ready,
  output logic                m_rvalid,
  output logic [LINE_B*8-1:0] m_rdata
);
  localparam int OFFW = $clog2(LINE_B);
  logic [LINE_B*8-1:0] mem [NLINES];
  int  busy = 0;
  logic rd_pending = 0;
  logic [31:0] rd_addr = 0;
  int  n_reads = 0, n_writes = 0;

  assign m_ready = (busy == 0);

  function automatic int unsigned lidx(input logic [31:0] a);
    return (a >> OFFW) % NLINES;
  endfunction
  function automatic void wr_word(input logic [31:0] a, input logic [31:0] d);
    mem[lidx(a)][((a % LINE_B) / 4) * 32 +: 32] = d;
  endfunction
  function automatic logic [31:0] rd_word(input logic [31:0] a);
    return mem[lidx(a)][((a % LINE_B) / 4) * 32 +: 32];
  endfunction

  initial for (int i = 0; i < NLINES; i++) mem[i] = '0;

  always @(posedge clk) begin
    m_rvalid <= 1'b0;
    if (busy > 0) begin
      busy <= busy - 1;
      if (busy == 1 && rd_pending) begin
        m_rvalid   <= 1'b1;
        m_rdata    <= mem[lidx(rd_addr)];
        rd_pending <= 1'b0;
      end
    end else if (m_valid) begin
      busy <= LAT;
      if (m_we) begin
        mem[lidx(m_addr)] <= m_wdata;
        n_writes++;
      end else begin
        rd_pending <= 1'b1;
        rd_addr    <= m_addr;
        n_reads++;
      end
    end
  end
endmodule
