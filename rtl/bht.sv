// bht: 1-bit branch history table of the scalar pipeline.
//
// Each entry remembers whether the last branch that mapped to it was taken,
// and that outcome is the prediction for the next branch that maps there.
// The table is indexed by word address bits of the branch PC. The 1-bit
// scheme is the scalar core's; the number of entries and the index function
// are this design's choice.
//
// Interface: rd_pc -> pred_taken (combinational read);
//            upd_en/upd_pc/upd_taken write one entry on the clock edge.
// All entries reset to "not taken".
module bht #(
  parameter int ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] rd_pc,
  output logic        pred_taken,
  input  logic        upd_en,
  input  logic [31:0] upd_pc,
  input  logic        upd_taken
);
  localparam int IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0] hist_q;

  function automatic logic [IW-1:0] index(input logic [31:0] pc);
    return IW'(pc[31:2] % ENTRIES);
  endfunction

  assign pred_taken = hist_q[index(rd_pc)];

  always_ff @(posedge clk) begin
    if (!rst_n) hist_q <= '0;
    else if (upd_en) hist_q[index(upd_pc)] <= upd_taken;
  end
endmodule
