// dport_mux: joins the scalar core's word port and the vector unit's line
// port onto the single request port of the shared data cache.
//
// The scalar word request is widened to a line request: the word is copied to
// every word slot of the line and the byte enables are placed at the word's
// position; on a read the word is picked out of the returned line. The two
// units never request at once, since the scalar core holds its memory
// accesses while vector memory work is pending (an assertion checks this);
// if they did, the vector request would win. Only vector requests carry
// prefetch information (vector length and byte stride).
module dport_mux #(
  parameter int LINE_B = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  // scalar word port
  input  logic                s_req,
  input  logic                s_we,
  input  logic [31:0]         s_addr,
  input  logic [31:0]         s_wdata,
  input  logic [3:0]          s_be,
  output logic                s_ack,
  output logic [31:0]         s_rdata,
  // vector line port
  input  logic                v_req,
  input  logic                v_we,
  input  logic [31:0]         v_addr,
  input  logic [LINE_B*8-1:0] v_wdata,
  input  logic [LINE_B-1:0]   v_wmask,
  input  logic [7:0]          v_vl,
  input  logic [31:0]         v_stride_bytes,
  output logic                v_ack,
  // data cache
  output logic                c_req,
  output logic                c_we,
  output logic [31:0]         c_addr,
  output logic [LINE_B*8-1:0] c_wdata,
  output logic [LINE_B-1:0]   c_wmask,
  output logic                c_pf_vec,
  output logic [7:0]          c_pf_vl,
  output logic [31:0]         c_pf_stride_bytes,
  input  logic                c_ack,
  input  logic [LINE_B*8-1:0] c_rdata
);
  localparam int OFFW = $clog2(LINE_B);
  localparam int NW   = LINE_B / 4;

  logic [OFFW-3:0] wsel;
  assign wsel = s_addr[OFFW-1:2];

  always_comb begin
    if (v_req) begin
      c_req             = 1'b1;
      c_we              = v_we;
      c_addr            = v_addr;
      c_wdata           = v_wdata;
      c_wmask           = v_wmask;
      c_pf_vec          = 1'b1;
      c_pf_vl           = v_vl;
      c_pf_stride_bytes = v_stride_bytes;
    end else begin
      c_req             = s_req;
      c_we              = s_we;
      c_addr            = s_addr;
      c_wdata           = {NW{s_wdata}};
      c_wmask           = LINE_B'(s_be) << (int'(wsel) * 4);
      c_pf_vec          = 1'b0;
      c_pf_vl           = '0;
      c_pf_stride_bytes = '0;
    end
  end

  assign v_ack   = v_req && c_ack;
  assign s_ack   = !v_req && s_req && c_ack;
  assign s_rdata = c_rdata[int'(wsel)*32 +: 32];

  assert property (@(posedge clk) disable iff (!rst_n) !(s_req && v_req));
endmodule
