// vespa_top: the VESPA soft vector processor.
//
// A scalar MIPS core and a vector coprocessor with L lanes share one
// instruction stream from the instruction cache. The scalar core executes
// scalar instructions and forwards vector instructions (with their scalar
// operands) to the coprocessor; the two run out of order with respect to each
// other except for memory operations, which are serialised. Both use one
// direct-mapped data cache; the vector side reaches it through a memory
// crossbar that moves up to M elements of a cache line per cycle, and the
// cache has a sequential prefetcher. An arbiter shares one line-wide port to
// DDR memory between the two caches.
//
// Defaults are the fastest configuration: L = 16 lanes, M = 16 (full
// crossbar), W = 32-bit lanes, MVL = 64, 16 KB data cache with 64-byte lines,
// and vector prefetching of 8 x VL elements (DPV = 8, DPK = 0;
// DPV_BY_VL = 0 makes DPV a constant element count instead). The
// instruction-cache size, branch-table size and queue depth are this design's
// choices.
//
// The DDR controller and memory are outside: m_* is the memory port (request
// held until m_ready, read data returned later with m_rvalid; addresses are
// line-aligned byte addresses, data is one DW-byte line). done rises when
// the core has executed BREAK and the coprocessor has drained; vl is the
// current vector length and events carries one-cycle pulses for counting.
module vespa_top #(
  parameter int          L        = 16,
  parameter int          M        = 16,
  parameter int          W        = 32,
  parameter int          MVL      = 64,
  parameter int          DD_KB    = 16,
  parameter int          DW       = 64,
  parameter int          DPK      = 0,
  parameter int          DPV      = 8,
  parameter bit          DPV_BY_VL = 1'b1,
  parameter int          IC_B     = 4096,
  parameter int          BHT_N    = 64,
  parameter int          QDEPTH   = 4,
  parameter logic [31:0] OP_EN    = '1,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic            clk,
  input  logic            rst_n,
  // DDR memory port
  output logic            m_valid,
  output logic            m_we,
  output logic [31:0]     m_addr,
  output logic [DW*8-1:0] m_wdata,
  input  logic            m_ready,
  input  logic            m_rvalid,
  input  logic [DW*8-1:0] m_rdata,
  // status
  output logic            halted,
  output logic            done,
  output logic [7:0]      vl,
  // one-cycle event pulses, for counting:
  // [0] branch mispredicted        [1] control instruction overlapped vector work
  // [2] vector instruction retired [3] icache miss
  // [4] dcache miss                [5] line prefetched
  // [6] dirty line written back
  output logic [6:0]      events
);
  // instruction fetch
  logic        imem_req, imem_hit;
  logic [31:0] imem_addr, imem_rdata;
  // scalar data port
  logic        s_req, s_we, s_ack;
  logic [31:0] s_addr, s_wdata, s_rdata;
  logic [3:0]  s_be;
  // vector issue
  logic        v_req, v_ready, vmem_busy, v_idle;
  logic [31:0] v_instr, v_rs, v_rt;
  // vector line port
  logic            vd_req, vd_we, vd_ack;
  logic [31:0]     vd_addr, vd_stride_bytes;
  logic [DW*8-1:0] vd_wdata;
  logic [DW-1:0]   vd_wmask;
  logic [7:0]      vd_vl;
  // data cache port
  logic            c_req, c_we, c_ack, c_pf_vec;
  logic [31:0]     c_addr, c_pf_stride_bytes;
  logic [DW*8-1:0] c_wdata, c_rdata;
  logic [DW-1:0]   c_wmask;
  logic [7:0]      c_pf_vl;
  // arbiter masters: 0 icache, 1 dcache
  logic [1:0]      a_valid, a_we, a_ready, a_rvalid;
  logic [31:0]     a_addr  [2];
  logic [DW*8-1:0] a_wdata [2];
  logic [DW*8-1:0] a_rdata;
  // events (visible to a testbench)
  logic ev_mispredict, ev_ctrl_overlap, ev_vdone;
  logic ev_imiss, ev_dmiss, ev_prefetch, ev_writeback;

  scalar_mips #(.RESET_PC(RESET_PC), .BHT_ENTRIES(BHT_N)) u_scalar (
    .clk          (clk),
    .rst_n        (rst_n),
    .imem_req     (imem_req),
    .imem_addr    (imem_addr),
    .imem_hit     (imem_hit),
    .imem_rdata   (imem_rdata),
    .dreq         (s_req),
    .dwe          (s_we),
    .daddr        (s_addr),
    .dwdata       (s_wdata),
    .dbe          (s_be),
    .dack         (s_ack),
    .drdata       (s_rdata),
    .vreq         (v_req),
    .vinstr       (v_instr),
    .vrs_val      (v_rs),
    .vrt_val      (v_rt),
    .vready       (v_ready),
    .vmem_busy    (vmem_busy),
    .halted       (halted),
    .ev_mispredict(ev_mispredict)
  );

  vector_coproc #(.L(L), .M(M), .W(W), .MVL(MVL), .LINE_B(DW), .QDEPTH(QDEPTH),
                  .OP_EN(OP_EN)) u_vector (
    .clk            (clk),
    .rst_n          (rst_n),
    .in_valid       (v_req),
    .in_instr       (v_instr),
    .in_rs          (v_rs),
    .in_rt          (v_rt),
    .in_ready       (v_ready),
    .vmem_busy      (vmem_busy),
    .idle           (v_idle),
    .dc_req         (vd_req),
    .dc_we          (vd_we),
    .dc_addr        (vd_addr),
    .dc_wdata       (vd_wdata),
    .dc_wmask       (vd_wmask),
    .dc_vl          (vd_vl),
    .dc_stride_bytes(vd_stride_bytes),
    .dc_ack         (vd_ack),
    .dc_rdata       (c_rdata),
    .vl_o           (vl),
    .ev_ctrl_overlap(ev_ctrl_overlap),
    .ev_vdone       (ev_vdone)
  );

  dport_mux #(.LINE_B(DW)) u_dmux (
    .clk              (clk),
    .rst_n            (rst_n),
    .s_req            (s_req),
    .s_we             (s_we),
    .s_addr           (s_addr),
    .s_wdata          (s_wdata),
    .s_be             (s_be),
    .s_ack            (s_ack),
    .s_rdata          (s_rdata),
    .v_req            (vd_req),
    .v_we             (vd_we),
    .v_addr           (vd_addr),
    .v_wdata          (vd_wdata),
    .v_wmask          (vd_wmask),
    .v_vl             (vd_vl),
    .v_stride_bytes   (vd_stride_bytes),
    .v_ack            (vd_ack),
    .c_req            (c_req),
    .c_we             (c_we),
    .c_addr           (c_addr),
    .c_wdata          (c_wdata),
    .c_wmask          (c_wmask),
    .c_pf_vec         (c_pf_vec),
    .c_pf_vl          (c_pf_vl),
    .c_pf_stride_bytes(c_pf_stride_bytes),
    .c_ack            (c_ack),
    .c_rdata          (c_rdata)
  );

  icache #(.SIZE_B(IC_B), .LINE_B(DW)) u_icache (
    .clk     (clk),
    .rst_n   (rst_n),
    .req     (imem_req),
    .addr    (imem_addr),
    .hit     (imem_hit),
    .rdata   (imem_rdata),
    .m_valid (a_valid[0]),
    .m_we    (a_we[0]),
    .m_addr  (a_addr[0]),
    .m_wdata (a_wdata[0]),
    .m_ready (a_ready[0]),
    .m_rvalid(a_rvalid[0]),
    .m_rdata (a_rdata),
    .ev_miss (ev_imiss)
  );

  dcache #(.SIZE_KB(DD_KB), .LINE_B(DW), .DPK(DPK), .DPV(DPV),
          .DPV_BY_VL(DPV_BY_VL)) u_dcache (
    .clk            (clk),
    .rst_n          (rst_n),
    .req            (c_req),
    .we             (c_we),
    .addr           (c_addr),
    .wdata          (c_wdata),
    .wmask          (c_wmask),
    .pf_vec         (c_pf_vec),
    .pf_vl          (c_pf_vl),
    .pf_stride_bytes(c_pf_stride_bytes),
    .ack            (c_ack),
    .rdata          (c_rdata),
    .m_valid        (a_valid[1]),
    .m_we           (a_we[1]),
    .m_addr         (a_addr[1]),
    .m_wdata        (a_wdata[1]),
    .m_ready        (a_ready[1]),
    .m_rvalid       (a_rvalid[1]),
    .m_rdata        (a_rdata),
    .ev_miss        (ev_dmiss),
    .ev_prefetch    (ev_prefetch),
    .ev_writeback   (ev_writeback)
  );

  mem_arbiter #(.LINE_B(DW)) u_arb (
    .clk     (clk),
    .rst_n   (rst_n),
    .s_valid (a_valid),
    .s_we    (a_we),
    .s_addr  (a_addr),
    .s_wdata (a_wdata),
    .s_ready (a_ready),
    .s_rvalid(a_rvalid),
    .s_rdata (a_rdata),
    .m_valid (m_valid),
    .m_we    (m_we),
    .m_addr  (m_addr),
    .m_wdata (m_wdata),
    .m_ready (m_ready),
    .m_rvalid(m_rvalid),
    .m_rdata (m_rdata)
  );

  assign done   = halted && v_idle;
  assign events = {ev_writeback, ev_prefetch, ev_dmiss, ev_imiss,
                   ev_vdone, ev_ctrl_overlap, ev_mispredict};
endmodule
