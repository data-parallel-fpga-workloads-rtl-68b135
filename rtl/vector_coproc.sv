// vector_coproc: the vector coprocessor of VESPA.
//
// Vector instructions arrive from the scalar core, in program order, with the
// values of the scalar registers they name. Inside, two pipelines run
// decoupled from each other:
//  * the vector-control pipeline executes control instructions (set vector
//    length, set stride) the cycle they arrive, even while vector work is
//    still queued or running, so loop bookkeeping overlaps vector execution;
//  * the vector pipeline takes vector instructions from a QDEPTH-entry queue,
//    one at a time. Each queued instruction keeps a copy of the vector length
//    and stride in force when it arrived, which keeps the program's order
//    of control and vector instructions correct.
// An ALU instruction is sequenced over element groups: group g sends entry g
// to all L lanes, with lane j active when g*L + j < VL, so it takes
// ceil(VL/L) cycles plus one cycle to drain the lanes' two-stage pipeline
// before the next instruction starts (one vector instruction in flight). A
// load or store is handed to the vector memory unit, which moves up to M
// elements per cycle between a data-cache line and the lanes through the
// memory crossbar.
//
// VL is clamped to MVL. vmem_busy is high while a vector load or store is
// queued or running; the scalar core holds its own memory accesses until it
// drops. Queue depth and the one-cycle drain are this design's choices.
module vector_coproc
  import vespa_pkg::*;
#(
  parameter int          L      = 16,
  parameter int          M      = 16,
  parameter int          W      = 32,
  parameter int          MVL    = 64,
  parameter int          LINE_B = 64,
  parameter int          QDEPTH = 4,
  parameter logic [31:0] OP_EN  = '1
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the scalar core
  input  logic                in_valid,
  input  logic [31:0]         in_instr,
  input  logic [31:0]         in_rs,
  input  logic [31:0]         in_rt,
  output logic                in_ready,
  output logic                vmem_busy,
  output logic                idle,
  // data-cache line port
  output logic                dc_req,
  output logic                dc_we,
  output logic [31:0]         dc_addr,
  output logic [LINE_B*8-1:0] dc_wdata,
  output logic [LINE_B-1:0]   dc_wmask,
  output logic [7:0]          dc_vl,
  output logic [31:0]         dc_stride_bytes,
  input  logic                dc_ack,
  input  logic [LINE_B*8-1:0] dc_rdata,
  // status and events
  output logic [7:0]          vl_o,
  output logic                ev_ctrl_overlap,
  output logic                ev_vdone
);
  localparam int DEPTH = MVL / L;
  localparam int EW    = $clog2(DEPTH + 1);
  localparam int QW    = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;
  localparam int LBW   = (L > 1) ? $clog2(L) : 1;

  // ---------------- vector-control pipeline ----------------
  vfunc_e      in_func;
  logic        in_ctrl;
  logic [7:0]  vl_q;
  logic [31:0] stride_q;

  assign in_func = vfunc_e'(in_instr[5:0]);
  assign in_ctrl = is_vctrl(in_func);

  // ---------------- instruction queue ----------------
  vinstr_t         q [QDEPTH];
  logic [QW-1:0]   q_wp, q_rp;
  logic [QW:0]     q_cnt;
  logic [QW:0]     q_nmem;
  logic            q_full, q_push, q_pop;
  vinstr_t         q_in, head;

  assign q_full   = (q_cnt == (QW+1)'(QDEPTH));
  assign in_ready = in_ctrl || !q_full;
  assign q_push   = in_valid && !in_ctrl && !q_full;
  assign head     = q[q_rp];

  always_comb begin
    q_in.func       = in_func;
    q_in.vd         = in_instr[15:11];
    q_in.va         = in_instr[25:21];
    q_in.vb         = in_instr[20:16];
    q_in.masked     = in_instr[10];
    q_in.esize      = in_instr[9:8];
    q_in.use_scalar = in_instr[7];
    q_in.rs_val     = in_rs;
    q_in.rt_val     = in_rt;
    q_in.stride     = stride_q;
    q_in.vl         = vl_q;
  end

  // ---------------- vector pipeline sequencer ----------------
  typedef enum logic [1:0] {S_IDLE, S_ALU, S_DRAIN, S_MEM} state_e;
  state_e       state;
  vinstr_t      cur;
  logic [7:0]   grp, ngrp_m1;
  logic         vm_start, vm_busy, vm_done;

  assign q_pop    = (state == S_IDLE) && (q_cnt != 0);
  assign vm_start = q_pop && is_vmem(head.func) && (head.vl != 8'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vl_q     <= 8'(MVL);
      stride_q <= 32'd1;
      q_wp     <= '0;
      q_rp     <= '0;
      q_cnt    <= '0;
      q_nmem   <= '0;
      state    <= S_IDLE;
      cur      <= '0;
      grp      <= '0;
      ngrp_m1  <= '0;
    end else begin
      // control instructions execute on arrival
      if (in_valid && in_func == VSETVL)
        vl_q <= (in_rs > 32'(MVL)) ? 8'(MVL) : in_rs[7:0];
      if (in_valid && in_func == VSETSTR)
        stride_q <= in_rs;

      if (q_push) begin
        q[q_wp] <= q_in;
        q_wp    <= (q_wp == QW'(QDEPTH-1)) ? '0 : q_wp + 1'b1;
      end
      if (q_pop) q_rp <= (q_rp == QW'(QDEPTH-1)) ? '0 : q_rp + 1'b1;
      q_cnt  <= q_cnt + (QW+1)'(q_push) - (QW+1)'(q_pop);
      q_nmem <= q_nmem + (QW+1)'(q_push && is_vmem(in_func)) - (QW+1)'(q_pop && is_vmem(head.func));

      unique case (state)
        S_IDLE: if (q_pop) begin
          cur     <= head;
          grp     <= '0;
          ngrp_m1 <= 8'((int'(head.vl) + L - 1) / L - 1);
          if (head.vl == 8'd0)          state <= S_IDLE;
          else if (is_vmem(head.func))  state <= S_MEM;
          else                          state <= S_ALU;
        end
        S_ALU: begin
          grp <= grp + 1'b1;
          if (grp == ngrp_m1) state <= S_DRAIN;
        end
        S_DRAIN: state <= S_IDLE;
        S_MEM:   if (vm_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign vmem_busy       = (q_nmem != 0) || (state == S_MEM);
  assign idle            = (q_cnt == 0) && (state == S_IDLE);
  assign vl_o            = vl_q;
  assign ev_ctrl_overlap = in_valid && in_ctrl && !idle;
  assign ev_vdone        = (state == S_DRAIN) || (state == S_MEM && vm_done);

  // ---------------- vector memory unit and crossbar ----------------
  logic [$clog2(LINE_B)-1:0] slot_off [M];
  logic [M-1:0]              slot_valid;
  logic [LBW-1:0]            lane_base;
  logic [1:0]                xb_esize;
  logic                      xb_store;
  logic [4:0]                lane_vreg;
  logic [EW-1:0]             lane_entry [L];
  logic                      load_commit;
  logic [L-1:0]              xb_wen;
  logic [W-1:0]              xb_wdata [L];
  logic [W-1:0]              lane_rdata [L];

  vmem_unit #(.L(L), .M(M), .MVL(MVL), .LINE_B(LINE_B)) u_vmem (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (vm_start),
    .is_store       (head.func == VST),
    .vreg           (head.vd),
    .base           (head.rs_val),
    .stride         (head.stride),
    .esize          (head.esize),
    .vl             (head.vl),
    .busy           (vm_busy),
    .done           (vm_done),
    .dc_req         (dc_req),
    .dc_we          (dc_we),
    .dc_addr        (dc_addr),
    .dc_vl          (dc_vl),
    .dc_stride_bytes(dc_stride_bytes),
    .dc_ack         (dc_ack),
    .slot_off       (slot_off),
    .slot_valid     (slot_valid),
    .lane_base      (lane_base),
    .xb_esize       (xb_esize),
    .xb_store       (xb_store),
    .lane_vreg      (lane_vreg),
    .lane_entry     (lane_entry),
    .load_commit    (load_commit)
  );

  vmem_crossbar #(.L(L), .M(M), .W(W), .LINE_B(LINE_B)) u_xbar (
    .slot_off  (slot_off),
    .slot_valid(slot_valid),
    .esize     (xb_esize),
    .lane_base (lane_base),
    .line_in   (dc_rdata),
    .lane_wen  (xb_wen),
    .lane_wdata(xb_wdata),
    .lane_rdata(lane_rdata),
    .line_out  (dc_wdata),
    .line_mask (dc_wmask)
  );

  // ---------------- lanes ----------------
  for (genvar j = 0; j < L; j++) begin : g_lane
    logic           wb_valid;
    logic [W-1:0]   wb_data;
    vector_lane #(.W(W), .DEPTH(DEPTH), .OP_EN(OP_EN)) u_lane (
      .clk           (clk),
      .rst_n         (rst_n),
      .iss_valid     (state == S_ALU),
      .iss_op        (cur.func),
      .iss_vd        (cur.vd),
      .iss_va        (cur.va),
      .iss_vb        (cur.vb),
      .iss_entry     (EW'(grp)),
      .iss_scalar    (W'(cur.rt_val)),
      .iss_use_scalar(cur.use_scalar),
      .iss_masked    (cur.masked),
      .iss_active    ((int'(grp) * L + j) < int'(cur.vl)),
      .mw_en         (load_commit && xb_wen[j] && !xb_store),
      .mw_vd         (lane_vreg),
      .mw_entry      (lane_entry[j]),
      .mw_data       (xb_wdata[j]),
      .mr_vs         (lane_vreg),
      .mr_entry      (lane_entry[j]),
      .mr_data       (lane_rdata[j]),
      .wb_valid      (wb_valid),
      .wb_data       (wb_data)
    );
  end

  // The memory unit is only started while it is idle.
  assert property (@(posedge clk) disable iff (!rst_n) vm_start |-> !vm_busy);
endmodule
