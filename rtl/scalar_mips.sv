// scalar_mips: the scalar MIPS core of VESPA.
//
// A 3-stage in-order pipeline with full forwarding and a 1-bit branch history
// table, as the scalar core of VESPA is described. The stages are this
// design's own split:
//   F  fetch: reads the instruction cache (hit in the same cycle), predicts
//      the next PC: J/JAL are redirected at once, BEQ/BNE follow the branch
//      history table.
//   D  decode: reads the register file, with the result of E forwarded.
//   E  execute: ALU, branch resolution (a misprediction flushes F and D and
//      costs two cycles), data-cache access, register write-back, and issue of
//      vector instructions to the vector coprocessor together with the values
//      of scalar registers rs and rt.
// Scalar and vector work run out of order with respect to each other, except
// memory operations: a scalar load or store waits in E until the coprocessor
// reports no vector memory instruction queued or running (vmem_busy).
// BREAK halts the core. There is no branch delay slot, no multiply/divide and
// no exceptions; these are choices of this design.
//
// Interfaces: imem_* is the instruction cache (valid-request, same-cycle hit);
// d* is a word port to the data cache, held until dack; v* sends a vector
// instruction, held until vready.
module scalar_mips
  import vespa_pkg::*;
#(
  parameter logic [31:0] RESET_PC    = 32'h0,
  parameter int          BHT_ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction cache
  output logic        imem_req,
  output logic [31:0] imem_addr,
  input  logic        imem_hit,
  input  logic [31:0] imem_rdata,
  // data cache (word port)
  output logic        dreq,
  output logic        dwe,
  output logic [31:0] daddr,
  output logic [31:0] dwdata,
  output logic [3:0]  dbe,
  input  logic        dack,
  input  logic [31:0] drdata,
  // vector coprocessor
  output logic        vreq,
  output logic [31:0] vinstr,
  output logic [31:0] vrs_val,
  output logic [31:0] vrt_val,
  input  logic        vready,
  input  logic        vmem_busy,
  // status
  output logic        halted,
  output logic        ev_mispredict
);

  // ---------------- state ----------------
  logic [31:0] pc_f;
  logic        fd_valid;
  logic [31:0] fd_instr, fd_pc;
  logic        fd_pred;

  logic        de_valid;
  logic [31:0] de_instr, de_pc;
  logic        de_pred;
  logic [31:0] de_rs, de_rt;

  logic [31:0] regs [32];
  logic        halted_q;

  // ---------------- F stage ----------------
  logic        bht_pred;
  logic [5:0]  f_op;
  logic [31:0] f_pc4, f_next;
  logic        f_pred_taken;

  assign f_op  = imem_rdata[31:26];
  assign f_pc4 = pc_f + 32'd4;

  always_comb begin
    f_next       = f_pc4;
    f_pred_taken = 1'b0;
    if (f_op == OP_J || f_op == OP_JAL) begin
      f_next = {f_pc4[31:28], imem_rdata[25:0], 2'b00};
    end else if ((f_op == OP_BEQ || f_op == OP_BNE) && bht_pred) begin
      f_next       = f_pc4 + {{14{imem_rdata[15]}}, imem_rdata[15:0], 2'b00};
      f_pred_taken = 1'b1;
    end
  end

  assign imem_req  = !halted_q && rst_n;
  assign imem_addr = pc_f;

  // ---------------- E stage decode ----------------
  logic [5:0]  e_op, e_fn;
  logic [4:0]  e_rt_idx, e_rd_idx;
  logic [4:0]  e_sh;
  logic [31:0] e_simm, e_zimm;
  logic [31:0] e_alu;
  logic [31:0] e_wdata;
  logic [4:0]  e_wreg;
  logic        e_wen;
  logic        e_is_mem, e_is_store, e_is_vec, e_is_branch, e_is_break;
  logic        e_taken, e_redirect;
  logic [31:0] e_target, e_addr;
  logic        e_stall;

  assign e_op     = de_instr[31:26];
  assign e_fn     = de_instr[5:0];
  assign e_rt_idx = de_instr[20:16];
  assign e_rd_idx = de_instr[15:11];
  assign e_sh     = de_instr[10:6];
  assign e_simm   = {{16{de_instr[15]}}, de_instr[15:0]};
  assign e_zimm   = {16'h0, de_instr[15:0]};
  assign e_addr   = de_rs + e_simm;

  assign e_is_mem    = (e_op == OP_LW) || (e_op == OP_LBU) || (e_op == OP_SW) || (e_op == OP_SB);
  assign e_is_store  = (e_op == OP_SW) || (e_op == OP_SB);
  assign e_is_vec    = (e_op == OP_COP2);
  assign e_is_branch = (e_op == OP_BEQ) || (e_op == OP_BNE);
  assign e_is_break  = (e_op == OP_SPECIAL) && (e_fn == FN_BREAK);

  always_comb begin
    e_alu  = '0;
    e_wreg = '0;
    e_wen  = 1'b0;
    unique case (e_op)
      OP_SPECIAL: begin
        e_wreg = e_rd_idx;
        e_wen  = 1'b1;
        case (e_fn)
          FN_SLL:  e_alu = de_rt << e_sh;
          FN_SRL:  e_alu = de_rt >> e_sh;
          FN_SRA:  e_alu = $unsigned($signed(de_rt) >>> e_sh);
          FN_SLLV: e_alu = de_rt << de_rs[4:0];
          FN_SRLV: e_alu = de_rt >> de_rs[4:0];
          FN_ADDU: e_alu = de_rs + de_rt;
          FN_SUBU: e_alu = de_rs - de_rt;
          FN_AND:  e_alu = de_rs & de_rt;
          FN_OR:   e_alu = de_rs | de_rt;
          FN_XOR:  e_alu = de_rs ^ de_rt;
          FN_NOR:  e_alu = ~(de_rs | de_rt);
          FN_SLT:  e_alu = {31'h0, $signed(de_rs) < $signed(de_rt)};
          FN_SLTU: e_alu = {31'h0, de_rs < de_rt};
          default: e_wen = 1'b0;   // JR, BREAK, unsupported
        endcase
      end
      OP_ADDIU: begin e_alu = de_rs + e_simm; e_wreg = e_rt_idx; e_wen = 1'b1; end
      OP_SLTI:  begin e_alu = {31'h0, $signed(de_rs) < $signed(e_simm)}; e_wreg = e_rt_idx; e_wen = 1'b1; end
      OP_SLTIU: begin e_alu = {31'h0, de_rs < e_simm}; e_wreg = e_rt_idx; e_wen = 1'b1; end
      OP_ANDI:  begin e_alu = de_rs & e_zimm; e_wreg = e_rt_idx; e_wen = 1'b1; end
      OP_ORI:   begin e_alu = de_rs | e_zimm; e_wreg = e_rt_idx; e_wen = 1'b1; end
      OP_XORI:  begin e_alu = de_rs ^ e_zimm; e_wreg = e_rt_idx; e_wen = 1'b1; end
      OP_LUI:   begin e_alu = {de_instr[15:0], 16'h0}; e_wreg = e_rt_idx; e_wen = 1'b1; end
      OP_JAL:   begin e_alu = de_pc + 32'd4; e_wreg = 5'd31; e_wen = 1'b1; end
      OP_LW, OP_LBU: begin e_wreg = e_rt_idx; e_wen = 1'b1; end
      default: ;
    endcase
  end

  // load data alignment
  logic [7:0] e_byte;
  always_comb begin
    unique case (e_addr[1:0])
      2'd0: e_byte = drdata[7:0];
      2'd1: e_byte = drdata[15:8];
      2'd2: e_byte = drdata[23:16];
      default: e_byte = drdata[31:24];
    endcase
  end
  assign e_wdata = (e_op == OP_LW)  ? drdata :
                   (e_op == OP_LBU) ? {24'h0, e_byte} : e_alu;

  // data cache port
  assign dreq   = de_valid && e_is_mem && !vmem_busy;
  assign dwe    = e_is_store;
  assign daddr  = {e_addr[31:2], 2'b00};
  assign dwdata = (e_op == OP_SB) ? {4{de_rt[7:0]}} : de_rt;
  assign dbe    = (e_op == OP_SB) ? (4'b0001 << e_addr[1:0]) : 4'b1111;

  // vector issue
  assign vreq    = de_valid && e_is_vec;
  assign vinstr  = de_instr;
  assign vrs_val = de_rs;
  assign vrt_val = de_rt;

  // branch resolution
  always_comb begin
    e_taken    = 1'b0;
    e_target   = de_pc + 32'd4 + {e_simm[29:0], 2'b00};
    e_redirect = 1'b0;
    if (de_valid) begin
      if (e_op == OP_BEQ) e_taken = (de_rs == de_rt);
      if (e_op == OP_BNE) e_taken = (de_rs != de_rt);
      if (e_is_branch && (e_taken != de_pred)) e_redirect = 1'b1;
      if (!e_taken && e_is_branch) e_target = de_pc + 32'd4;
      if (e_op == OP_SPECIAL && e_fn == FN_JR) begin
        e_redirect = 1'b1;
        e_target   = de_rs;
      end
    end
  end

  assign e_stall = de_valid && ((e_is_mem && !(dack && !vmem_busy)) ||
                                (e_is_vec && !vready));

  logic e_commit;
  assign e_commit = de_valid && !e_stall;

  // ---------------- D stage ----------------
  logic [4:0]  d_rs_idx, d_rt_idx;
  logic [31:0] d_rs, d_rt;
  assign d_rs_idx = fd_instr[25:21];
  assign d_rt_idx = fd_instr[20:16];

  always_comb begin
    d_rs = regs[d_rs_idx];
    d_rt = regs[d_rt_idx];
    // forwarding from E
    if (de_valid && e_wen && e_wreg != 5'd0 && e_wreg == d_rs_idx) d_rs = e_wdata;
    if (de_valid && e_wen && e_wreg != 5'd0 && e_wreg == d_rt_idx) d_rt = e_wdata;
    if (d_rs_idx == 5'd0) d_rs = '0;
    if (d_rt_idx == 5'd0) d_rt = '0;
  end

  bht #(.ENTRIES(BHT_ENTRIES)) u_bht (
    .clk       (clk),
    .rst_n     (rst_n),
    .rd_pc     (pc_f),
    .pred_taken(bht_pred),
    .upd_en    (e_commit && e_is_branch),
    .upd_pc    (de_pc),
    .upd_taken (e_taken)
  );

  // ---------------- pipeline registers ----------------
  logic stop;   // BREAK committing
  assign stop = e_commit && e_is_break;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_f     <= RESET_PC;
      fd_valid <= 1'b0;
      fd_instr <= '0;
      fd_pc    <= '0;
      fd_pred  <= 1'b0;
      de_valid <= 1'b0;
      de_instr <= '0;
      de_pc    <= '0;
      de_pred  <= 1'b0;
      de_rs    <= '0;
      de_rt    <= '0;
      halted_q <= 1'b0;
    end else if (!halted_q && !e_stall) begin
      if (stop) begin
        halted_q <= 1'b1;
        fd_valid <= 1'b0;
        de_valid <= 1'b0;
      end else if (e_commit && e_redirect) begin
        pc_f     <= e_target;
        fd_valid <= 1'b0;
        de_valid <= 1'b0;
      end else begin
        // D -> E
        de_valid <= fd_valid;
        de_instr <= fd_instr;
        de_pc    <= fd_pc;
        de_pred  <= fd_pred;
        de_rs    <= d_rs;
        de_rt    <= d_rt;
        // F -> D
        if (imem_hit) begin
          fd_valid <= 1'b1;
          fd_instr <= imem_rdata;
          fd_pc    <= pc_f;
          fd_pred  <= f_pred_taken;
          pc_f     <= f_next;
        end else begin
          fd_valid <= 1'b0;
        end
      end
    end
  end

  // register file write-back at the end of E
  always_ff @(posedge clk) begin
    if (e_commit && e_wen && e_wreg != 5'd0) regs[e_wreg] <= e_wdata;
  end

  assign halted        = halted_q;
  assign ev_mispredict = e_commit && e_redirect && e_is_branch;

  // a held data request must keep its address until acknowledged
  property p_dreq_stable;
    @(posedge clk) disable iff (!rst_n) (dreq && !dack) |=> (!dreq || $stable(daddr));
  endproperty
  assert property (p_dreq_stable);
endmodule
