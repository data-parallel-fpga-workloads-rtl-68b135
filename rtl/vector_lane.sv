// vector_lane: one lane of the vector coprocessor.
//
// A lane holds its slice of the vector register file: element e of every
// vector register lives in lane e mod L, at entry e / L, so each of the NVREG
// registers has DEPTH = MVL / L entries here. It also holds its slice of the
// flag register that compare instructions write and masked instructions read.
//
// The ALU is W bits wide (the lane-width parameter; elements are stored in W
// bits, loads keep the low W bits). It is pipelined in two stages: stage 1
// reads operands a and b (b may be a scalar broadcast instead), stage 2
// computes and writes the result back. OP_EN has one bit per ALU operation
// (bit number = vfunc_e code); a cleared bit removes that operation's
// hardware, and the operation then writes zero. This is the per-instruction
// subsetting of the processor; the operation list is this design's.
//
// Separate ports let the vector memory unit write a loaded element (mw_*) and
// read an element to store (mr_*). Only one vector instruction runs at a time,
// so these never contend with the ALU for the same register.
module vector_lane
  import vespa_pkg::*;
#(
  parameter int                  W     = 32,
  parameter int                  DEPTH = 4,
  parameter logic [31:0]         OP_EN = '1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ALU issue (stage 1)
  input  logic                     iss_valid,
  input  vfunc_e                   iss_op,
  input  logic [4:0]               iss_vd,
  input  logic [4:0]               iss_va,
  input  logic [4:0]               iss_vb,
  input  logic [$clog2(DEPTH+1)-1:0] iss_entry,
  input  logic [W-1:0]             iss_scalar,
  input  logic                     iss_use_scalar,
  input  logic                     iss_masked,
  input  logic                     iss_active,
  // memory unit: load write
  input  logic                     mw_en,
  input  logic [4:0]               mw_vd,
  input  logic [$clog2(DEPTH+1)-1:0] mw_entry,
  input  logic [W-1:0]             mw_data,
  // memory unit: store read
  input  logic [4:0]               mr_vs,
  input  logic [$clog2(DEPTH+1)-1:0] mr_entry,
  output logic [W-1:0]             mr_data,
  // result of the last ALU write (observability)
  output logic                     wb_valid,
  output logic [W-1:0]             wb_data
);
  localparam int EW  = $clog2(DEPTH+1);
  localparam int SHW = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0]     vrf [NVREG*DEPTH];
  logic [DEPTH-1:0] flag_q;

  function automatic int unsigned addr(input logic [4:0] r, input logic [EW-1:0] e);
    return int'(r) * DEPTH + int'(e);
  endfunction

  // ---------------- stage 1: operand read ----------------
  logic           ex_valid, ex_active, ex_masked, ex_flag;
  vfunc_e         ex_op;
  logic [4:0]     ex_vd;
  logic [EW-1:0]  ex_entry;
  logic [W-1:0]   ex_a, ex_b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_valid  <= 1'b0;
      ex_active <= 1'b0;
      ex_masked <= 1'b0;
      ex_flag   <= 1'b0;
      ex_op     <= VADD;
      ex_vd     <= '0;
      ex_entry  <= '0;
      ex_a      <= '0;
      ex_b      <= '0;
    end else begin
      ex_valid  <= iss_valid;
      ex_active <= iss_active;
      ex_masked <= iss_masked;
      ex_flag   <= flag_q[int'(iss_entry) % DEPTH];
      ex_op     <= iss_op;
      ex_vd     <= iss_vd;
      ex_entry  <= iss_entry;
      ex_a      <= vrf[addr(iss_va, iss_entry)];
      ex_b      <= iss_use_scalar ? iss_scalar : vrf[addr(iss_vb, iss_entry)];
    end
  end

  // ---------------- stage 2: execute ----------------
  logic [W-1:0] res;
  logic         res_flag;
  logic         is_cmp;
  logic [W:0]   sum_ext, dif_ext;
  logic [W-1:0] smax, smin;
  logic [SHW-1:0] sh;

  assign sum_ext = {ex_a[W-1], ex_a} + {ex_b[W-1], ex_b};
  assign dif_ext = {ex_a[W-1], ex_a} - {ex_b[W-1], ex_b};
  assign smax    = {1'b0, {(W-1){1'b1}}};
  assign smin    = {1'b1, {(W-1){1'b0}}};
  assign sh      = SHW'(ex_b % W);
  assign is_cmp  = (ex_op == VCMPEQ) || (ex_op == VCMPLT);

  always_comb begin
    res      = '0;
    res_flag = 1'b0;
    if (OP_EN[ex_op[4:0]] && !ex_op[5]) begin
      unique case (ex_op)
        VADD:   res = ex_a + ex_b;
        VSUB:   res = ex_a - ex_b;
        VMUL:   res = W'(ex_a * ex_b);
        VAND:   res = ex_a & ex_b;
        VOR:    res = ex_a | ex_b;
        VXOR:   res = ex_a ^ ex_b;
        VSLL:   res = ex_a << sh;
        VSRL:   res = ex_a >> sh;
        VSRA:   res = $unsigned($signed(ex_a) >>> sh);
        VMIN:   res = ($signed(ex_a) < $signed(ex_b)) ? ex_a : ex_b;
        VMAX:   res = ($signed(ex_a) < $signed(ex_b)) ? ex_b : ex_a;
        VABS:   res = ex_a[W-1] ? W'(-ex_a) : ex_a;
        VSADD:  res = (sum_ext[W] != sum_ext[W-1]) ? (sum_ext[W] ? smin : smax) : sum_ext[W-1:0];
        VSSUB:  res = (dif_ext[W] != dif_ext[W-1]) ? (dif_ext[W] ? smin : smax) : dif_ext[W-1:0];
        VCMPEQ: res_flag = (ex_a == ex_b);
        VCMPLT: res_flag = $signed(ex_a) < $signed(ex_b);
        VMERGE: res = ex_flag ? ex_b : ex_a;
        default: res = '0;
      endcase
    end
  end

  logic do_write;
  assign do_write = ex_valid && ex_active && (!ex_masked || ex_flag);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flag_q <= '0;
    end else if (do_write && is_cmp) begin
      flag_q[int'(ex_entry) % DEPTH] <= res_flag;
    end
  end

  always_ff @(posedge clk) begin
    if (do_write && !is_cmp) vrf[addr(ex_vd, ex_entry)] <= res;
    if (mw_en) vrf[addr(mw_vd, mw_entry)] <= mw_data;
  end

  assign mr_data  = vrf[addr(mr_vs, mr_entry)];
  assign wb_valid = do_write && !is_cmp;
  assign wb_data  = res;
endmodule
