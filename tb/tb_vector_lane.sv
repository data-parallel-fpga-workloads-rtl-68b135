// tb_vector_lane: drives random ALU operations through one lane (W=16,
// DEPTH=4) and compares each register write with a reference model of the
// operation, including flags, masking, scalar operands, inactive elements,
// the load-write and store-read ports, and a lane with an operation removed
// by OP_EN. A second lane at W=1, the narrowest lane width, runs the same
// operations against its own 1-bit model (add and subtract wrap, saturation
// clamps to [-1, 0], shifts are by zero). Each result must appear two cycles
// after issue.
module tb_vector_lane;
  import vespa_pkg::*;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic iss_valid, iss_use_scalar, iss_masked, iss_active;
  vfunc_e iss_op;
  logic [4:0] iss_vd, iss_va, iss_vb, mw_vd, mr_vs;
  logic [2:0] iss_entry, mw_entry, mr_entry;
  logic [W-1:0] iss_scalar, mw_data, mr_data, wb_data, mr_data2, wb_data2;
  logic mw_en, wb_valid, wb_valid2;

  vector_lane #(.W(W), .DEPTH(D)) dut (.*);
  // same lane with VMUL removed
  vector_lane #(.W(W), .DEPTH(D), .OP_EN(32'hFFFF_FFFF & ~(32'd1 << VMUL))) dut2 (
    .clk, .rst_n, .iss_valid, .iss_op, .iss_vd, .iss_va, .iss_vb, .iss_entry, .iss_scalar,
    .iss_use_scalar, .iss_masked, .iss_active, .mw_en, .mw_vd, .mw_entry, .mw_data,
    .mr_vs, .mr_entry, .mr_data(mr_data2), .wb_valid(wb_valid2), .wb_data(wb_data2));

  // the same lane at W=1
  logic iss_scalar1, mw_data1, mr_data1, wb_data1, wb_valid1;
  vector_lane #(.W(1), .DEPTH(D)) dut1 (
    .clk, .rst_n, .iss_valid, .iss_op, .iss_vd, .iss_va, .iss_vb, .iss_entry,
    .iss_scalar(iss_scalar1), .iss_use_scalar, .iss_masked, .iss_active, .mw_en, .mw_vd,
    .mw_entry, .mw_data(mw_data1), .mr_vs, .mr_entry, .mr_data(mr_data1),
    .wb_valid(wb_valid1), .wb_data(wb_data1));

  logic model1 [32][D];
  logic [D-1:0] fmodel1;

  function automatic int clamp1(input int v);
    return (v > 0) ? 0 : (v < -1) ? -1 : v;
  endfunction

  // reference for one 1-bit element; a set bit is the value -1
  function automatic logic ref1(input vfunc_e op, input logic a, input logic b, input logic f);
    int sa, sb2;
    sa = a ? -1 : 0; sb2 = b ? -1 : 0;
    case (op)
      VADD, VSUB, VXOR: return a ^ b;
      VMUL, VAND: return a & b;
      VOR:  return a | b;
      VSLL, VSRL, VSRA, VABS: return a;
      VMIN: return (sa < sb2) ? a : b;  VMAX: return (sa < sb2) ? b : a;
      VSADD: return clamp1(sa + sb2) != 0;
      VSSUB: return clamp1(sa - sb2) != 0;
      VMERGE: return f ? b : a;
      default: return 1'b0;
    endcase
  endfunction

  logic [W-1:0] model [32][D];
  logic [D-1:0] fmodel;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [W-1:0] sat(input int v);
    if (v > 32767) return 16'h7FFF;
    if (v < -32768) return 16'h8000;
    return W'(v);
  endfunction

  function automatic logic [W-1:0] ref_op(input vfunc_e op, input logic [W-1:0] a, input logic [W-1:0] b, input logic f);
    int sa, sb2;
    sa = int'($signed(a)); sb2 = int'($signed(b));
    case (op)
      VADD: return a + b;       VSUB: return a - b;
      VMUL: return W'(a * b);   VAND: return a & b;
      VOR:  return a | b;       VXOR: return a ^ b;
      VSLL: return a << (b % W); VSRL: return a >> (b % W);
      VSRA: return W'(sa >>> (b % W));
      VMIN: return (sa < sb2) ? a : b;  VMAX: return (sa < sb2) ? b : a;
      VABS: return (sa < 0) ? W'(-sa) : a;
      VSADD: return sat(sa + sb2);  VSSUB: return sat(sa - sb2);
      VMERGE: return f ? b : a;
      default: return '0;
    endcase
  endfunction

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    iss_valid = 0; iss_op = VADD; iss_vd = 0; iss_va = 0; iss_vb = 0; iss_entry = 0; iss_scalar = 0;
    iss_use_scalar = 0; iss_masked = 0; iss_active = 0; mw_en = 0; mw_vd = 0; mw_entry = 0; mw_data = 0;
    mr_vs = 0; mr_entry = 0; fmodel = '0;
    iss_scalar1 = 0; mw_data1 = 0; fmodel1 = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // fill the register file through the load-write port
    for (int r = 0; r < 32; r++) for (int e = 0; e < D; e++) begin
      mw_en = 1; mw_vd = 5'(r); mw_entry = 3'(e); mw_data = W'($urandom);
      model[r][e] = mw_data;
      mw_data1 = 1'($urandom); model1[r][e] = mw_data1;
      @(negedge clk);
    end
    mw_en = 0;
    // store-read port
    for (int t = 0; t < 20; t++) begin
      mr_vs = 5'($urandom_range(0, 31)); mr_entry = 3'($urandom_range(0, D-1)); #1;
      check(mr_data, model[mr_vs][mr_entry], "store read");
      check(mr_data1, model1[mr_vs][mr_entry], "W=1 store read");
    end
    // random ALU operations, one at a time
    for (int t = 0; t < 600; t++) begin
      vfunc_e op; logic [W-1:0] a, b, exp; logic f; int e;
      logic a1, b1, f1, exp1;
      logic act, msk;
      op = vfunc_e'($urandom_range(0, 16));
      e = $urandom_range(0, D-1);
      act = ($urandom_range(0, 7) != 0); msk = ($urandom_range(0, 3) == 0);
      iss_valid = 1; iss_op = op; iss_vd = 5'($urandom_range(0, 31)); iss_va = 5'($urandom_range(0, 31));
      iss_vb = 5'($urandom_range(0, 31)); iss_entry = 3'(e); iss_scalar = W'($urandom);
      iss_use_scalar = ($urandom_range(0, 3) == 0); iss_masked = msk; iss_active = act;
      a = model[iss_va][e]; b = iss_use_scalar ? iss_scalar : model[iss_vb][e]; f = fmodel[e];
      iss_scalar1 = 1'($urandom);
      a1 = model1[iss_va][e]; b1 = iss_use_scalar ? iss_scalar1 : model1[iss_vb][e]; f1 = fmodel1[e];
      @(negedge clk);
      iss_valid = 0;
      // result is written at the end of the next cycle
      if (op == VCMPEQ || op == VCMPLT) begin
        if (act && (!msk || f1)) fmodel1[e] = (op == VCMPEQ) ? (a1 == b1) : (a1 && !b1);
        check(wb_valid1, 0, "W=1 compare writes no register");
      end else begin
        exp1 = ref1(op, a1, b1, f1);
        check(wb_valid1, act && (!msk || f1), "W=1 write enable");
        if (act && (!msk || f1)) begin
          check(wb_data1, exp1, $sformatf("W=1 op %s", op.name()));
          model1[iss_vd][e] = exp1;
        end
      end
      if (op == VCMPEQ || op == VCMPLT) begin
        if (act && (!msk || f)) fmodel[e] = (op == VCMPEQ) ? (a == b) : ($signed(a) < $signed(b));
        check(wb_valid, 0, "compare writes no register");
      end else begin
        exp = ref_op(op, a, b, f);
        check(wb_valid, act && (!msk || f), "write enable");
        if (act && (!msk || f)) begin
          check(wb_data, exp, $sformatf("op %s", op.name()));
          if (op == VMUL) check(wb_data2, 0, "subset lane drops VMUL");
          model[iss_vd][e] = exp;
        end
      end
      @(negedge clk);
      mr_vs = iss_vd; mr_entry = 3'(e); #1;
      check(mr_data, model[iss_vd][e], "register file after op");
      check(mr_data1, model1[iss_vd][e], "W=1 register file after op");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
