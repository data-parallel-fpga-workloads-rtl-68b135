// tb_vector_coproc: runs random vector programs on a 4-lane coprocessor
// (M=2, MVL=16, 16-byte lines) with a data-cache stand-in that stalls at
// random. A reference model executes the same instructions in program order;
// after each program the memory must match the model. Also checked: an ALU
// instruction takes ceil(VL/L) + 2 cycles from acceptance to idle, control
// instructions are accepted while vector work is queued (decoupling) and only
// affect instructions that follow them, and vmem_busy covers queued loads.
module tb_vector_coproc;
  import vespa_pkg::*;
  import tb_asm_pkg::*;
  localparam int L = 4, M = 2, MVL = 16, LB = 16, MEMB = 4096;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_overlap = 0, n_stall = 0;

  logic in_valid, in_ready, vmem_busy, idle, dc_req, dc_we, dc_ack, ev_ctrl_overlap, ev_vdone;
  logic [31:0] in_instr, in_rs, in_rt, dc_addr, dc_stride_bytes;
  logic [LB*8-1:0] dc_wdata, dc_rdata; logic [LB-1:0] dc_wmask; logic [7:0] dc_vl, vl_o;

  vector_coproc #(.L(L), .M(M), .W(32), .MVL(MVL), .LINE_B(LB), .QDEPTH(4)) dut (.*);

  // data-cache stand-in
  logic [7:0] mem [MEMB];
  logic stall;
  always @(posedge clk) stall <= ($urandom_range(0, 3) == 0);
  assign dc_ack = dc_req && !stall;
  always_comb for (int b = 0; b < LB; b++) dc_rdata[b*8 +: 8] = mem[(dc_addr + b) % MEMB];
  always @(posedge clk) begin
    if (dc_req && stall) n_stall++;
    if (dc_ack && dc_we) for (int b = 0; b < LB; b++) if (dc_wmask[b]) mem[(dc_addr + b) % MEMB] <= dc_wdata[b*8 +: 8];
    if (ev_ctrl_overlap) n_overlap++;
  end

  // reference model
  logic [7:0]  rmem [MEMB];
  logic [31:0] rv [32][MVL];
  logic        rf [MVL];
  int          rvl, rstride;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [31:0] sat32(input longint v);
    if (v > 64'sd2147483647) return 32'h7FFF_FFFF;
    if (v < -64'sd2147483648) return 32'h8000_0000;
    return 32'(v);
  endfunction

  function automatic logic [31:0] ref_op(vfunc_e op, logic [31:0] a, logic [31:0] b, logic f);
    case (op)
      VADD: return a + b;   VSUB: return a - b;  VMUL: return a * b;
      VAND: return a & b;   VOR: return a | b;   VXOR: return a ^ b;
      VSLL: return a << b[4:0]; VSRL: return a >> b[4:0];
      VSRA: return $unsigned($signed(a) >>> b[4:0]);
      VMIN: return ($signed(a) < $signed(b)) ? a : b;
      VMAX: return ($signed(a) < $signed(b)) ? b : a;
      VABS: return a[31] ? -a : a;
      VSADD: return sat32(longint'($signed(a)) + longint'($signed(b)));
      VSSUB: return sat32(longint'($signed(a)) - longint'($signed(b)));
      VMERGE: return f ? b : a;
      default: return 0;
    endcase
  endfunction

  task automatic model(input logic [31:0] ins, input logic [31:0] rs, input logic [31:0] rt);
    vfunc_e f; int vd, va, vb, nb; bit m, vs;
    f = vfunc_e'(ins[5:0]); va = ins[25:21]; vb = ins[20:16]; vd = ins[15:11];
    m = ins[10]; nb = 1 << ins[9:8]; vs = ins[7];
    if (f == VSETVL) rvl = (rs > MVL) ? MVL : rs;
    else if (f == VSETSTR) rstride = rs;
    else if (f == VLD) begin
      for (int e = 0; e < rvl; e++) begin
        logic [31:0] a, v; a = rs + e * rstride * nb; v = 0;
        for (int b = 0; b < nb; b++) v[b*8 +: 8] = rmem[(a + b) % MEMB];
        rv[vd][e] = v;
      end
    end else if (f == VST) begin
      for (int e = 0; e < rvl; e++) begin
        logic [31:0] a; a = rs + e * rstride * nb;
        for (int b = 0; b < nb; b++) rmem[(a + b) % MEMB] = rv[vd][e][b*8 +: 8];
      end
    end else begin
      logic [31:0] res [MVL]; logic nf [MVL];
      for (int e = 0; e < rvl; e++) begin
        logic [31:0] a, b; a = rv[va][e]; b = vs ? rt : rv[vb][e];
        nf[e] = rf[e]; res[e] = rv[vd][e];
        if (!m || rf[e]) begin
          if (f == VCMPEQ) nf[e] = (a == b);
          else if (f == VCMPLT) nf[e] = $signed(a) < $signed(b);
          else res[e] = ref_op(f, a, b, rf[e]);
        end
      end
      for (int e = 0; e < rvl; e++) begin rv[vd][e] = res[e]; rf[e] = nf[e]; end
    end
  endtask

  task automatic send(input logic [31:0] ins, input logic [31:0] rs, input logic [31:0] rt);
    @(negedge clk);
    in_valid = 1; in_instr = ins; in_rs = rs; in_rt = rt;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
    model(ins, rs, rt);
  endtask

  task automatic wait_idle();
    int n; n = 0;
    @(negedge clk);
    while (!idle && n < 5000) begin @(negedge clk); n++; end
  endtask

  task automatic compare_mem(input string what);
    int bad; bad = 0;
    for (int i = 0; i < MEMB; i++) if (mem[i] !== rmem[i]) bad++;
    check(bad, 0, what);
  endtask

  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    in_valid = 0; in_instr = 0; in_rs = 0; in_rt = 0;
    for (int i = 0; i < MEMB; i++) begin mem[i] = 8'($urandom); rmem[i] = mem[i]; end
    for (int r = 0; r < 32; r++) for (int e = 0; e < MVL; e++) rv[r][e] = 0;
    for (int e = 0; e < MVL; e++) rf[e] = 0;
    rvl = MVL; rstride = 1;
    repeat (2) @(negedge clk); rst_n = 1;

    // initialise registers 0..7 from memory so the model and the lanes agree
    send(vctl(VSETVL, 0), MVL, 0);
    for (int r = 0; r < 8; r++) send(vmem(VLD, r, 0, 2), 32'h100 + r * 64, 0);
    wait_idle();

    // ALU timing: VL = 16, 4 lanes -> 4 groups + 2
    begin
      int t0, n;
      @(negedge clk); in_valid = 1; in_instr = vop(VADD, 9, 1, 2); in_rs = 0; in_rt = 0;
      @(negedge clk); in_valid = 0; model(vop(VADD, 9, 1, 2), 0, 0);
      n = 1;
      while (!idle) begin @(negedge clk); n++; end
      // n counts falling edges from the one after acceptance; idle is seen one later
      check(n - 1, MVL / L + 2, "ALU instruction cycles");
    end

    // decoupling: a control instruction is accepted while vector work is queued
    begin
      int ov0; ov0 = n_overlap;
      send(vmem(VLD, 10, 0, 2), 32'h200, 0);
      check(vmem_busy, 1, "vmem_busy with a queued load");
      send(vctl(VSETVL, 0), 5, 0);
      check(n_overlap - ov0, 1, "control overlapped vector work");
      send(vmem(VST, 10, 0, 2), 32'h600, 0);   // stores 5 elements
      wait_idle();
      compare_mem("decoupled VL change");
      check(vl_o, 5, "VL register");
    end

    // random programs
    for (int p = 0; p < 40; p++) begin
      for (int i = 0; i < 30; i++) begin
        int kind; kind = $urandom_range(0, 9);
        if (kind == 0) send(vctl(VSETVL, 0), $urandom_range(0, MVL + 3), 0);
        else if (kind == 1) begin
          int s; case ($urandom_range(0, 3)) 0: s = 1; 1: s = 2; 2: s = 0; default: s = -1; endcase
          send(vctl(VSETSTR, 0), s, 0);
        end else if (kind == 2 || kind == 3) begin
          int esz; esz = $urandom_range(0, 2);
          send(vmem(kind == 2 ? VLD : VST, $urandom_range(0, 7), 0, esz),
               (32'h800 + $urandom_range(0, 255) * 4) & ~32'((1 << esz) - 1), 0);
        end else begin
          vfunc_e f; f = vfunc_e'($urandom_range(0, 16));
          send(vop(f, $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7),
                   $urandom_range(0, 3) == 0, $urandom_range(0, 4) == 0), 0, $urandom);
        end
      end
      // store every register so the whole register state is compared
      send(vctl(VSETVL, 0), MVL, 0);
      send(vctl(VSETSTR, 0), 1, 0);
      for (int r = 0; r < 8; r++) send(vmem(VST, r, 0, 2), 32'hC00 + r * 64, 0);
      wait_idle();
      compare_mem($sformatf("program %0d", p));
    end
    check(n_stall > 0, 1, "cache stalls happened");
    $display("overlaps=%0d stalls=%0d", n_overlap, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
