// tb_workloads: runs the data-parallel benchmark kernels that VESPA is
// evaluated with, re-coded for this design's vector instruction set, on the
// processor at its default parameters (16 lanes, full crossbar, MVL 64,
// 16 KB / 64 B data cache, prefetch of 8 x VL).
//
// One program runs five kernels back to back, each strip-mined by MVL with a
// partial last strip where the size allows:
//  * RGBCMYK   NP1 RGB pixels -> CMYK: c = 255-r (as r xor 255), likewise m, y;
//              k = min(c, m, y); output (c-k, m-k, y-k, k) with stride-4 stores.
//  * RGBYIQ    NP2 RGB pixels -> Y (byte), I and Q (signed halfwords):
//              Y = (77r + 150g + 29b) >> 8, I = (153r - 70g - 83b) >>> 8,
//              Q = (54r - 134g + 80b) >>> 8; stride-3 byte loads.
//  * IP_CHECKSUM  one's-complement checksum of NH halfwords: vector
//              accumulation into 64 partial sums, then a scalar subroutine
//              (reached by JAL, left by JR) adds the partial sums and the
//              core folds the carries and complements.
//  * AUTCOR    autocorrelation r[k] = sum_i x[i] x[i+k] of NS 16-bit samples
//              for k = 0..K-1 (wrapping 32-bit arithmetic), with the same
//              scalar subroutine for the final sum.
//  * CONVEN    rate-1/2 convolutional encoder over NB one-bit symbols (one per
//              byte): y0 = x[i]^x[i-2]^x[i-3], y1 = x[i]^x[i-1]^x[i-3], built
//              from loads at shifted base addresses.
// The kernel code and the encoder's generator taps are this testbench's own.
// AUTCOR (512 samples = 1 KB, lags 0..15) and CONVEN (512 symbols, two
// 512-byte outputs) run at the benchmarks' data sizes; the image and packet
// kernels are scaled down to keep the run short.
// Every output is compared with values computed here, and the cycle count of
// each kernel is printed (from the last fetch of its first instruction, so a
// fetch down a mispredicted path does not count).
module tb_workloads;
  import vespa_pkg::*;
  import tb_asm_pkg::*;

  localparam int DDKB = 16, DWB = 64, MVL = 64;
  localparam int NP1 = 300, NP2 = 300, NH = 1000, NS = 512, K = 16, NB = 512;
  localparam int MAXCYC = 300000;

  // data layout (byte addresses)
  localparam int A_RGB1 = 'h1000, A_CMYK = 'h1400;
  localparam int A_RGB2 = 'h1C00, A_YO   = 'h2000, A_IO = 'h2200, A_QO = 'h2600;
  localparam int A_IP   = 'h2C00, A_IPR  = 'h3400, A_SCR = 'h3440;
  localparam int A_X    = 'h3600, A_R    = 'h3C00;
  localparam int A_CB   = 'h4000, A_Y0   = 'h4400, A_Y1 = 'h4800;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycles = 0;

  logic m_valid, m_we, m_ready, m_rvalid, halted, done;
  logic [31:0] m_addr; logic [DWB*8-1:0] m_wdata, m_rdata;
  logic [7:0] vl; logic [6:0] events;

  vespa_top u_top (
    .clk, .rst_n, .m_valid, .m_we, .m_addr, .m_wdata, .m_ready, .m_rvalid, .m_rdata,
    .halted, .done, .vl, .events);
  ddr_model #(.LINE_B(DWB), .NLINES(1024), .LAT(6)) u_mem (
    .clk, .m_valid, .m_we, .m_addr, .m_wdata, .m_ready, .m_rvalid, .m_rdata);

  // ---------------- memory helpers ----------------
  localparam int OFFW = $clog2(DWB);
  localparam int NL   = DDKB * 1024 / DWB;
  localparam int IDXW = $clog2(NL);

  function automatic logic [31:0] peek(input logic [31:0] a);
    int idx; logic [31:0] tag;
    idx = (a >> OFFW) % NL;
    tag = a >> (OFFW + IDXW);
    if (u_top.u_dcache.valid_q[idx] && u_top.u_dcache.tag_q[idx] == (32 - OFFW - IDXW)'(tag))
      return u_top.u_dcache.data_q[idx][((a % DWB) / 4) * 32 +: 32];
    return u_mem.rd_word(a);
  endfunction
  function automatic logic [7:0] peek_b(input logic [31:0] a);
    logic [31:0] w; w = peek(a & ~32'h3);
    return w[(a % 4) * 8 +: 8];
  endfunction
  function automatic logic [15:0] peek_h(input logic [31:0] a);
    return {peek_b(a + 1), peek_b(a)};
  endfunction
  function automatic void poke_b(input logic [31:0] a, input logic [7:0] d);
    logic [31:0] w; w = u_mem.rd_word(a & ~32'h3);
    w[(a % 4) * 8 +: 8] = d;
    u_mem.wr_word(a & ~32'h3, w);
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; if (failures < 20) $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // ---------------- program ----------------
  logic [31:0] prog [$];
  int kstart [5];   // word index of each kernel's first instruction

  function automatic int here();
    return prog.size();
  endfunction
  task automatic li(input int r, input int v);
    prog.push_back(i_type(OP_ADDIU, 0, r, v));
  endtask
  task automatic addi(input int rd, input int rs, input int v);
    prog.push_back(i_type(OP_ADDIU, rs, rd, v));
  endtask
  // r1 -= MVL; loop back to target while r1 > 0
  task automatic loop_end(input int target);
    addi(1, 1, -MVL);
    prog.push_back(r_type(FN_SLT, 0, 1, 9));
    prog.push_back(br(OP_BNE, 9, 0, target - (here() + 1)));
  endtask

  // registers kept for the whole program:
  // r8 = 1, r24 = 8, r25 = 64, r26 = A_SCR, r7 = 255
  task automatic build_program();
    int l, lk, sum64;
    prog.delete();
    prog.push_back(32'h0);                 // patched: jump over the subroutine
    // subroutine SUM64: r12 = sum of 64 words at r10 (uses r11, r13)
    sum64 = here();
    li(12, 0); li(11, 64);
    l = here();
    prog.push_back(i_type(OP_LW, 10, 13, 0));
    prog.push_back(r_type(FN_ADDU, 12, 13, 12));
    addi(10, 10, 4);
    addi(11, 11, -1);
    prog.push_back(br(OP_BNE, 11, 0, l - (here() + 1)));
    prog.push_back(r_type(FN_JR, 31, 0, 0));
    prog[0] = j_type(OP_J, 32'(4 * here()));

    li(8, 1); li(24, 8); li(25, 64); li(26, A_SCR); li(7, 255);

    // ---- RGBCMYK ----
    kstart[0] = here();
    li(1, NP1); li(2, A_RGB1); li(4, A_CMYK); li(5, 3); li(6, 4);
    l = here();
    prog.push_back(vctl(VSETVL, 1));
    prog.push_back(vctl(VSETSTR, 5));
    prog.push_back(vmem(VLD, 1, 2, 0));
    addi(17, 2, 1); prog.push_back(vmem(VLD, 2, 17, 0));
    addi(17, 2, 2); prog.push_back(vmem(VLD, 3, 17, 0));
    prog.push_back(vop(VXOR, 1, 1, 7, 1));
    prog.push_back(vop(VXOR, 2, 2, 7, 1));
    prog.push_back(vop(VXOR, 3, 3, 7, 1));
    prog.push_back(vop(VMIN, 4, 1, 2));
    prog.push_back(vop(VMIN, 4, 4, 3));
    prog.push_back(vop(VSUB, 1, 1, 4));
    prog.push_back(vop(VSUB, 2, 2, 4));
    prog.push_back(vop(VSUB, 3, 3, 4));
    prog.push_back(vctl(VSETSTR, 6));
    prog.push_back(vmem(VST, 1, 4, 0));
    addi(17, 4, 1); prog.push_back(vmem(VST, 2, 17, 0));
    addi(17, 4, 2); prog.push_back(vmem(VST, 3, 17, 0));
    addi(17, 4, 3); prog.push_back(vmem(VST, 4, 17, 0));
    addi(2, 2, 3 * MVL); addi(4, 4, 4 * MVL);
    loop_end(l);

    // ---- RGBYIQ ----
    kstart[1] = here();
    li(1, NP2); li(2, A_RGB2); li(10, A_YO); li(11, A_IO); li(12, A_QO);
    li(14, 77); li(15, 150); li(16, 29);
    li(18, 153); li(19, -70); li(20, -83);
    li(21, 54); li(22, -134); li(23, 80);
    l = here();
    prog.push_back(vctl(VSETVL, 1));
    prog.push_back(vctl(VSETSTR, 5));
    prog.push_back(vmem(VLD, 1, 2, 0));
    addi(17, 2, 1); prog.push_back(vmem(VLD, 2, 17, 0));
    addi(17, 2, 2); prog.push_back(vmem(VLD, 3, 17, 0));
    // Y
    prog.push_back(vop(VMUL, 4, 1, 14, 1));
    prog.push_back(vop(VMUL, 5, 2, 15, 1));
    prog.push_back(vop(VADD, 4, 4, 5));
    prog.push_back(vop(VMUL, 5, 3, 16, 1));
    prog.push_back(vop(VADD, 4, 4, 5));
    prog.push_back(vop(VSRL, 4, 4, 24, 1));
    // I
    prog.push_back(vop(VMUL, 6, 1, 18, 1));
    prog.push_back(vop(VMUL, 5, 2, 19, 1));
    prog.push_back(vop(VADD, 6, 6, 5));
    prog.push_back(vop(VMUL, 5, 3, 20, 1));
    prog.push_back(vop(VADD, 6, 6, 5));
    prog.push_back(vop(VSRA, 6, 6, 24, 1));
    // Q
    prog.push_back(vop(VMUL, 7, 1, 21, 1));
    prog.push_back(vop(VMUL, 5, 2, 22, 1));
    prog.push_back(vop(VADD, 7, 7, 5));
    prog.push_back(vop(VMUL, 5, 3, 23, 1));
    prog.push_back(vop(VADD, 7, 7, 5));
    prog.push_back(vop(VSRA, 7, 7, 24, 1));
    prog.push_back(vctl(VSETSTR, 8));
    prog.push_back(vmem(VST, 4, 10, 0));
    prog.push_back(vmem(VST, 6, 11, 1));
    prog.push_back(vmem(VST, 7, 12, 1));
    addi(2, 2, 3 * MVL); addi(10, 10, MVL); addi(11, 11, 2 * MVL); addi(12, 12, 2 * MVL);
    loop_end(l);

    // ---- IP_CHECKSUM ----
    kstart[2] = here();
    li(1, NH); li(2, A_IP);
    prog.push_back(vctl(VSETVL, 25));
    prog.push_back(vop(VXOR, 10, 10, 10));
    l = here();
    prog.push_back(vctl(VSETVL, 1));
    prog.push_back(vmem(VLD, 1, 2, 1));
    prog.push_back(vop(VADD, 10, 10, 1));
    addi(2, 2, 2 * MVL);
    loop_end(l);
    prog.push_back(vctl(VSETVL, 25));
    prog.push_back(vmem(VST, 10, 26, 2));
    addi(10, 26, 0);
    prog.push_back(j_type(OP_JAL, 32'(4 * sum64)));
    for (int f = 0; f < 2; f++) begin     // fold the carries twice
      prog.push_back(r_type(FN_SRL, 0, 12, 13, 16));
      prog.push_back(i_type(OP_ANDI, 12, 12, 'hFFFF));
      prog.push_back(r_type(FN_ADDU, 12, 13, 12));
    end
    prog.push_back(r_type(FN_NOR, 12, 0, 12));
    prog.push_back(i_type(OP_ANDI, 12, 12, 'hFFFF));
    prog.push_back(i_type(OP_SW, 0, 12, A_IPR));

    // ---- AUTCOR ----
    kstart[3] = here();
    li(20, 0); li(21, K); li(22, A_R);
    lk = here();
    prog.push_back(vctl(VSETVL, 25));
    prog.push_back(vop(VXOR, 10, 10, 10));
    li(1, NS); li(2, A_X);
    prog.push_back(r_type(FN_ADDU, 2, 20, 3));
    l = here();
    prog.push_back(vctl(VSETVL, 1));
    prog.push_back(vmem(VLD, 1, 2, 1));
    prog.push_back(vmem(VLD, 2, 3, 1));
    prog.push_back(vop(VMUL, 1, 1, 2));
    prog.push_back(vop(VADD, 10, 10, 1));
    addi(2, 2, 2 * MVL); addi(3, 3, 2 * MVL);
    loop_end(l);
    prog.push_back(vctl(VSETVL, 25));
    prog.push_back(vmem(VST, 10, 26, 2));
    addi(10, 26, 0);
    prog.push_back(j_type(OP_JAL, 32'(4 * sum64)));
    prog.push_back(i_type(OP_SW, 22, 12, 0));
    addi(22, 22, 4); addi(20, 20, 2); addi(21, 21, -1);
    prog.push_back(br(OP_BNE, 21, 0, lk - (here() + 1)));

    // ---- CONVEN ----
    kstart[4] = here();
    li(1, NB); li(2, A_CB + 16); li(4, A_Y0); li(5, A_Y1);
    l = here();
    prog.push_back(vctl(VSETVL, 1));
    prog.push_back(vmem(VLD, 1, 2, 0));
    addi(17, 2, -1); prog.push_back(vmem(VLD, 2, 17, 0));
    addi(17, 2, -2); prog.push_back(vmem(VLD, 3, 17, 0));
    addi(17, 2, -3); prog.push_back(vmem(VLD, 4, 17, 0));
    prog.push_back(vop(VXOR, 5, 1, 3));
    prog.push_back(vop(VXOR, 5, 5, 4));
    prog.push_back(vmem(VST, 5, 4, 0));
    prog.push_back(vop(VXOR, 6, 1, 2));
    prog.push_back(vop(VXOR, 6, 6, 4));
    prog.push_back(vmem(VST, 6, 5, 0));
    addi(2, 2, MVL); addi(4, 4, MVL); addi(5, 5, MVL);
    loop_end(l);
    prog.push_back(halt());
  endtask

  // ---------------- per-kernel cycle counts ----------------
  int kcyc [6];
  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int k = 0; k < 5; k++)
      if (u_top.imem_req && u_top.imem_hit && u_top.imem_addr == 32'(4 * kstart[k]))
        kcyc[k] = cycles;
  end

  initial begin
    #(64'd10 * (MAXCYC + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0]  rgb1 [3*NP1], rgb2 [3*NP2], cb [NB];
    logic [15:0] ip [NH], x [NS + K];
    string kname [5] = '{"RGBCMYK", "RGBYIQ", "IP_CHECKSUM", "AUTCOR", "CONVEN"};
    for (int k = 0; k < 5; k++) kcyc[k] = -1;
    build_program();
    for (int i = 0; i < prog.size(); i++) u_mem.wr_word(4 * i, prog[i]);
    for (int i = 0; i < 3*NP1; i++) begin rgb1[i] = 8'($urandom); poke_b(A_RGB1 + i, rgb1[i]); end
    for (int i = 0; i < 3*NP2; i++) begin rgb2[i] = 8'($urandom); poke_b(A_RGB2 + i, rgb2[i]); end
    for (int i = 0; i < NH; i++) begin
      ip[i] = 16'($urandom);
      poke_b(A_IP + 2*i, ip[i][7:0]); poke_b(A_IP + 2*i + 1, ip[i][15:8]);
    end
    for (int i = 0; i < NS + K; i++) begin
      x[i] = (i < NS) ? 16'($urandom) : 16'h0;     // zero padding past the end
      poke_b(A_X + 2*i, x[i][7:0]); poke_b(A_X + 2*i + 1, x[i][15:8]);
    end
    for (int i = 0; i < 16; i++) poke_b(A_CB + i, 8'h0);    // x[-1..-3] = 0
    for (int i = 0; i < NB; i++) begin cb[i] = 8'($urandom_range(0, 1)); poke_b(A_CB + 16 + i, cb[i]); end

    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!done && cycles < MAXCYC) @(negedge clk);
    while (u_top.u_dcache.wb_cnt != 0 && cycles < MAXCYC) @(negedge clk);
    check(done, 1, "program finished");
    kcyc[5] = cycles;
    $display("program of %0d instructions finished in %0d cycles", prog.size(), cycles);
    for (int k = 0; k < 5; k++)
      $display("%-12s %0d cycles", kname[k], kcyc[k+1] - kcyc[k]);

    // RGBCMYK
    for (int i = 0; i < NP1; i++) begin
      int c, m, y, kk;
      c = 255 - rgb1[3*i]; m = 255 - rgb1[3*i+1]; y = 255 - rgb1[3*i+2];
      kk = (c < m) ? c : m; kk = (kk < y) ? kk : y;
      check(peek_b(A_CMYK + 4*i),     (c - kk) & 'hFF, $sformatf("CMYK c %0d", i));
      check(peek_b(A_CMYK + 4*i + 1), (m - kk) & 'hFF, $sformatf("CMYK m %0d", i));
      check(peek_b(A_CMYK + 4*i + 2), (y - kk) & 'hFF, $sformatf("CMYK y %0d", i));
      check(peek_b(A_CMYK + 4*i + 3), kk & 'hFF,   $sformatf("CMYK k %0d", i));
    end
    // RGBYIQ
    for (int i = 0; i < NP2; i++) begin
      int r, g, b, yy, ii, qq;
      r = rgb2[3*i]; g = rgb2[3*i+1]; b = rgb2[3*i+2];
      yy = (77*r + 150*g + 29*b) >>> 8;
      ii = (153*r - 70*g - 83*b) >>> 8;
      qq = (54*r - 134*g + 80*b) >>> 8;
      check(peek_b(A_YO + i),   yy & 'hFF,$sformatf("YIQ y %0d", i));
      check(peek_h(A_IO + 2*i), ii & 'hFFFF, $sformatf("YIQ i %0d", i));
      check(peek_h(A_QO + 2*i), qq & 'hFFFF, $sformatf("YIQ q %0d", i));
    end
    // IP_CHECKSUM
    begin
      logic [31:0] s;
      s = 0;
      for (int i = 0; i < NH; i++) s += 32'(ip[i]);
      s = (s & 32'hFFFF) + (s >> 16);
      s = (s & 32'hFFFF) + (s >> 16);
      check(peek(A_IPR), int'(s[15:0] ^ 16'hFFFF), "IP checksum");
    end
    // AUTCOR
    for (int k = 0; k < K; k++) begin
      logic [31:0] s;
      s = 0;
      for (int i = 0; i < NS; i++) s += 32'(x[i]) * 32'(x[i+k]);
      check(peek(A_R + 4*k), s, $sformatf("autocorrelation lag %0d", k));
    end
    // CONVEN
    for (int i = 0; i < NB; i++) begin
      logic [7:0] x1, x2, x3;
      x1 = (i >= 1) ? cb[i-1] : 8'h0;
      x2 = (i >= 2) ? cb[i-2] : 8'h0;
      x3 = (i >= 3) ? cb[i-3] : 8'h0;
      check(peek_b(A_Y0 + i), cb[i] ^ x2 ^ x3, $sformatf("encoder y0 %0d", i));
      check(peek_b(A_Y1 + i), cb[i] ^ x1 ^ x3, $sformatf("encoder y1 %0d", i));
    end
    check(peek_b(A_Y0 + NB), 8'h00, "encoder: no store past VL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
