// tb_vespa_full: the end-to-end program of tb_vespa_top run on the processor
// with every parameter at its default: 16 lanes, full 16-slot crossbar,
// MVL 64, 32-bit lanes, 16 KB data cache with 64-byte lines, prefetch of
// 8 x VL elements, 4 KB instruction cache.
//
// Kernels (see tb_vespa_top): an image blend over N 16-bit pixels, a scalar
// checksum of its output, and an RGB-to-luma filter with stride-3 byte loads
// over NP pixels. Results are checked against values computed here, and every
// mechanism (misprediction, control overlap, vector retirement, cache misses,
// prefetches, write-backs, serialised scalar accesses, queue back-pressure,
// buffered dirty victims) must occur at least once. The luma output is
// placed 16 KB above the blend output, so the lines its stores prefetch
// evict dirty blend lines.
module tb_vespa_full;
  import vespa_pkg::*;
  import tb_asm_pkg::*;

  localparam int MVL = 64, DDKB = 16, DWB = 64;
  localparam int N = 2000, NP = 600, ALPHA = 77;
  localparam int MAXCYC = 400000;

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

  // current value of a word: from the data cache if its line is held there
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
  localparam logic [31:0] A_A = 32'h1000, A_B = 32'h2000, A_OUT = 32'h3000;
  localparam logic [31:0] A_RGB = 32'h4000, A_Y = 32'h7000, A_SUM = 32'h7F00;
  logic [31:0] prog [$];

  task automatic build_program();
    int l1, l2, l3;
    prog.delete();
    prog.push_back(i_type(OP_ADDIU, 0, 1, N));
    prog.push_back(i_type(OP_ADDIU, 0, 2, A_A));
    prog.push_back(i_type(OP_ADDIU, 0, 3, A_B));
    prog.push_back(i_type(OP_ADDIU, 0, 4, A_OUT));
    prog.push_back(i_type(OP_ADDIU, 0, 5, ALPHA));
    prog.push_back(i_type(OP_ADDIU, 0, 6, 256 - ALPHA));
    prog.push_back(i_type(OP_ADDIU, 0, 7, 8));
    // kernel 1: blend, strip-mined
    l1 = prog.size();
    prog.push_back(vctl(VSETVL, 1));
    prog.push_back(vmem(VLD, 1, 2, 1));
    prog.push_back(vmem(VLD, 2, 3, 1));
    prog.push_back(vop(VMUL, 1, 1, 5, 1));
    prog.push_back(vop(VMUL, 2, 2, 6, 1));
    prog.push_back(vop(VADD, 3, 1, 2));
    prog.push_back(vop(VSRL, 3, 3, 7, 1));
    prog.push_back(vmem(VST, 3, 4, 1));
    prog.push_back(i_type(OP_ADDIU, 2, 2, 2 * MVL));
    prog.push_back(i_type(OP_ADDIU, 3, 3, 2 * MVL));
    prog.push_back(i_type(OP_ADDIU, 4, 4, 2 * MVL));
    prog.push_back(i_type(OP_ADDIU, 1, 1, -MVL));
    prog.push_back(r_type(FN_SLT, 0, 1, 9));
    prog.push_back(br(OP_BNE, 9, 0, l1 - (prog.size() + 1)));
    // kernel 2: scalar checksum of the blend output
    prog.push_back(i_type(OP_ADDIU, 0, 10, A_OUT));
    prog.push_back(i_type(OP_ADDIU, 0, 11, N / 2));
    prog.push_back(i_type(OP_ADDIU, 0, 12, 0));
    l2 = prog.size();
    prog.push_back(i_type(OP_LW, 10, 13, 0));
    prog.push_back(r_type(FN_ADDU, 12, 13, 12));
    prog.push_back(i_type(OP_ADDIU, 10, 10, 4));
    prog.push_back(i_type(OP_ADDIU, 11, 11, -1));
    prog.push_back(br(OP_BNE, 11, 0, l2 - (prog.size() + 1)));
    prog.push_back(i_type(OP_SW, 0, 12, A_SUM));
    // kernel 3: RGB to luma, stride-3 byte loads
    prog.push_back(i_type(OP_ADDIU, 0, 1, NP));
    prog.push_back(i_type(OP_ADDIU, 0, 2, A_RGB));
    prog.push_back(i_type(OP_ADDIU, 0, 4, A_Y));
    prog.push_back(i_type(OP_ADDIU, 0, 5, 3));
    prog.push_back(i_type(OP_ADDIU, 0, 18, 1));
    prog.push_back(i_type(OP_ADDIU, 0, 14, 77));
    prog.push_back(i_type(OP_ADDIU, 0, 15, 150));
    prog.push_back(i_type(OP_ADDIU, 0, 16, 29));
    l3 = prog.size();
    prog.push_back(vctl(VSETVL, 1));
    prog.push_back(vctl(VSETSTR, 5));
    prog.push_back(vmem(VLD, 1, 2, 0));
    prog.push_back(i_type(OP_ADDIU, 2, 17, 1));
    prog.push_back(vmem(VLD, 2, 17, 0));
    prog.push_back(i_type(OP_ADDIU, 2, 17, 2));
    prog.push_back(vmem(VLD, 3, 17, 0));
    prog.push_back(vop(VMUL, 1, 1, 14, 1));
    prog.push_back(vop(VMUL, 2, 2, 15, 1));
    prog.push_back(vop(VMUL, 3, 3, 16, 1));
    prog.push_back(vop(VADD, 1, 1, 2));
    prog.push_back(vop(VADD, 1, 1, 3));
    prog.push_back(vop(VSRL, 1, 1, 7, 1));
    prog.push_back(vctl(VSETSTR, 18));
    prog.push_back(vmem(VST, 1, 4, 0));
    prog.push_back(i_type(OP_ADDIU, 2, 2, 3 * MVL));
    prog.push_back(i_type(OP_ADDIU, 4, 4, MVL));
    prog.push_back(i_type(OP_ADDIU, 1, 1, -MVL));
    prog.push_back(r_type(FN_SLT, 0, 1, 9));
    prog.push_back(br(OP_BNE, 9, 0, l3 - (prog.size() + 1)));
    prog.push_back(halt());
  endtask

  // ---------------- event counters ----------------
  int n_ev [7];
  int n_serial = 0, n_vq_full = 0, n_vbuf = 0;
  always @(posedge clk) if (rst_n) begin
    cycles++;
    for (int i = 0; i < 7; i++) if (events[i]) n_ev[i]++;
    if (u_top.u_scalar.de_valid && u_top.u_scalar.e_is_mem && u_top.vmem_busy) n_serial++;
    if (u_top.v_req && !u_top.v_ready) n_vq_full++;
    if (u_top.u_dcache.wb_push) n_vbuf++;
  end

  initial begin
    #(64'd10 * (MAXCYC + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] a [N], b [N];
    logic [7:0]  rgb [3*NP];
    logic [31:0] sum;
    string names [7] = '{"mispredict", "control overlap", "vector retire", "icache miss",
                         "dcache miss", "prefetch", "write-back"};
    for (int i = 0; i < 7; i++) n_ev[i] = 0;
    build_program();
    for (int i = 0; i < prog.size(); i++) u_mem.wr_word(4 * i, prog[i]);
    for (int i = 0; i < N; i++) begin
      a[i] = 16'($urandom); b[i] = 16'($urandom);
      poke_b(A_A + 2*i, a[i][7:0]); poke_b(A_A + 2*i + 1, a[i][15:8]);
      poke_b(A_B + 2*i, b[i][7:0]); poke_b(A_B + 2*i + 1, b[i][15:8]);
    end
    for (int i = 0; i < 3*NP; i++) begin rgb[i] = 8'($urandom); poke_b(A_RGB + i, rgb[i]); end

    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!done && cycles < MAXCYC) @(negedge clk);
    // let the data cache's dirty-line buffer drain before reading memory back
    while (u_top.u_dcache.wb_cnt != 0 && cycles < MAXCYC) @(negedge clk);
    check(done, 1, "program finished");
    $display("program of %0d instructions finished in %0d cycles", prog.size(), cycles);

    // kernel 1
    sum = 0;
    for (int i = 0; i < N; i++) begin
      logic [31:0] y; logic [15:0] got;
      y = (32'(a[i]) * ALPHA + 32'(b[i]) * (256 - ALPHA)) >> 8;
      got = {peek_b(A_OUT + 2*i + 1), peek_b(A_OUT + 2*i)};
      check(got, y[15:0], $sformatf("blend pixel %0d", i));
      sum += (i % 2 == 0) ? 32'(y[15:0]) : 32'(y[15:0]) << 16;
    end
    // kernel 2
    check(peek(A_SUM), sum, "scalar checksum");
    // kernel 3
    for (int i = 0; i < NP; i++) begin
      logic [31:0] y;
      y = (32'(rgb[3*i]) * 77 + 32'(rgb[3*i+1]) * 150 + 32'(rgb[3*i+2]) * 29) >> 8;
      check(peek_b(A_Y + i), y[7:0], $sformatf("luma pixel %0d", i));
    end
    check(peek_b(A_Y + NP), 8'h00, "no store past VL");

    for (int i = 0; i < 7; i++) begin
      $display("%-16s %0d", names[i], n_ev[i]);
      check(n_ev[i] > 0, 1, {names[i], " happened"});
    end
    $display("%-16s %0d", "serialised", n_serial);
    $display("%-16s %0d", "queue full", n_vq_full);
    check(n_serial > 0, 1, "serialised scalar access happened");
    check(n_vq_full > 0, 1, "vector queue back-pressure happened");
    $display("%-16s %0d", "victim buffered", n_vbuf);
    check(n_vbuf > 0, 1, "dirty victim of a prefetch buffered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
