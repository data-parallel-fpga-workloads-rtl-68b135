// tb_dcache: a small data cache (1 KB, 16-byte lines, DPK=2 sequential
// prefetch) in front of the DDR model. Random word reads and byte-masked
// writes are checked against a flat reference memory; conflict misses force
// dirty write-backs. The test checks a hit is acknowledged in the request's
// own cycle, that a miss also brings in the next DPK lines (the following
// accesses hit without new memory reads), and counts misses, prefetches and
// write-backs, failing if any never happened. Dirty lines evicted by
// prefetched lines must pass through the dirty-line buffer (counted), and at
// the end, once the buffer has drained, every byte held in the cache or in
// memory must match the reference.
module tb_dcache;
  localparam int LB = 16, KB = 1, NL = 1024 / LB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  logic req, we, ack, pf_vec; logic [31:0] addr, sb; logic [7:0] vl;
  logic [LB*8-1:0] wdata, rdata; logic [LB-1:0] wmask;
  logic m_valid, m_we, m_ready, m_rvalid; logic [31:0] m_addr; logic [LB*8-1:0] m_wdata, m_rdata;
  logic ev_miss, ev_prefetch, ev_writeback;
  int n_miss = 0, n_pf = 0, n_wb = 0, n_buf = 0;

  dcache #(.SIZE_KB(KB), .LINE_B(LB), .DPK(2), .DPV(0)) dut (
    .clk, .rst_n, .req, .we, .addr, .wdata, .wmask, .pf_vec, .pf_vl(vl), .pf_stride_bytes(sb),
    .ack, .rdata, .m_valid, .m_we, .m_addr, .m_wdata, .m_ready, .m_rvalid, .m_rdata,
    .ev_miss, .ev_prefetch, .ev_writeback);
  ddr_model #(.LINE_B(LB), .NLINES(1024), .LAT(4)) mem (
    .clk, .m_valid, .m_we, .m_addr, .m_wdata, .m_ready, .m_rvalid, .m_rdata);

  always @(posedge clk) begin
    if (ev_miss) n_miss++;
    if (ev_prefetch) n_pf++;
    if (ev_writeback) n_wb++;
    if (rst_n && dut.wb_push) n_buf++;
  end

  logic [7:0] refm [16384];

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // one access; returns the number of cycles until ack
  task automatic access(input logic w, input logic [31:0] a, input logic [31:0] d, input logic [3:0] be, output int lat);
    int start;
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = {(LB/4){d}}; wmask = LB'(be) << (a % LB);
    start = cycle;
    #1;
    while (!ack) @(negedge clk);
    lat = cycle - start;
    if (!w) begin
      logic [31:0] exp;
      for (int b = 0; b < 4; b++) exp[b*8 +: 8] = refm[a + b];
      check(rdata[(a % LB) * 8 +: 32], exp, $sformatf("read %h", a));
    end else begin
      for (int b = 0; b < 4; b++) if (be[b]) refm[a + b] = d[b*8 +: 8];
    end
    @(negedge clk);
    req = 0;
  endtask

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int lat, reads0;
    req = 0; we = 0; addr = 0; wdata = 0; wmask = 0; pf_vec = 0; vl = 0; sb = 0;
    for (int i = 0; i < 16384; i++) refm[i] = 8'(i * 7 + 3);
    for (int i = 0; i < 16384; i += 4) mem.wr_word(i, {refm[i+3], refm[i+2], refm[i+1], refm[i]});
    repeat (3) @(negedge clk); rst_n = 1;
    // miss, then the two prefetched lines hit with no further memory read
    access(0, 32'h100, 0, 4'hF, lat);
    check(lat > 4, 1, "miss takes memory latency");
    reads0 = mem.n_reads;
    access(0, 32'h110, 0, 4'hF, lat); check(lat, 0, "prefetched line hits at once");
    access(0, 32'h124, 0, 4'hF, lat); check(lat, 0, "second prefetched line hits");
    check(mem.n_reads, reads0, "no memory reads for prefetched lines");
    access(0, 32'h104, 0, 4'hF, lat); check(lat, 0, "hit is same-cycle");
    // random traffic over 16 KB (16x the cache): conflicts and write-backs
    for (int t = 0; t < 1500; t++) begin
      logic [31:0] a; logic [3:0] be;
      a = ($urandom_range(0, 16383 - 4)) & ~32'h3;
      be = ($urandom_range(0, 1)) ? 4'hF : (4'b0001 << $urandom_range(0, 3));
      access($urandom_range(0, 1), a, $urandom, be, lat);
    end
    check(n_miss > 0, 1, "misses happened");
    check(n_pf > 0, 1, "prefetches happened");
    check(n_wb > 0, 1, "write-backs happened");
    check(n_buf > 0, 1, "victims of prefetches were buffered");
    while (dut.wb_cnt != 0) @(negedge clk);
    for (int a = 0; a < 16384; a += 4) begin
      logic [31:0] got, exp; int idx;
      idx = (a / LB) % NL;
      if (dut.valid_q[idx] && 32'(dut.tag_q[idx]) == 32'(a / (LB * NL)))
        got = dut.data_q[idx][(a % LB) * 8 +: 32];
      else
        got = mem.rd_word(a);
      for (int b = 0; b < 4; b++) exp[b*8 +: 8] = refm[a + b];
      check(got, exp, $sformatf("final contents %h", a));
    end
    $display("misses=%0d prefetches=%0d writebacks=%0d buffered=%0d", n_miss, n_pf, n_wb, n_buf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
