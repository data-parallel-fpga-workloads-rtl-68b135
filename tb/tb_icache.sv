// tb_icache: a 256-byte instruction cache with 16-byte lines in front of the
// DDR model. Fetches of random word addresses must return the memory's
// contents; a second fetch of the same line must hit in the same cycle; a
// fetch that changes address during a fill must still install the right line.
module tb_icache;
  localparam int LB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_miss = 0;

  logic req, hit, ev_miss; logic [31:0] addr, rdata;
  logic m_valid, m_we, m_ready, m_rvalid; logic [31:0] m_addr; logic [LB*8-1:0] m_wdata, m_rdata;

  icache #(.SIZE_B(256), .LINE_B(LB)) dut (.clk, .rst_n, .req, .addr, .hit, .rdata,
    .m_valid, .m_we, .m_addr, .m_wdata, .m_ready, .m_rvalid, .m_rdata, .ev_miss);
  ddr_model #(.LINE_B(LB), .NLINES(256), .LAT(3)) mem (.clk, .m_valid, .m_we, .m_addr, .m_wdata, .m_ready, .m_rvalid, .m_rdata);

  always @(posedge clk) if (ev_miss) n_miss++;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [31:0] word_at(input logic [31:0] a);
    return a * 32'h9E3779B1 + 32'h1234;
  endfunction

  task automatic fetch(input logic [31:0] a);
    int n;
    @(negedge clk); req = 1; addr = a; #1;
    n = 0;
    while (!hit && n < 100) begin @(negedge clk); #1; n++; end
    check(rdata, word_at(a), $sformatf("fetch %h", a));
    check(m_we, 0, "icache never writes");
  endtask

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    req = 0; addr = 0;
    for (int a = 0; a < 4096; a += 4) mem.wr_word(a, word_at(a));
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [31:0] a;
      a = $urandom_range(0, 1023) * 4;
      fetch(a);
      // same line again: hit at once
      @(negedge clk); addr = (a & ~32'(LB-1)) | ((a + 4) & 32'(LB-1)); #1;
      check(hit, 1, "same line hits");
      check(rdata, word_at(addr), "same line data");
    end
    // address changes while a fill is under way
    @(negedge clk); req = 1; addr = 32'h800; #1;
    @(negedge clk); addr = 32'h900;
    repeat (10) @(negedge clk);
    addr = 32'h800; #1; check(hit, 1, "line of the miss installed");
    check(rdata, word_at(32'h800), "installed line data");
    check(n_miss > 0, 1, "misses happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
