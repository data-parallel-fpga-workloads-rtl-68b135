// tb_mem_arbiter: two masters issue random reads and writes to the DDR model
// through the arbiter. Each master checks that every read returns the data it
// (or the other master) last wrote, that read responses go only to their
// requester, and that both masters are served (round-robin) while competing.
module tb_mem_arbiter;
  localparam int LB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int served [2];

  logic [1:0] s_valid, s_we, s_ready, s_rvalid;
  logic [31:0] s_addr [2]; logic [LB*8-1:0] s_wdata [2]; logic [LB*8-1:0] s_rdata;
  logic m_valid, m_we, m_ready, m_rvalid; logic [31:0] m_addr; logic [LB*8-1:0] m_wdata, m_rdata;
  logic [LB*8-1:0] refm [64];

  mem_arbiter #(.LINE_B(LB)) dut (.*);
  ddr_model #(.LINE_B(LB), .NLINES(64), .LAT(2)) mem (.clk, .m_valid, .m_we, .m_addr, .m_wdata, .m_ready, .m_rvalid, .m_rdata);

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic master(input int id, input int n);
    for (int t = 0; t < n; t++) begin
      int line; logic w;
      line = (id == 0) ? $urandom_range(0, 31) : $urandom_range(32, 63);
      w = $urandom_range(0, 1);
      @(negedge clk);
      s_valid[id] = 1; s_we[id] = w; s_addr[id] = line * LB;
      s_wdata[id] = {$urandom, $urandom, $urandom, $urandom};
      #1;
      while (!s_ready[id]) begin @(negedge clk); #1; end
      @(posedge clk);
      if (w) refm[line] = s_wdata[id];
      #1; s_valid[id] = 0;
      served[id]++;
      if (!w) begin
        while (!s_rvalid[id]) begin @(posedge clk); #1; end
        check(s_rdata, refm[line], $sformatf("master %0d read line %0d", id, line));
      end
    end
  endtask

  // a response must go to exactly one master
  always @(posedge clk) if (rst_n && s_rvalid == 2'b11) begin failures++; $display("FAIL both rvalid"); end

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    s_valid = 0; s_we = 0; s_addr[0] = 0; s_addr[1] = 0; s_wdata[0] = 0; s_wdata[1] = 0;
    served[0] = 0; served[1] = 0;
    for (int i = 0; i < 64; i++) refm[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    fork
      master(0, 200);
      master(1, 200);
    join
    check(128'(served[0]), 128'd200, "master 0 served");
    check(128'(served[1]), 128'd200, "master 1 served");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
