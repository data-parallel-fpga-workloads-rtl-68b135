// tb_vmem_unit: random strided vector accesses (L=8 lanes, M=4 slots,
// 32-byte lines, MVL=32). A data-cache stand-in acknowledges after a random
// delay. For every acknowledged group the test recomputes each element's
// address independently and checks the line address, slot offsets, the lane
// entry of each element, that groups never cross a line or exceed M, and that
// all VL elements are covered once and in order. With immediate
// acknowledgement the cycle count must equal the number of groups.
module tb_vmem_unit;
  localparam int L = 8, M = 4, MVL = 32, LB = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, is_store, busy, done, dc_req, dc_we, dc_ack, xb_store, load_commit;
  logic [4:0] vreg, lane_vreg; logic [31:0] base, stride, dc_addr, dc_stride_bytes;
  logic [1:0] esize, xb_esize; logic [7:0] vl, dc_vl;
  logic [4:0] slot_off [M]; logic [M-1:0] slot_valid; logic [2:0] lane_base;
  logic [2:0] lane_entry [L];

  vmem_unit #(.L(L), .M(M), .MVL(MVL), .LINE_B(LB)) dut (.*);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    start = 0; is_store = 0; vreg = 0; base = 0; stride = 0; esize = 0; vl = 0; dc_ack = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int nb, idx, groups, cyc, exp_groups, delay_mode;
      logic [31:0] prev_line;
      esize = 2'($urandom_range(0, 2)); nb = 1 << esize;
      case ($urandom_range(0, 3))
        0: stride = 1; 1: stride = 2; 2: stride = 32'($urandom_range(0, 9)); default: stride = -32'sd1;
      endcase
      base = 32'h1000 + $urandom_range(0, 63) * nb;
      vl = 8'($urandom_range(1, MVL));
      is_store = $urandom_range(0, 1); vreg = 5'($urandom_range(0, 31));
      delay_mode = $urandom_range(0, 1);
      // expected number of groups, computed element by element
      exp_groups = 0; prev_line = 32'hFFFF_FFFF;
      begin
        int in_group; in_group = 0;
        for (int e = 0; e < vl; e++) begin
          logic [31:0] a; a = base + e * stride * nb;
          if (in_group == 0 || a / LB != prev_line || in_group == M) begin
            exp_groups++; in_group = 0; prev_line = a / LB;
          end
          in_group++;
        end
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      check(busy, 1, "busy after start");
      check(dc_we, is_store, "write for store");
      check(dc_vl, vl, "prefetch vl");
      check(dc_stride_bytes, stride * nb, "prefetch byte stride");
      idx = 0; groups = 0; cyc = 0;
      while (busy && cyc < 1000) begin
        int cnt;
        if (delay_mode) repeat ($urandom_range(0, 2)) begin @(negedge clk); cyc++; end
        #1;
        check(dc_req, 1, "request held");
        cnt = 0;
        for (int k = 0; k < M; k++) if (slot_valid[k]) begin
          logic [31:0] a; a = base + (idx + k) * stride * nb;
          check(k, cnt, "contiguous slots");
          check(dc_addr, a & ~32'(LB-1), "line address");
          check(slot_off[k], a % LB, "slot offset");
          check(lane_entry[(idx + k) % L], (idx + k) / L, "lane entry");
          cnt++;
        end
        check(cnt > 0, 1, "group not empty");
        check(lane_base, idx % L, "lane base");
        check(lane_vreg, vreg, "register");
        dc_ack = 1; #1;
        check(load_commit, !is_store, "load commit");
        check(done, (idx + cnt >= vl), "done on last group");
        @(negedge clk); cyc++; dc_ack = 0;
        idx += cnt; groups++;
      end
      check(idx, vl, "all elements covered");
      check(groups, exp_groups, "group count");
      if (!delay_mode) check(cyc, exp_groups, "one cycle per group");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
