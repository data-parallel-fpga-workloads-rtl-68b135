// tb_vmem_crossbar: random loads and stores through an 8-lane, 4-slot
// crossbar on a 32-byte line, compared with a byte-level reference model.
module tb_vmem_crossbar;
  localparam int L = 8, M = 4, W = 32, LB = 32;
  int checks = 0, failures = 0;
  logic [4:0]  slot_off [M];
  logic [M-1:0] slot_valid;
  logic [1:0]  esize;
  logic [2:0]  lane_base;
  logic [LB*8-1:0] line_in, line_out;
  logic [L-1:0] lane_wen;
  logic [W-1:0] lane_wdata [L];
  logic [W-1:0] lane_rdata [L];
  logic [LB-1:0] line_mask;

  vmem_crossbar #(.L(L), .M(M), .W(W), .LINE_B(LB)) dut (.*);

  task automatic check(input logic [255:0] got, input logic [255:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) begin
      int nb;
      logic [LB*8-1:0] exp_line; logic [LB-1:0] exp_mask;
      esize = 2'($urandom_range(0, 2)); nb = 1 << esize;
      lane_base = 3'($urandom_range(0, L-1));
      for (int w = 0; w < LB/4; w++) line_in[w*32 +: 32] = $urandom;
      for (int j = 0; j < L; j++) lane_rdata[j] = $urandom;
      for (int k = 0; k < M; k++) begin
        slot_off[k] = 5'($urandom_range(0, LB/nb - 1) * nb);
        slot_valid[k] = $urandom_range(0, 3) != 0;
      end
      #1;
      // load reference
      for (int j = 0; j < L; j++) begin
        int k; logic [31:0] v;
        k = (j - lane_base + L) % L;
        if (k < M && slot_valid[k]) begin
          v = 0;
          for (int b = 0; b < nb; b++) v[b*8 +: 8] = line_in[(slot_off[k] + b)*8 +: 8];
          check(256'(lane_wen[j]), 256'(1), "load enable");
          check(256'(lane_wdata[j]), 256'(v), "load data");
        end else check(256'(lane_wen[j]), 256'(0), "load no enable");
      end
      // store reference
      exp_line = '0; exp_mask = '0;
      for (int k = 0; k < M; k++) if (slot_valid[k]) begin
        logic [31:0] v; v = lane_rdata[(lane_base + k) % L];
        for (int b = 0; b < nb; b++) begin
          exp_line[(slot_off[k] + b)*8 +: 8] = v[b*8 +: 8];
          exp_mask[slot_off[k] + b] = 1'b1;
        end
      end
      check(256'(line_mask), 256'(exp_mask), "store mask");
      for (int b = 0; b < LB; b++) if (exp_mask[b])
        check(256'(line_out[b*8 +: 8]), 256'(exp_line[b*8 +: 8]), "store byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
