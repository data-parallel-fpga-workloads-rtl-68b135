// tb_scalar_mips: runs a small program on the scalar core with stand-ins for
// the instruction cache (random misses), data cache (random stalls) and
// vector coprocessor (random back-pressure, random vmem_busy). The program
// sums an array in a loop (load-use forwarding, a backward branch the 1-bit
// table first mispredicts), calls and returns (JAL/JR), uses byte loads and
// stores, shifts, a forward branch, and issues two vector instructions. The
// results in data memory, the vector instructions and their scalar operands
// are compared with values worked out by hand below; no data access may be
// made while vmem_busy is high. Also checked: with no stalls the loop runs at
// one instruction per cycle plus two cycles per misprediction.
module tb_scalar_mips;
  import vespa_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_mispredict = 0, n_vstall = 0, n_busy_block = 0;
  bit stalls_on = 1;

  logic imem_req, imem_hit, dreq, dwe, dack, vreq, vready, vmem_busy, halted, ev_mispredict;
  logic [31:0] imem_addr, imem_rdata, daddr, dwdata, drdata, vinstr, vrs_val, vrt_val;
  logic [3:0] dbe;

  scalar_mips dut (.*);

  logic [31:0] imem [64];
  logic [31:0] dmem [256];
  logic r_i, r_d, r_v, r_b;
  always @(posedge clk) begin
    r_i <= stalls_on && ($urandom_range(0, 4) == 0);
    r_d <= stalls_on && ($urandom_range(0, 2) == 0);
    r_v <= stalls_on && ($urandom_range(0, 2) == 0);
    r_b <= stalls_on && ($urandom_range(0, 5) == 0);
  end
  assign imem_hit   = imem_req && !r_i;
  assign imem_rdata = imem[imem_addr[7:2]];
  assign dack       = dreq && !r_d;
  assign drdata     = dmem[daddr[9:2]];
  assign vready     = !r_v;
  assign vmem_busy  = r_b;

  logic [31:0] vlog_i [$], vlog_s [$], vlog_t [$];
  always @(posedge clk) if (rst_n) begin
    if (dack && dwe) for (int b = 0; b < 4; b++) if (dbe[b]) dmem[daddr[9:2]][b*8 +: 8] <= dwdata[b*8 +: 8];
    if (vreq && vready) begin vlog_i.push_back(vinstr); vlog_s.push_back(vrs_val); vlog_t.push_back(vrt_val); end
    if (vreq && !vready) n_vstall++;
    if (ev_mispredict) n_mispredict++;
    if (dreq && vmem_busy) begin failures++; $display("FAIL data access while vmem_busy"); end
    if (vmem_busy && dut.de_valid && dut.e_is_mem) n_busy_block++;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic load_program();
    for (int i = 0; i < 64; i++) imem[i] = halt();
    imem[0]  = i_type(OP_ADDIU, 0, 1, 32'h100);
    imem[1]  = i_type(OP_ADDIU, 0, 2, 10);
    imem[2]  = i_type(OP_ADDIU, 0, 3, 0);
    imem[3]  = i_type(OP_ADDIU, 0, 8, 5);
    imem[4]  = i_type(OP_LW, 1, 4, 0);
    imem[5]  = r_type(FN_ADDU, 3, 4, 3);
    imem[6]  = i_type(OP_ADDIU, 1, 1, 4);
    imem[7]  = i_type(OP_ADDIU, 2, 2, -1);
    imem[8]  = br(OP_BNE, 2, 0, -5);
    imem[9]  = i_type(OP_SW, 0, 3, 32'h200);
    imem[10] = j_type(OP_JAL, 22 * 4);
    imem[11] = i_type(OP_SW, 0, 5, 32'h204);
    imem[12] = i_type(OP_LBU, 0, 6, 32'h101);
    imem[13] = i_type(OP_SB, 0, 6, 32'h20D);
    imem[14] = vop(VADD, 1, 3, 8, 1);
    imem[15] = vmem(VLD, 4, 1, 2);
    imem[16] = r_type(FN_SLL, 0, 3, 7, 3);
    imem[17] = i_type(OP_SW, 0, 7, 32'h208);
    imem[18] = br(OP_BEQ, 0, 0, 1);
    imem[19] = i_type(OP_ADDIU, 0, 8, 99);
    imem[20] = i_type(OP_SW, 0, 8, 32'h210);
    imem[21] = halt();
    imem[22] = i_type(OP_ADDIU, 3, 5, 7);
    imem[23] = r_type(FN_JR, 31, 0, 0);
  endtask

  task automatic run(output int cycles);
    for (int i = 0; i < 256; i++) dmem[i] = 0;
    for (int i = 0; i < 10; i++) dmem[(32'h100 >> 2) + i] = 32'h0102_0300 + i;
    vlog_i.delete(); vlog_s.delete(); vlog_t.delete();
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    cycles = 0;
    while (!halted && cycles < 5000) begin @(negedge clk); cycles++; end
  endtask

  task automatic check_results();
    logic [31:0] sum; sum = 10 * 32'h0102_0300 + 45;
    check(halted, 1, "halted");
    check(dmem[32'h200 >> 2], sum, "loop sum");
    check(dmem[32'h204 >> 2], sum + 7, "call result");
    check(dmem[32'h20C >> 2], 32'h0000_0300, "byte load/store");
    check(dmem[32'h208 >> 2], sum << 3, "shift");
    check(dmem[32'h210 >> 2], 5, "forward branch skipped");
    check(vlog_i.size(), 2, "vector instructions issued");
    if (vlog_i.size() == 2) begin
      check(vlog_i[0], vop(VADD, 1, 3, 8, 1), "vector instr 0");
      check(vlog_s[0], sum, "vector instr 0 rs");
      check(vlog_t[0], 5, "vector instr 0 rt");
      check(vlog_i[1], vmem(VLD, 4, 1, 2), "vector instr 1");
      check(vlog_s[1], 32'h128, "vector instr 1 rs");
    end
  endtask

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int cyc;
    load_program();
    // with random stalls
    run(cyc);
    check_results();
    check(n_mispredict > 0, 1, "mispredictions happened");
    check(n_vstall > 0, 1, "vector back-pressure happened");
    check(n_busy_block > 0, 1, "vmem_busy held a data access");
    // no stalls: count cycles. 68 instructions execute (4 set-up, 10 loop
    // iterations of 5, JAL, 2 in the call, 8 after it, the store and BREAK);
    // 3 mispredictions cost 2 cycles each (first and last loop branch, and
    // the taken forward BEQ predicted not-taken), JR always redirects (2),
    // and 2 cycles fill the pipeline.
    stalls_on = 0;
    repeat (3) @(negedge clk);
    n_mispredict = 0;
    run(cyc);
    check_results();
    check(n_mispredict, 3, "mispredictions without stalls");
    check(cyc, 68 + 3 * 2 + 2 + 2, "cycle count without stalls");
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
