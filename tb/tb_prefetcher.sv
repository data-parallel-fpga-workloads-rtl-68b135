// tb_prefetcher: checks the prefetch line count against the formulas:
// DPV mode, ceil(DPV*VL*stride_bytes/LINE_B) for positive byte strides below
// a line, else 0; the constant variant (DPV_BY_VL = 0),
// ceil(DPV*stride_bytes/LINE_B) under the same conditions; DPK mode, DPK
// lines for every miss; all capped at NLINES-1.
module tb_prefetcher;
  int checks = 0, failures = 0;
  logic is_vec; logic [7:0] vl; logic [31:0] sb;
  logic [15:0] n_dpv, n_dpk, n_cap, n_cst;

  prefetcher #(.LINE_B(64), .NLINES(256), .DPK(0), .DPV(8)) u_dpv (.is_vec, .vl, .stride_bytes(sb), .n_extra(n_dpv));
  prefetcher #(.LINE_B(64), .NLINES(256), .DPK(3), .DPV(0)) u_dpk (.is_vec, .vl, .stride_bytes(sb), .n_extra(n_dpk));
  prefetcher #(.LINE_B(16), .NLINES(8),   .DPK(0), .DPV(8)) u_cap (.is_vec, .vl, .stride_bytes(sb), .n_extra(n_cap));
  prefetcher #(.LINE_B(64), .NLINES(256), .DPK(0), .DPV(200), .DPV_BY_VL(1'b0)) u_cst (.is_vec, .vl, .stride_bytes(sb), .n_extra(n_cst));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d (vec=%0d vl=%0d sb=%0d)", what, got, exp, is_vec, vl, $signed(sb)); end
  endtask

  initial begin
    // a worked example: VL=64 words, unit stride -> 8*64*4/64 = 32 lines
    is_vec = 1; vl = 64; sb = 4; #1;
    check(n_dpv, 32, "8VL unit-stride words");
    check(n_dpk, 3, "DPK fixed");
    check(n_cap, 7, "cap at NLINES-1");
    check(n_cst, 13, "200 unit-stride words, whatever VL");
    is_vec = 0; #1; check(n_dpv, 0, "scalar miss, DPV mode"); check(n_dpk, 3, "scalar miss, DPK mode");
    is_vec = 1; sb = 64; #1; check(n_dpv, 0, "large stride");
    sb = 32'hFFFF_FFFC; #1; check(n_dpv, 0, "negative stride");
    for (int t = 0; t < 200; t++) begin
      int exp;
      is_vec = $urandom_range(0, 1); vl = 8'($urandom_range(0, 64)); sb = $urandom_range(0, 80);
      #1;
      exp = (is_vec && sb > 0 && sb < 64) ? (8 * vl * sb + 63) / 64 : 0;
      if (exp > 255) exp = 255;
      check(n_dpv, exp, "random DPV");
      exp = (is_vec && sb > 0 && sb < 64) ? (200 * sb + 63) / 64 : 0;
      check(n_cst, exp, "random constant DPV");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
