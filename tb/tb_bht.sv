// tb_bht: self-checking test of the 1-bit branch history table.
// A reference array models the table; random updates and lookups are
// compared against it, and aliasing between PCs that share an entry is
// checked explicitly.
module tb_bht;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [31:0] rd_pc, upd_pc;
  logic pred, upd_en, upd_taken;
  int checks = 0, failures = 0;
  logic [N-1:0] ref_q;

  bht #(.ENTRIES(N)) dut (.clk, .rst_n, .rd_pc, .pred_taken(pred), .upd_en, .upd_pc, .upd_taken);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    upd_en = 0; upd_pc = 0; upd_taken = 0; rd_pc = 0; ref_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin rd_pc = i*4; #1; check(pred, 1'b0, "reset not-taken"); end
    // one update, then an aliasing PC sees the same entry
    @(negedge clk); upd_en = 1; upd_pc = 32'h40 + 4*3; upd_taken = 1;
    @(negedge clk); upd_en = 0;
    rd_pc = 32'h40 + 4*3; #1; check(pred, 1'b1, "taken after update");
    rd_pc = 32'h40 + 4*3 + 4*N; #1; check(pred, 1'b1, "alias shares entry");
    rd_pc = 32'h40 + 4*4; #1; check(pred, 1'b0, "neighbour untouched");
    ref_q[(32'h40/4 + 3) % N] = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      upd_en = $urandom_range(0, 1); upd_pc = $urandom & 32'hFFFC; upd_taken = $urandom_range(0, 1);
      rd_pc = $urandom & 32'hFFFC;
      #1; check(pred, ref_q[(rd_pc >> 2) % N], "random lookup");
      if (upd_en) ref_q[(upd_pc >> 2) % N] = upd_taken;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
