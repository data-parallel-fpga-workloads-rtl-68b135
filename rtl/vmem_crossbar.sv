// vmem_crossbar: the vector memory crossbar between a data-cache line and the
// vector lanes.
//
// In one cycle it moves up to M elements between one cache line and M of the
// L lanes (M <= L; M = L is a full crossbar). Slot k carries vector element
// idx+k, which lives in lane (idx+k) mod L; lane_base = idx mod L. For each
// slot the memory unit supplies the element's byte offset inside the line and
// a valid bit; esize gives the element size (0 byte, 1 halfword, 2 word).
//  * Load direction: each lane that receives a slot gets the element's bytes
//    from the line, zero-extended, and the low W bits are kept.
//  * Store direction: each valid slot takes its lane's element (zero-extended
//    from W bits) and places its bytes in the line, with byte enables. If two
//    slots hit the same byte (a zero stride) the higher slot, the later
//    element, wins.
// Purely combinational. Elements must be aligned to their size, so they never
// straddle a line; zero extension and alignment are this design's choices.
module vmem_crossbar #(
  parameter int L      = 16,
  parameter int M      = 16,
  parameter int W      = 32,
  parameter int LINE_B = 64
) (
  input  logic [$clog2(LINE_B)-1:0]    slot_off   [M],
  input  logic [M-1:0]                 slot_valid,
  input  logic [1:0]                   esize,
  input  logic [(L>1?$clog2(L):1)-1:0] lane_base,
  // load direction
  input  logic [LINE_B*8-1:0]          line_in,
  output logic [L-1:0]                 lane_wen,
  output logic [W-1:0]                 lane_wdata [L],
  // store direction
  input  logic [W-1:0]                 lane_rdata [L],
  output logic [LINE_B*8-1:0]          line_out,
  output logic [LINE_B-1:0]            line_mask
);
  function automatic logic [31:0] size_mask(input logic [1:0] sz);
    unique case (sz)
      2'd0:    return 32'h0000_00FF;
      2'd1:    return 32'h0000_FFFF;
      default: return 32'hFFFF_FFFF;
    endcase
  endfunction

  // load: lane j receives slot k = (j - lane_base) mod L
  always_comb begin
    for (int j = 0; j < L; j++) begin
      int k;
      logic [31:0] word;
      k = (j - int'(lane_base) + L) % L;
      word = '0;
      lane_wen[j]   = 1'b0;
      lane_wdata[j] = '0;
      if (k < M) begin
        word = 32'(line_in >> (int'(slot_off[k]) * 8)) & size_mask(esize);
        lane_wen[j]   = slot_valid[k];
        lane_wdata[j] = W'(word);
      end
    end
  end

  // store: slot k takes lane (lane_base + k) mod L
  always_comb begin
    line_out  = '0;
    line_mask = '0;
    for (int k = 0; k < M; k++) begin
      logic [31:0] val;
      int nbytes;
      val    = 32'(lane_rdata[(int'(lane_base) + k) % L]);
      nbytes = 1 << esize;
      if (slot_valid[k]) begin
        for (int b = 0; b < 4; b++) begin
          if (b < nbytes && int'(slot_off[k]) + b < LINE_B) begin
            line_out[(int'(slot_off[k]) + b)*8 +: 8] = val[b*8 +: 8];
            line_mask[int'(slot_off[k]) + b]         = 1'b1;
          end
        end
      end
    end
  end
endmodule
