// prefetcher: decides how many cache lines past a missing line to fetch.
//
// Sequential prefetching: on a data-cache miss, the missing line is fetched
// together with the lines that follow it. Two modes, chosen by parameter:
//  * DPK > 0 (and DPV = 0): every miss also fetches the next DPK lines.
//  * DPV > 0: only vector loads/stores with a low stride prefetch, and they
//    fetch enough lines to hold DPV times the current vector length worth of
//    elements: ceil(DPV * VL * stride_bytes / LINE_B) lines. With
//    DPV_BY_VL = 0, DPV is instead a constant number of elements:
//    ceil(DPV * stride_bytes / LINE_B) lines. Scalar misses and large strides
//    prefetch nothing. Both variants are those of the design; the multiple of
//    VL (DPV = 8) is the default, as in the fastest configuration.
// "Low stride" is this design's choice: a positive byte stride below one
// line, so that at least two elements share a line. The count is capped at
// NLINES-1 so that a prefetch never evicts the line that missed.
//
// Purely combinational: the data cache samples n_extra when a miss starts.
module prefetcher #(
  parameter int LINE_B = 64,
  parameter int NLINES = 256,
  parameter int DPK    = 0,
  parameter int DPV    = 8,
  parameter bit DPV_BY_VL = 1'b1
) (
  input  logic        is_vec,
  input  logic [7:0]  vl,
  input  logic [31:0] stride_bytes,   // signed byte distance between elements
  output logic [15:0] n_extra
);
  localparam int OFFW = $clog2(LINE_B);

  logic        low_stride;
  logic [39:0] bytes;
  logic [39:0] lines;

  assign low_stride = !stride_bytes[31] && (stride_bytes != 0) &&
                      (stride_bytes < 32'(LINE_B));
  assign bytes = DPV_BY_VL ? 40'(DPV) * 40'(vl) * 40'(stride_bytes[OFFW:0])
                           : 40'(DPV) * 40'(stride_bytes[OFFW:0]);
  assign lines = (bytes + 40'(LINE_B - 1)) >> OFFW;

  always_comb begin
    if (DPV > 0) begin
      if (is_vec && low_stride)
        n_extra = (lines > 40'(NLINES - 1)) ? 16'(NLINES - 1) : lines[15:0];
      else
        n_extra = '0;
    end else begin
      n_extra = (DPK > NLINES - 1) ? 16'(NLINES - 1) : 16'(DPK);
    end
  end
endmodule
