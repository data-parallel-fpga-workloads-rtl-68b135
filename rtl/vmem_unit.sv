// vmem_unit: address generation and sequencing for vector loads and stores.
//
// A strided vector access touches elements idx = 0 .. VL-1 at addresses
// base + idx * stride * size. Each cycle the unit looks at the next M
// elements; those that are in range (idx < VL) and lie in the same cache line
// as the first one form this cycle's group (a contiguous run of slots). It
// requests that line from the data cache (a read for a load; a write with
// byte enables, built by the crossbar, for a store) and, when the cache
// acknowledges, advances by the group size. A unit-stride access with a full
// crossbar thus moves one cache line per cycle; a large stride moves one
// element per cycle. The grouping rule is this design's reading of "a crossbar
// routes each byte in a cache line to/from M of the L lanes in a given cycle".
//
// Outputs for the crossbar: per-slot byte offset and valid bit, and the lane
// of slot 0 (lane_base). For the lanes: the register and, per lane, the entry
// that lane's element of this group occupies. The data-cache request carries
// the vector length and byte stride for the prefetcher.
//
// Handshake: start (one cycle, unit idle) loads the instruction; busy stays
// high until the last group is acknowledged; done pulses on that cycle.
module vmem_unit #(
  parameter int L      = 16,
  parameter int M      = 16,
  parameter int MVL    = 64,
  parameter int LINE_B = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          is_store,
  input  logic [4:0]                    vreg,
  input  logic [31:0]                   base,
  input  logic [31:0]                   stride,   // in elements, signed
  input  logic [1:0]                    esize,
  input  logic [7:0]                    vl,
  output logic                          busy,
  output logic                          done,
  // data cache request
  output logic                          dc_req,
  output logic                          dc_we,
  output logic [31:0]                   dc_addr,
  output logic [7:0]                    dc_vl,
  output logic [31:0]                   dc_stride_bytes,
  input  logic                          dc_ack,
  // crossbar control
  output logic [$clog2(LINE_B)-1:0]     slot_off [M],
  output logic [M-1:0]                  slot_valid,
  output logic [(L>1?$clog2(L):1)-1:0]  lane_base,
  output logic [1:0]                    xb_esize,
  output logic                          xb_store,
  // lanes
  output logic [4:0]                    lane_vreg,
  output logic [$clog2(MVL/L+1)-1:0]    lane_entry [L],
  output logic                          load_commit
);
  localparam int OFFW = $clog2(LINE_B);
  localparam int LBW  = (L > 1) ? $clog2(L) : 1;
  localparam int EW   = $clog2(MVL/L+1);

  logic        busy_q, store_q;
  logic [4:0]  vreg_q;
  logic [31:0] sb_q;        // byte stride
  logic [1:0]  esize_q;
  logic [7:0]  vl_q, idx_q;
  logic [31:0] cur_q;       // address of element idx_q

  logic [31:0] slot_addr [M+1];
  int          cnt;

  always_comb begin
    logic run;
    run = 1'b1;
    cnt = 0;
    for (int k = 0; k <= M; k++) begin
      slot_addr[k] = cur_q + 32'(k) * sb_q;
    end
    for (int k = 0; k < M; k++) begin
      slot_valid[k] = run && (32'(idx_q) + 32'(k) < 32'(vl_q)) &&
                      (slot_addr[k][31:OFFW] == cur_q[31:OFFW]);
      run           = slot_valid[k];
      slot_off[k]   = slot_addr[k][OFFW-1:0];
      if (slot_valid[k]) cnt = k + 1;
    end
  end

  assign lane_base = LBW'(int'(idx_q) % L);

  always_comb begin
    for (int j = 0; j < L; j++) begin
      int kj;
      kj            = (j - int'(lane_base) + L) % L;
      lane_entry[j] = EW'((int'(idx_q) + kj) / L);
    end
  end

  assign busy            = busy_q;
  assign dc_req          = busy_q;
  assign dc_we           = store_q;
  assign dc_addr         = {cur_q[31:OFFW], {OFFW{1'b0}}};
  assign dc_vl           = vl_q;
  assign dc_stride_bytes = sb_q;
  assign xb_esize        = esize_q;
  assign xb_store        = store_q;
  assign lane_vreg       = vreg_q;
  assign load_commit     = busy_q && dc_ack && !store_q;

  logic last_group;
  assign last_group = (32'(idx_q) + 32'(cnt) >= 32'(vl_q));
  assign done       = busy_q && dc_ack && last_group;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      store_q <= 1'b0;
      vreg_q  <= '0;
      sb_q    <= '0;
      esize_q <= '0;
      vl_q    <= '0;
      idx_q   <= '0;
      cur_q   <= '0;
    end else if (!busy_q) begin
      if (start && vl != 8'd0) begin
        busy_q  <= 1'b1;
        store_q <= is_store;
        vreg_q  <= vreg;
        sb_q    <= stride << esize;
        esize_q <= esize;
        vl_q    <= vl;
        idx_q   <= '0;
        cur_q   <= base;
      end
    end else if (dc_ack) begin
      idx_q <= idx_q + 8'(cnt);
      cur_q <= slot_addr[cnt];
      if (last_group) busy_q <= 1'b0;
    end
  end

  // The group always holds at least the first element.
  assert property (@(posedge clk) disable iff (!rst_n) busy_q |-> slot_valid[0]);
endmodule
