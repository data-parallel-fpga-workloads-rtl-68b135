// vespa_pkg: constants shared by the VESPA soft vector processor.
//
// The scalar core runs a subset of the MIPS-I instruction set (standard MIPS
// encodings, no branch delay slot). Vector instructions share the instruction
// stream and are carried in the MIPS COP2 major opcode. The vector instruction
// set follows the kinds of operation the design calls for (integer arithmetic,
// fixed-point saturating arithmetic, min/max/abs, predication through a flag
// register, strided loads and stores, set-vector-length); the bit layout
// below is this design's own:
//
//   [31:26] COP2 (6'b010010)
//   [25:21] va  / scalar rs (base address or control value)
//   [20:16] vb  / scalar rt (scalar operand of a vector-scalar op)
//   [15:11] vd  (destination, or source of a vector store)
//   [10]    masked: write only elements whose flag bit is set
//   [9:8]   element size of a load/store: 0 byte, 1 halfword, 2 word
//   [7]     vector-scalar form: operand b is scalar register rt
//   [5:0]   vector function (vfunc_e)
package vespa_pkg;

  localparam logic [5:0] OP_SPECIAL = 6'h00;
  localparam logic [5:0] OP_J       = 6'h02;
  localparam logic [5:0] OP_JAL     = 6'h03;
  localparam logic [5:0] OP_BEQ     = 6'h04;
  localparam logic [5:0] OP_BNE     = 6'h05;
  localparam logic [5:0] OP_ADDIU   = 6'h09;
  localparam logic [5:0] OP_SLTI    = 6'h0A;
  localparam logic [5:0] OP_SLTIU   = 6'h0B;
  localparam logic [5:0] OP_ANDI    = 6'h0C;
  localparam logic [5:0] OP_ORI     = 6'h0D;
  localparam logic [5:0] OP_XORI    = 6'h0E;
  localparam logic [5:0] OP_LUI     = 6'h0F;
  localparam logic [5:0] OP_COP2    = 6'h12;
  localparam logic [5:0] OP_LBU     = 6'h24;
  localparam logic [5:0] OP_LW      = 6'h23;
  localparam logic [5:0] OP_SB      = 6'h28;
  localparam logic [5:0] OP_SW      = 6'h2B;

  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_SLLV  = 6'h04;
  localparam logic [5:0] FN_SRLV  = 6'h06;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_BREAK = 6'h0D;
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUBU  = 6'h23;
  localparam logic [5:0] FN_AND   = 6'h24;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_XOR   = 6'h26;
  localparam logic [5:0] FN_NOR   = 6'h27;
  localparam logic [5:0] FN_SLT   = 6'h2A;
  localparam logic [5:0] FN_SLTU  = 6'h2B;

  // Vector functions. Codes below 32 are lane ALU operations; their number is
  // the bit index into a lane's OP_EN subsetting mask.
  typedef enum logic [5:0] {
    VADD    = 6'd0,
    VSUB    = 6'd1,
    VMUL    = 6'd2,
    VAND    = 6'd3,
    VOR     = 6'd4,
    VXOR    = 6'd5,
    VSLL    = 6'd6,
    VSRL    = 6'd7,
    VSRA    = 6'd8,
    VMIN    = 6'd9,
    VMAX    = 6'd10,
    VABS    = 6'd11,
    VSADD   = 6'd12,
    VSSUB   = 6'd13,
    VCMPEQ  = 6'd14,
    VCMPLT  = 6'd15,
    VMERGE  = 6'd16,
    VLD     = 6'd32,
    VST     = 6'd33,
    VSETVL  = 6'd48,
    VSETSTR = 6'd49
  } vfunc_e;

  localparam int NUM_VALU_OPS = 17;
  localparam int NVREG        = 32;

  // One decoded vector instruction as it waits in the coprocessor queue.
  typedef struct packed {
    vfunc_e      func;
    logic [4:0]  vd;
    logic [4:0]  va;
    logic [4:0]  vb;
    logic        masked;
    logic [1:0]  esize;
    logic        use_scalar;
    logic [31:0] rs_val;
    logic [31:0] rt_val;
    logic [31:0] stride;
    logic [7:0]  vl;
  } vinstr_t;

  function automatic logic is_vmem(vfunc_e f);
    return (f == VLD) || (f == VST);
  endfunction

  function automatic logic is_vctrl(vfunc_e f);
    return (f == VSETVL) || (f == VSETSTR);
  endfunction

endpackage
