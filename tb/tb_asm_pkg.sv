// tb_asm_pkg: instruction encoders used by the testbenches to build programs
// for the processor: standard MIPS-I formats for scalar instructions and the
// COP2 layout of vespa_pkg for vector instructions.
package tb_asm_pkg;
  import vespa_pkg::*;

  function automatic logic [31:0] r_type(logic [5:0] fn, int rs, int rt, int rd, int sh = 0);
    return {OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] i_type(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_type(logic [5:0] op, logic [31:0] target);
    return {op, target[27:2]};
  endfunction
  // branch offset in instructions, relative to the next instruction
  function automatic logic [31:0] br(logic [5:0] op, int rs, int rt, int off);
    return {op, 5'(rs), 5'(rt), 16'(off)};
  endfunction
  function automatic logic [31:0] halt();
    return {OP_SPECIAL, 20'h0, FN_BREAK};
  endfunction
  // vector ALU op: vd = va op vb (or va op scalar rt when vs = 1)
  function automatic logic [31:0] vop(vfunc_e f, int vd, int va, int vb, bit vs = 0, bit masked = 0);
    return {OP_COP2, 5'(va), 5'(vb), 5'(vd), masked, 2'b00, vs, 1'b0, 6'(f)};
  endfunction
  // vector load/store: register vd, base in scalar rs, element size code
  function automatic logic [31:0] vmem(vfunc_e f, int vd, int rs, int esz);
    return {OP_COP2, 5'(rs), 5'd0, 5'(vd), 1'b0, 2'(esz), 1'b0, 1'b0, 6'(f)};
  endfunction
  // vector control: value from scalar rs
  function automatic logic [31:0] vctl(vfunc_e f, int rs);
    return {OP_COP2, 5'(rs), 5'd0, 5'd0, 1'b0, 2'b00, 1'b0, 1'b0, 6'(f)};
  endfunction
endpackage
