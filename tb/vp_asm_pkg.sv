// vp_asm_pkg: instruction encoder used by the testbenches to write programs
// for the vector processor (format op[31:27] rd[26:23] rs1[22:19] rs2[18:15]
// imm[14:0], see vp_pkg).
package vp_asm_pkg;
  import vp_pkg::*;

  function automatic logic [31:0] enc(opcode_t op, int rd = 0, int rs1 = 0, int rs2 = 0, int imm = 0);
    return {op, 4'(rd), 4'(rs1), 4'(rs2), 15'(imm)};
  endfunction
endpackage
