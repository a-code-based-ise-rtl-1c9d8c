// cbm_asm_pkg: instruction encoders for the testbenches (CBM custom
// instructions and the RV32I subset executed by the core), written from the
// field layouts of the instruction formats.
package cbm_asm_pkg;

  typedef enum int {C_AND = 0, C_OR = 1, C_XOR = 2, C_SLL = 3, C_SRL = 4} cop_e;

  function automatic logic [31:0] cbm_rr(int f, int rd, int rs1, int rs2, int es);
    return {2'(es), 5'b0, 5'(rs2), 5'(rs1), 3'(f), 5'(rd), 7'b0001011};
  endfunction

  function automatic logic [31:0] cbm_ri(int f, int rd, int rs1, int imm, int es);
    return {2'(es), 10'(imm), 5'(rs1), 3'(f), 5'(rd), 7'b0101011};
  endfunction

  function automatic logic [31:0] cbm_prg(int op);
    return {5'b0, 2'(op), 5'b0, 5'b0, 3'b000, 5'b0, 7'b1011011};
  endfunction

  function automatic logic [31:0] cbm_s2r(int rd, int part);
    return {5'b0, 2'(part), 5'b0, 5'b0, 3'b001, 5'(rd), 7'b1011011};
  endfunction

  function automatic logic [31:0] cbm_r2s(int rs1, int part);
    return {5'b0, 2'(part), 5'b0, 5'(rs1), 3'b010, 5'b0, 7'b1011011};
  endfunction

  // RV32I
  function automatic logic [31:0] r_type(int f7, int f3, int rd, int rs1, int rs2);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] i_type(int f3, int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'b0010011};
  endfunction
  function automatic logic [31:0] lui(int rd, logic [31:0] imm);
    return {imm[31:12], 5'(rd), 7'b0110111};
  endfunction
  function automatic logic [31:0] rv_xor(int rd, int rs1, int rs2); return r_type(0, 4, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_add(int rd, int rs1, int rs2); return r_type(0, 0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_and(int rd, int rs1, int rs2); return r_type(0, 7, rd, rs1, rs2); endfunction
  function automatic logic [31:0] rv_sub(int rd, int rs1, int rs2); return r_type(32, 0, rd, rs1, rs2); endfunction
  function automatic logic [31:0] addi(int rd, int rs1, int imm);   return i_type(0, rd, rs1, imm); endfunction
  function automatic logic [31:0] nop();                            return addi(0, 0, 0); endfunction

endpackage
