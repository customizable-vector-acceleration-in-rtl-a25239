// Instruction encoders used by the testbenches to build test programs:
// RV32I formats, a few common instructions, CSR access and the custom
// vector/scratchpad instructions (custom-1 opcode, funct7 = operation).
package kasm_pkg;
  import klessydra_pkg::*;

  function automatic logic [31:0] enc_r(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] enc_i(int imm, logic [4:0] rs1, logic [2:0] f3,
                                        logic [4:0] rd, logic [6:0] opc);
    logic [31:0] v = 32'(imm);
    return {v[11:0], rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] enc_s(int imm, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [6:0] opc);
    logic [31:0] v = 32'(imm);
    return {v[11:5], rs2, rs1, f3, v[4:0], opc};
  endfunction
  function automatic logic [31:0] enc_b(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [31:0] v = 32'(imm);
    return {v[12], v[10:5], rs2, rs1, f3, v[4:1], v[11], OPC_BRANCH};
  endfunction
  function automatic logic [31:0] enc_j(int imm, logic [4:0] rd);
    logic [31:0] v = 32'(imm);
    return {v[20], v[10:1], v[11], v[19:12], rd, OPC_JAL};
  endfunction

  function automatic logic [31:0] i_addi(logic [4:0] rd, logic [4:0] rs1, int imm);
    return enc_i(imm, rs1, 3'b000, rd, OPC_OPIMM);
  endfunction
  function automatic logic [31:0] i_slli(logic [4:0] rd, logic [4:0] rs1, int sh);
    return enc_i(sh, rs1, 3'b001, rd, OPC_OPIMM);
  endfunction
  function automatic logic [31:0] i_add(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return enc_r(7'b0, rs2, rs1, 3'b000, rd, OPC_OP);
  endfunction
  function automatic logic [31:0] i_sub(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return enc_r(7'b0100000, rs2, rs1, 3'b000, rd, OPC_OP);
  endfunction
  function automatic logic [31:0] i_lui(logic [4:0] rd, logic [31:0] val);
    return {val[31:12], rd, OPC_LUI};
  endfunction
  function automatic logic [31:0] i_lw(logic [4:0] rd, logic [4:0] rs1, int imm);
    return enc_i(imm, rs1, 3'b010, rd, OPC_LOAD);
  endfunction
  function automatic logic [31:0] i_lb(logic [4:0] rd, logic [4:0] rs1, int imm);
    return enc_i(imm, rs1, 3'b000, rd, OPC_LOAD);
  endfunction
  function automatic logic [31:0] i_lhu(logic [4:0] rd, logic [4:0] rs1, int imm);
    return enc_i(imm, rs1, 3'b101, rd, OPC_LOAD);
  endfunction
  function automatic logic [31:0] i_sw(logic [4:0] rs2, logic [4:0] rs1, int imm);
    return enc_s(imm, rs2, rs1, 3'b010, OPC_STORE);
  endfunction
  function automatic logic [31:0] i_sb(logic [4:0] rs2, logic [4:0] rs1, int imm);
    return enc_s(imm, rs2, rs1, 3'b000, OPC_STORE);
  endfunction
  function automatic logic [31:0] i_bne(logic [4:0] rs1, logic [4:0] rs2, int off);
    return enc_b(off, rs2, rs1, 3'b001);
  endfunction
  function automatic logic [31:0] i_blt(logic [4:0] rs1, logic [4:0] rs2, int off);
    return enc_b(off, rs2, rs1, 3'b100);
  endfunction
  function automatic logic [31:0] i_jal(logic [4:0] rd, int off);
    return enc_j(off, rd);
  endfunction
  function automatic logic [31:0] i_csrrw(logic [4:0] rd, logic [11:0] csr, logic [4:0] rs1);
    return {csr, rs1, 3'b001, rd, OPC_SYSTEM};
  endfunction
  function automatic logic [31:0] i_csrrs(logic [4:0] rd, logic [11:0] csr, logic [4:0] rs1);
    return {csr, rs1, 3'b010, rd, OPC_SYSTEM};
  endfunction
  function automatic logic [31:0] i_kv(vop_e op, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return enc_r(7'(op), rs2, rs1, 3'b000, rd, OPC_KVEC);
  endfunction
endpackage
