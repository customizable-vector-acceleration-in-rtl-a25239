// Self-checking test of the decoder: instructions built with the kasm_pkg
// encoders are decoded and the unit, operation, register fields and
// immediates are compared with the values used to build them, for RV32I,
// CSR and every custom vector/scratchpad instruction.
module tb_decoder;
  import klessydra_pkg::*;
  import kasm_pkg::*;
  logic [31:0] instr; dec_t d;
  decoder dut (.instr_i(instr), .dec_o(d));
  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [4:0] rd, rs1, rs2; int imm;
      rd = 5'($urandom); rs1 = 5'($urandom); rs2 = 5'($urandom);
      imm = $signed($urandom_range(0, 4095)) - 2048;
      instr = i_addi(rd, rs1, imm); #1;
      check("addi unit", 32'(d.unit), 32'(U_ALU)); check("addi op", 32'(d.alu_op), 32'(ALU_ADD));
      check("addi imm", d.imm, 32'(imm)); check("addi rd", 32'(d.rd), 32'(rd)); check("addi rs1", 32'(d.rs1), 32'(rs1));
      check("addi b_is_imm", 32'(d.b_is_imm), 1); check("addi we", 32'(d.rd_we), 1);
      instr = i_sub(rd, rs1, rs2); #1;
      check("sub op", 32'(d.alu_op), 32'(ALU_SUB)); check("sub rs2", 32'(d.rs2), 32'(rs2)); check("sub b_is_imm", 32'(d.b_is_imm), 0);
      instr = i_sw(rs2, rs1, imm); #1;
      check("sw unit", 32'(d.unit), 32'(U_STORE)); check("sw imm", d.imm, 32'(imm)); check("sw size", 32'(d.mem_size), 2);
      check("sw we", 32'(d.rd_we), 0);
      instr = i_lhu(rd, rs1, imm); #1;
      check("lhu unit", 32'(d.unit), 32'(U_LOAD)); check("lhu size", 32'(d.mem_size), 1); check("lhu uns", 32'(d.mem_uns), 1);
      instr = i_bne(rs1, rs2, imm * 2); #1;
      check("bne unit", 32'(d.unit), 32'(U_BRANCH)); check("bne op", 32'(d.br_op), 32'(BR_NE)); check("bne imm", d.imm, 32'(imm * 2));
      instr = i_jal(rd, imm * 256); #1;
      check("jal unit", 32'(d.unit), 32'(U_JAL)); check("jal imm", d.imm, 32'(imm * 256));
      instr = i_lui(rd, $urandom); #1;
      check("lui imm", d.imm, {instr[31:12], 12'b0}); check("lui op", 32'(d.alu_op), 32'(ALU_PASSB));
      instr = i_csrrw(rd, CSR_MVSIZE, rs1); #1;
      check("csrrw unit", 32'(d.unit), 32'(U_CSR)); check("csrrw addr", 32'(d.csr_addr), 32'(CSR_MVSIZE));
      check("csrrw op", 32'(d.csr_op), 32'(CSR_RW));
      instr = i_csrrs(rd, CSR_MHARTID, 0); #1;
      check("csrrs op", 32'(d.csr_op), 32'(CSR_RS));
      for (int v = 1; v <= 19; v++) begin
        instr = i_kv(vop_e'(v), rd, rs1, rs2); #1;
        check("kv valid", 32'(d.valid), 1);
        check("kv vop", 32'(d.vop), 32'(v));
        check("kv unit", 32'(d.unit), (v <= 2) ? 32'(U_KMEM) : 32'(U_MFU));
        check("kv rd", 32'(d.rd), 32'(rd)); check("kv rs1", 32'(d.rs1), 32'(rs1)); check("kv rs2", 32'(d.rs2), 32'(rs2));
        check("kv no reg write", 32'(d.rd_we), 0);
      end
      instr = i_kv(vop_e'(7'd20), rd, rs1, rs2); #1;
      check("unknown custom op", 32'(d.valid), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
