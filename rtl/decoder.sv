// Decode stage logic: turns a 32-bit instruction word into the dec_t record.
//
// Recognises the RV32I base set (LUI, AUIPC, JAL, JALR, branches, loads,
// stores, register-immediate and register-register operations), the CSR
// instructions (CSRRW/S/C and their immediate forms) and the custom
// scratchpad/vector extension: kmemld, kmemstr, kaddv, ksubv, kvmul, kvred,
// kdotp, ksvaddsc, ksvaddrf, ksvmulsc, ksvmulrf, kdotpps, ksrlv, ksrav,
// krelu, kvslt, ksvslt, kvcp and kbcst. kmemld/kmemstr go to the load/store
// unit (unit U_KMEM), the others to the MFU (unit U_MFU). FENCE decodes as a
// no-op. Anything else gives valid = 0 and is executed as a no-op.
// Purely combinational. The instruction list follows the extension; the bit
// encoding of the custom instructions is this design's (see klessydra_pkg).
module decoder
  import klessydra_pkg::*;
(
  input  logic [31:0] instr_i,
  output dec_t        dec_o
);
  logic [6:0] opc, f7;
  logic [2:0] f3;
  assign opc = instr_i[6:0];
  assign f3  = instr_i[14:12];
  assign f7  = instr_i[31:25];

  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;
  assign imm_i = {{20{instr_i[31]}}, instr_i[31:20]};
  assign imm_s = {{20{instr_i[31]}}, instr_i[31:25], instr_i[11:7]};
  assign imm_b = {{19{instr_i[31]}}, instr_i[31], instr_i[7], instr_i[30:25], instr_i[11:8], 1'b0};
  assign imm_u = {instr_i[31:12], 12'b0};
  assign imm_j = {{11{instr_i[31]}}, instr_i[31], instr_i[19:12], instr_i[20], instr_i[30:21], 1'b0};

  always_comb begin
    dec_o          = '0;
    dec_o.unit     = U_NONE;
    dec_o.alu_op   = ALU_ADD;
    dec_o.br_op    = BR_EQ;
    dec_o.csr_op   = CSR_RW;
    dec_o.vop      = V_ADDV;
    dec_o.rd       = instr_i[11:7];
    dec_o.rs1      = instr_i[19:15];
    dec_o.rs2      = instr_i[24:20];
    dec_o.csr_addr = instr_i[31:20];
    unique case (opc)
      OPC_LUI: begin
        dec_o.valid = 1'b1; dec_o.unit = U_ALU; dec_o.alu_op = ALU_PASSB;
        dec_o.b_is_imm = 1'b1; dec_o.imm = imm_u; dec_o.rd_we = 1'b1;
      end
      OPC_AUIPC: begin
        dec_o.valid = 1'b1; dec_o.unit = U_ALU; dec_o.alu_op = ALU_ADD;
        dec_o.a_is_pc = 1'b1; dec_o.b_is_imm = 1'b1; dec_o.imm = imm_u; dec_o.rd_we = 1'b1;
      end
      OPC_JAL: begin
        dec_o.valid = 1'b1; dec_o.unit = U_JAL; dec_o.imm = imm_j; dec_o.rd_we = 1'b1;
      end
      OPC_JALR: begin
        dec_o.valid = (f3 == 3'b000); dec_o.unit = U_JALR; dec_o.imm = imm_i; dec_o.rd_we = 1'b1;
      end
      OPC_BRANCH: begin
        dec_o.unit = U_BRANCH; dec_o.imm = imm_b; dec_o.valid = 1'b1;
        unique case (f3)
          3'b000: dec_o.br_op = BR_EQ;
          3'b001: dec_o.br_op = BR_NE;
          3'b100: dec_o.br_op = BR_LT;
          3'b101: dec_o.br_op = BR_GE;
          3'b110: dec_o.br_op = BR_LTU;
          3'b111: dec_o.br_op = BR_GEU;
          default: dec_o.valid = 1'b0;
        endcase
      end
      OPC_LOAD: begin
        dec_o.unit = U_LOAD; dec_o.imm = imm_i; dec_o.rd_we = 1'b1;
        dec_o.mem_size = f3[1:0]; dec_o.mem_uns = f3[2];
        dec_o.valid = (f3 inside {3'b000, 3'b001, 3'b010, 3'b100, 3'b101});
      end
      OPC_STORE: begin
        dec_o.unit = U_STORE; dec_o.imm = imm_s; dec_o.mem_size = f3[1:0];
        dec_o.valid = (f3 inside {3'b000, 3'b001, 3'b010});
      end
      OPC_OPIMM, OPC_OP: begin
        dec_o.valid = 1'b1; dec_o.unit = U_ALU; dec_o.rd_we = 1'b1;
        dec_o.b_is_imm = (opc == OPC_OPIMM); dec_o.imm = imm_i;
        unique case (f3)
          3'b000: dec_o.alu_op = (opc == OPC_OP && f7[5]) ? ALU_SUB : ALU_ADD;
          3'b001: dec_o.alu_op = ALU_SLL;
          3'b010: dec_o.alu_op = ALU_SLT;
          3'b011: dec_o.alu_op = ALU_SLTU;
          3'b100: dec_o.alu_op = ALU_XOR;
          3'b101: dec_o.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
          3'b110: dec_o.alu_op = ALU_OR;
          default: dec_o.alu_op = ALU_AND;
        endcase
      end
      OPC_FENCE: begin
        dec_o.valid = 1'b1; dec_o.unit = U_NONE;
      end
      OPC_SYSTEM: begin
        if (f3 != 3'b000 && f3 != 3'b100) begin
          dec_o.valid = 1'b1; dec_o.unit = U_CSR; dec_o.rd_we = 1'b1;
          dec_o.csr_imm = f3[2];
          unique case (f3[1:0])
            2'b01:   dec_o.csr_op = CSR_RW;
            2'b10:   dec_o.csr_op = CSR_RS;
            default: dec_o.csr_op = CSR_RC;
          endcase
        end
      end
      OPC_KVEC: begin
        if (f3 == 3'b000 && f7 >= 7'd1 && f7 <= 7'd19) begin
          dec_o.valid = 1'b1;
          dec_o.vop   = vop_e'(f7);
          dec_o.unit  = (f7 == 7'd1 || f7 == 7'd2) ? U_KMEM : U_MFU;
        end
      end
      default: ;
    endcase
  end
endmodule
