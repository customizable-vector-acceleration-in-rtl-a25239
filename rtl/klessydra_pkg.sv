// Shared definitions of the Klessydra T1 core and its vector co-processor.
//
// Holds the memory map, the instruction-set constants (RV32I plus the custom
// scratchpad/vector extension), the decoded-instruction record passed from
// Decode to Execute and the command record passed to the vector units.
//
// The memory map follows the platform map: 32 KB program memory at 0x0000_0000,
// 1 MB data memory at 0x0010_0000 and the scratchpad (SPM) section at
// 0x0100_0000. The list of vector instructions and the three vector CSRs
// (MVSIZE, MVTYPE, MPSCLFAC) follow the instruction extension; their binary
// encodings and CSR numbers are this design's own choice: every vector
// instruction is an R-type word on the custom-1 major opcode (0101011) with
// funct3 = 0 and funct7 = the vop_e code below.
package klessydra_pkg;

  localparam int unsigned XLEN = 32;

  // ---------------------------------------------------------------- memory map
  localparam logic [31:0] PMEM_BASE = 32'h0000_0000;
  localparam logic [31:0] DMEM_BASE = 32'h0010_0000;
  localparam logic [31:0] SPM_BASE  = 32'h0100_0000;
  localparam logic [31:0] RESET_PC  = 32'h0000_0080;

  // ---------------------------------------------------------------- opcodes
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_FENCE  = 7'b0001111;
  localparam logic [6:0] OPC_SYSTEM = 7'b1110011;
  localparam logic [6:0] OPC_KVEC   = 7'b0101011;  // custom-1

  // ---------------------------------------------------------------- CSRs
  localparam logic [11:0] CSR_MHARTID  = 12'hF14;
  localparam logic [11:0] CSR_MCYCLE   = 12'hB00;
  localparam logic [11:0] CSR_MVSIZE   = 12'hBF0;
  localparam logic [11:0] CSR_MVTYPE   = 12'hBF8;
  localparam logic [11:0] CSR_MPSCLFAC = 12'hBE0;

  // ---------------------------------------------------------------- decoded fields
  typedef enum logic [3:0] {
    U_NONE, U_ALU, U_BRANCH, U_JAL, U_JALR, U_LOAD, U_STORE, U_CSR, U_MFU, U_KMEM
  } unit_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_SRA,
    ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_EQ, BR_NE, BR_LT, BR_GE, BR_LTU, BR_GEU
  } br_op_e;

  typedef enum logic [1:0] { CSR_RW, CSR_RS, CSR_RC } csr_op_e;

  // Vector / scratchpad operations; the value is the funct7 field.
  typedef enum logic [6:0] {
    V_MEMLD   = 7'd1,   // kmemld   (rd)<-SPM, (rs1)<-main memory, rs2 = bytes
    V_MEMSTR  = 7'd2,   // kmemstr  (rd)<-main memory, (rs1)<-SPM, rs2 = bytes
    V_ADDV    = 7'd3,   // kaddv
    V_SUBV    = 7'd4,   // ksubv
    V_VMUL    = 7'd5,   // kvmul
    V_VRED    = 7'd6,   // kvred
    V_DOTP    = 7'd7,   // kdotp
    V_SVADDSC = 7'd8,   // ksvaddsc  scalar at (rs2) in SPM
    V_SVADDRF = 7'd9,   // ksvaddrf  scalar in register rs2
    V_SVMULSC = 7'd10,  // ksvmulsc
    V_SVMULRF = 7'd11,  // ksvmulrf
    V_DOTPPS  = 7'd12,  // kdotpps   dot product with post scaling by MPSCLFAC
    V_SRLV    = 7'd13,  // ksrlv     shift amount in register rs2
    V_SRAV    = 7'd14,  // ksrav
    V_RELU    = 7'd15,  // krelu
    V_VSLT    = 7'd16,  // kvslt
    V_SVSLT   = 7'd17,  // ksvslt    scalar in register rs2
    V_VCP     = 7'd18,  // kvcp
    V_BCST    = 7'd19   // kbcst     scalar in register rs1 broadcast to (rd)
  } vop_e;

  typedef struct packed {
    logic        valid;     // a known instruction
    unit_e       unit;
    alu_op_e     alu_op;
    br_op_e      br_op;
    csr_op_e     csr_op;
    vop_e        vop;
    logic        a_is_pc;   // ALU operand a = PC (AUIPC)
    logic        b_is_imm;  // ALU operand b = immediate
    logic        csr_imm;   // CSR operand is the rs1 field (zimm)
    logic [1:0]  mem_size;  // 0 byte, 1 half, 2 word
    logic        mem_uns;   // unsigned load
    logic        rd_we;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [31:0] imm;
    logic [11:0] csr_addr;
  } dec_t;

  // Command handed to an MFU or to the LSU's burst engine.
  typedef struct packed {
    vop_e        vop;
    logic [1:0]  hart;      // requesting hart (up to 4 harts)
    logic [31:0] rd;        // destination address (value of register rd)
    logic [31:0] rs1;       // first source address (value of register rs1)
    logic [31:0] rs2;       // second source address, scalar or byte count
    logic [31:0] size;      // MVSIZE in bytes at issue
    logic [4:0]  sclfac;    // MPSCLFAC at issue
    logic [1:0]  vtype;     // MVTYPE at issue: element width 0 = 8, 1 = 16, 2 = 32 bits
  } vcmd_t;

  // Operations whose second operand is a vector or scalar in the SPM.
  function automatic logic vop_rs2_is_spm(vop_e op);
    return op inside {V_ADDV, V_SUBV, V_VMUL, V_DOTP, V_DOTPPS, V_VSLT, V_SVADDSC, V_SVMULSC};
  endfunction

  // Operations that read a vector at (rs1).
  function automatic logic vop_rs1_is_spm(vop_e op);
    return op != V_BCST;
  endfunction

  // Operations that produce one scalar word at (rd).
  function automatic logic vop_is_reduction(vop_e op);
    return op inside {V_VRED, V_DOTP, V_DOTPPS};
  endfunction

  // Operations whose scalar is a single word read from (rs2) in the SPM.
  function automatic logic vop_scalar_in_spm(vop_e op);
    return op inside {V_SVADDSC, V_SVMULSC};
  endfunction

endpackage
