// Execute unit of the scalar pipeline: RV32I integer ALU and branch comparator.
//
// Purely combinational. res_o is the ALU result for op_i on a_i and b_i
// (ALU_PASSB forwards b_i, used for LUI). br_taken_o evaluates the branch
// condition br_op_i on a_i and b_i, compared as register values. The core
// description only names this unit; its contents are the standard RV32I set.
module alu
  import klessydra_pkg::*;
(
  input  alu_op_e     op_i,
  input  br_op_e      br_op_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] res_o,
  output logic        br_taken_o
);
  always_comb begin
    unique case (op_i)
      ALU_ADD:   res_o = a_i + b_i;
      ALU_SUB:   res_o = a_i - b_i;
      ALU_SLL:   res_o = a_i << b_i[4:0];
      ALU_SLT:   res_o = {31'b0, $signed(a_i) < $signed(b_i)};
      ALU_SLTU:  res_o = {31'b0, a_i < b_i};
      ALU_XOR:   res_o = a_i ^ b_i;
      ALU_SRL:   res_o = a_i >> b_i[4:0];
      ALU_SRA:   res_o = $unsigned($signed(a_i) >>> b_i[4:0]);
      ALU_OR:    res_o = a_i | b_i;
      ALU_AND:   res_o = a_i & b_i;
      ALU_PASSB: res_o = b_i;
      default:   res_o = '0;
    endcase
  end

  always_comb begin
    unique case (br_op_i)
      BR_EQ:   br_taken_o = (a_i == b_i);
      BR_NE:   br_taken_o = (a_i != b_i);
      BR_LT:   br_taken_o = ($signed(a_i) < $signed(b_i));
      BR_GE:   br_taken_o = ($signed(a_i) >= $signed(b_i));
      BR_LTU:  br_taken_o = (a_i < b_i);
      BR_GEU:  br_taken_o = (a_i >= b_i);
      default: br_taken_o = 1'b0;
    endcase
  end
endmodule
