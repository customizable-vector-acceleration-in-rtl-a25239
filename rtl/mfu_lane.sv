// One lane of the MFU functional unit: the element operation of every
// vector instruction on one 32-bit word of the vectors.
//
// a_i is the word of the first source vector, b_i the word of the second
// source vector and s_i the scalar operand (shift amount, scalar
// addend/multiplier or broadcast value). ew_i is the element width from
// MVTYPE: 0 = four 8-bit elements per word, 1 = two 16-bit elements,
// 2 or 3 = one 32-bit element. Sub-word elements are packed little-endian
// (element k of a word in bits [W*k +: W]) and are processed independently,
// as in packed-SIMD: carries do not cross element boundaries.
//
// The adder/subtractor, shifter, multiplier and comparator share the inputs
// ("input mapping") and the operation selects the result ("output
// mapping"). Element results keep the low W bits (products included);
// kvslt/ksvslt give 1 where a < b (signed), else 0, per element; kbcst
// replicates the low W bits of the scalar. For the scalar forms the scalar
// element is the low W bits of s_i. Shift amounts are s_i[4:0] whatever the
// width. For the reductions (kvred, kdotp, kdotpps) the lane instead returns
// the 32-bit sum over its elements of the sign-extended element, the full
// signed element product, or that product shifted right arithmetically by
// sclfac_i; the MFU accumulates these sums in 32 bits. Combinational.
// The set of units and the 8/16/32-bit widths follow the co-processor
// description; the bit-level behaviour (packing, low product, mask encoding,
// 32-bit reduction) is this design's choice.
module mfu_lane
  import klessydra_pkg::*;
(
  input  vop_e        op_i,
  input  logic [1:0]  ew_i,
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  input  logic [31:0] s_i,
  input  logic [4:0]  sclfac_i,
  output logic [31:0] res_o
);
  // operation on one element; a, b, s are the element operands extended to
  // 32 bits and p their full product (a * b or a * s)
  function automatic logic [31:0] elem(vop_e op, logic [31:0] a, logic [31:0] b, logic [31:0] s,
                                       logic [31:0] p, logic [4:0] sf);
    unique case (op)
      V_ADDV:               return a + b;
      V_SUBV:               return a - b;
      V_VMUL, V_DOTP,
      V_SVMULSC, V_SVMULRF: return p;
      V_DOTPPS:             return $unsigned($signed(p) >>> sf);
      V_SVADDSC, V_SVADDRF: return a + s;
      V_SRLV:               return a >> s[4:0];
      V_SRAV:               return $unsigned($signed(a) >>> s[4:0]);
      V_RELU:               return a[31] ? '0 : a;
      V_VSLT:               return {31'b0, $signed(a) < $signed(b)};
      V_SVSLT:              return {31'b0, $signed(a) < $signed(s)};
      V_BCST:               return s;
      default:              return a;   // V_VCP, V_VRED
    endcase
  endfunction

  logic scalar_mul, zext, is_shift;
  assign scalar_mul = op_i inside {V_SVMULSC, V_SVMULRF};
  assign zext       = (op_i == V_SRLV);
  assign is_shift   = op_i inside {V_SRLV, V_SRAV};

  // 32-bit elements
  logic [31:0] mul_b32, p32, r32;
  assign mul_b32 = scalar_mul ? s_i : b_i;
  assign p32     = a_i * mul_b32;
  assign r32     = elem(op_i, a_i, b_i, s_i, p32, sclfac_i);

  // 16-bit elements
  logic [15:0] mul_b16 [2];
  logic [31:0] p16 [2], r16 [2];
  logic [31:0] s16;
  assign s16 = is_shift ? s_i : {{16{s_i[15]}}, s_i[15:0]};
  for (genvar k = 0; k < 2; k++) begin : g_h
    logic [31:0] a16, b16;
    logic signed [15:0] ma, mb;
    logic signed [31:0] p;
    assign a16        = zext ? {16'b0, a_i[16*k +: 16]} : {{16{a_i[16*k+15]}}, a_i[16*k +: 16]};
    assign b16        = {{16{b_i[16*k+15]}}, b_i[16*k +: 16]};
    assign mul_b16[k] = scalar_mul ? s_i[15:0] : b_i[16*k +: 16];
    assign ma         = a_i[16*k +: 16];
    assign mb         = mul_b16[k];
    assign p          = ma * mb;
    assign p16[k]     = p;
    assign r16[k]     = elem(op_i, a16, b16, s16, p16[k], sclfac_i);
  end

  // 8-bit elements
  logic [7:0]  mul_b8 [4];
  logic [31:0] p8 [4], r8 [4];
  logic [31:0] s8;
  assign s8 = is_shift ? s_i : {{24{s_i[7]}}, s_i[7:0]};
  for (genvar k = 0; k < 4; k++) begin : g_b
    logic [31:0] a8, b8;
    logic signed [7:0]  ma, mb;
    logic signed [15:0] p;
    assign a8        = zext ? {24'b0, a_i[8*k +: 8]} : {{24{a_i[8*k+7]}}, a_i[8*k +: 8]};
    assign b8        = {{24{b_i[8*k+7]}}, b_i[8*k +: 8]};
    assign mul_b8[k] = scalar_mul ? s_i[7:0] : b_i[8*k +: 8];
    assign ma        = a_i[8*k +: 8];
    assign mb        = mul_b8[k];
    assign p         = ma * mb;
    assign p8[k]     = {{16{p[15]}}, p};
    assign r8[k]     = elem(op_i, a8, b8, s8, p8[k], sclfac_i);
  end

  always_comb begin
    if (vop_is_reduction(op_i)) begin
      unique case (ew_i)
        2'd0:    res_o = r8[0] + r8[1] + r8[2] + r8[3];
        2'd1:    res_o = r16[0] + r16[1];
        default: res_o = r32;
      endcase
    end else begin
      unique case (ew_i)
        2'd0:    res_o = {r8[3][7:0], r8[2][7:0], r8[1][7:0], r8[0][7:0]};
        2'd1:    res_o = {r16[1][15:0], r16[0][15:0]};
        default: res_o = r32;
      endcase
    end
  end
endmodule
