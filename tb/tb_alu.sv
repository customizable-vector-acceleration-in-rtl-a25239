// Self-checking test of the execute-stage ALU and branch comparator against
// an independent model, with random and corner-case operands.
module tb_alu;
  import klessydra_pkg::*;
  alu_op_e op; br_op_e bop;
  logic [31:0] a, b, res; logic taken;
  alu dut (.op_i(op), .br_op_i(bop), .a_i(a), .b_i(b), .res_o(res), .br_taken_o(taken));
  int checks = 0, failures = 0;
  task automatic check(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s a=%h b=%h got %h exp %h", w, a, b, g, e); end
  endtask
  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] y);
    longint sx = longint'($signed(x)), sy = longint'($signed(y));
    int sh = int'(y % 32);
    case (o)
      ALU_ADD: return 32'(longint'(x) + longint'(y));
      ALU_SUB: return 32'(longint'(x) - longint'(y));
      ALU_SLL: return 32'(longint'(x) * (longint'(1) << sh));
      ALU_SLT: return (sx < sy) ? 1 : 0;
      ALU_SLTU: return (longint'(x) < longint'(y)) ? 1 : 0;
      ALU_XOR: return x ^ y;
      ALU_SRL: return 32'(longint'(x) / (longint'(1) << sh));
      ALU_SRA: return 32'(sx >>> sh);
      ALU_OR: return x | y;
      ALU_AND: return x & y;
      default: return y;
    endcase
  endfunction
  function automatic logic bmodel(br_op_e o, logic [31:0] x, logic [31:0] y);
    longint sx = longint'($signed(x)), sy = longint'($signed(y));
    case (o)
      BR_EQ: return x == y; BR_NE: return x != y;
      BR_LT: return sx < sy; BR_GE: return sx >= sy;
      BR_LTU: return longint'(x) < longint'(y); default: return longint'(x) >= longint'(y);
    endcase
  endfunction
  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};
    for (int n = 0; n < 3000; n++) begin
      op = alu_op_e'($urandom_range(0, 10)); bop = br_op_e'($urandom_range(0, 5));
      a = (n % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b = (n % 5 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      if (n % 7 == 0) b = a;
      #1;
      check(op.name(), res, model(op, a, b));
      check(bop.name(), 32'(taken), 32'(bmodel(bop, a, b)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
