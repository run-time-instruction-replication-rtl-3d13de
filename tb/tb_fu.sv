// tb_fu: self-checking test of the four functional units (fu_alu, fu_mul,
// fu_mem, fu_br).  Random operands for every opcode of each unit; expected
// values are computed here with plain SystemVerilog operators.
module tb_fu;
  import vliw_pkg::*;

  int checks = 0, failures = 0;
  opcode_e opc;
  logic [31:0] a, b, alu_v, mul_v;
  fu_res_t mem_r, br_r;

  fu_alu u_alu (.opc, .a, .b, .val(alu_v));
  fu_mul u_mul (.opc, .a, .b, .val(mul_v));
  fu_mem u_mem (.opc, .a, .imm(b), .data(a ^ 32'h5a5a_0000), .res(mem_r));
  fu_br  u_br  (.opc, .a, .imm(b), .res(br_r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s opc=%0d a=%h b=%h got=%h exp=%h", what, opc, a, b, got, exp);
    end
  endtask

  function automatic logic [31:0] alu_ref(opcode_e o, logic [31:0] x, logic [31:0] y);
    case (o)
      OP_ADD, OP_ADDI: return x + y;
      OP_SUB:          return x - y;
      OP_AND, OP_ANDI: return x & y;
      OP_OR, OP_ORI:   return x | y;
      OP_XOR, OP_XORI: return x ^ y;
      OP_SHL, OP_SHLI: return x << y[4:0];
      OP_SHR, OP_SHRI: return x >> y[4:0];
      OP_SRA:          return $signed(x) >>> y[4:0];
      OP_SLT:          return ($signed(x) < $signed(y)) ? 1 : 0;
      OP_SLTU:         return (x < y) ? 1 : 0;
      OP_CMPEQ:        return (x == y) ? 1 : 0;
      OP_CMPNE:        return (x != y) ? 1 : 0;
      OP_MOVI:         return y;
      default:         return 0;
    endcase
  endfunction

  opcode_e alu_ops[] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SRA,
                         OP_SLT, OP_SLTU, OP_CMPEQ, OP_CMPNE, OP_ADDI, OP_ANDI, OP_ORI,
                         OP_XORI, OP_MOVI, OP_SHLI, OP_SHRI};

  initial begin
    longint unsigned p;
    for (int n = 0; n < 300; n++) begin
      a = $urandom; b = $urandom;
      if (n % 5 == 0) b = a;                 // equal operands for compares
      if (n % 7 == 0) a = -a;
      foreach (alu_ops[k]) begin
        opc = alu_ops[k]; #1;
        chk(alu_v, alu_ref(opc, a, b), "alu");
      end
      p = 64'(a) * 64'(b);
      opc = OP_MUL;   #1; chk(mul_v, p[31:0], "mul");
      opc = OP_MULI;  #1; chk(mul_v, p[31:0], "muli");
      opc = OP_MULHU; #1; chk(mul_v, p[63:32], "mulhu");
      opc = OP_LDW;   #1; chk(mem_r.val, a + b, "ldw addr"); chk(mem_r.aux, 0, "ldw aux");
      opc = OP_STW;   #1; chk(mem_r.val, a + b, "stw addr"); chk(mem_r.aux, a ^ 32'h5a5a_0000, "stw data");
      if (n % 4 == 0) a = 0;
      opc = OP_BR;    #1; chk(br_r.val, (a != 0) ? 1 : 0, "br"); chk(br_r.aux, b, "br target");
      opc = OP_BRF;   #1; chk(br_r.val, (a == 0) ? 1 : 0, "brf");
      opc = OP_GOTO;  #1; chk(br_r.val, 1, "goto");
      opc = OP_ADD;   #1; chk(br_r.val, 0, "non-branch");
      chk(mul_v, 0, "mul idle"); chk(mem_r.val, 0, "mem idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
