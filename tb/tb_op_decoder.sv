// tb_op_decoder: checks the decoder's class, flags, fields and immediate
// sign extension for every opcode, r0 write suppression and that unknown
// opcodes decode as NOPs.  Expected values come from a table written here.
module tb_op_decoder;
  import vliw_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] word;
  dec_op_t op;

  op_decoder dut (.word, .op);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s word=%h got=%0h exp=%0h", what, word, got, exp);
    end
  endtask

  initial begin
    logic [5:0] rd, rs1, rs2, oc;
    logic [13:0] imm;
    fu_class_e cls;
    logic v, ui, rsrc, wr;
    for (int n = 0; n < 2000; n++) begin
      oc = 6'($urandom_range(0, 63));
      rd = 6'($urandom); rs1 = 6'($urandom); imm = 14'($urandom);
      if (n % 10 == 0) rd = 0;
      rs2 = imm[13:8];
      word = {oc, rd, rs1, imm};
      #1;
      v = 1; ui = 0; rsrc = 0; wr = 1; cls = FU_ALU;
      case (oc)
        1,2,3,4,5,6,7,8,9,10,11,12: ;
        16,17,18,19,20,21,22: ui = 1;
        32,33: cls = FU_MUL;
        34: begin cls = FU_MUL; ui = 1; end
        40: cls = FU_MEM;
        41: begin cls = FU_MEM; rsrc = 1; wr = 0; end
        48,49,50: begin cls = FU_BR; wr = 0; end
        default: begin v = 0; wr = 0; end
      endcase
      if (rd == 0) wr = 0;
      chk(op.valid, v, "valid");
      chk(op.wr_rd, wr, "wr_rd");
      if (v) begin
        chk(op.cls, cls, "cls");
        chk(op.use_imm, ui, "use_imm");
        chk(op.rd_is_src, rsrc, "rd_is_src");
        chk(op.rd, rd, "rd");
        chk(op.rs1, rs1, "rs1");
        chk(op.rs2, rs2, "rs2");
        chk(op.imm, {{18{imm[13]}}, imm}, "imm");
        chk(op.opc, oc, "opc");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
