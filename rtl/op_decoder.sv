// op_decoder: DC-stage decoder for one operation of a bundle.
//
// Turns a 32-bit operation word into a dec_op_t: the FU class it needs, its
// register fields, the sign-extended 14-bit immediate and the flags the EX
// and commit logic use.  Unknown opcodes decode as NOPs.  The encoding is this
// design's own (see vliw_pkg); the source only places a decoder per slot in
// the DC stage.  Combinational.
module op_decoder
  import vliw_pkg::*;
(
  input  logic [XLEN-1:0] word,
  output dec_op_t         op
);
  opcode_e opc;
  assign opc = opcode_e'(word[31:26]);

  always_comb begin
    op         = '0;
    op.opc     = opc;
    op.rd      = word[25:20];
    op.rs1     = word[19:14];
    op.rs2     = word[13:8];
    op.imm     = {{(XLEN-14){word[13]}}, word[13:0]};
    op.valid   = 1'b1;
    op.cls     = FU_ALU;
    op.wr_rd   = 1'b1;
    unique case (opc)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR, OP_SRA,
      OP_SLT, OP_SLTU, OP_CMPEQ, OP_CMPNE: ;
      OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_MOVI, OP_SHLI, OP_SHRI:
        op.use_imm = 1'b1;
      OP_MUL, OP_MULHU:
        op.cls = FU_MUL;
      OP_MULI: begin
        op.cls     = FU_MUL;
        op.use_imm = 1'b1;
      end
      OP_LDW:
        op.cls = FU_MEM;
      OP_STW: begin
        op.cls       = FU_MEM;
        op.rd_is_src = 1'b1;
        op.wr_rd     = 1'b0;
      end
      OP_BR, OP_BRF, OP_GOTO: begin
        op.cls   = FU_BR;
        op.wr_rd = 1'b0;
      end
      default: begin           // NOP and unused codes
        op       = '0;
        op.opc   = OP_NOP;
      end
    endcase
    if (op.wr_rd && op.rd == '0) op.wr_rd = 1'b0;   // r0 is constant zero
  end
endmodule
