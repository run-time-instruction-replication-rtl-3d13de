// fu_alu: integer ALU functional unit, present in every issue slot.
//
// Purely combinational: val is computed from opcode and the two operands in
// the cycle the operation is in the EX stage (single-cycle latency, this
// design's choice).  Operand b is already the immediate for the *I forms
// and for MOVI.  Comparisons return 0 or 1.  Shifts use b[4:0].  The
// operation set is this design's own; only the unit's role (an ALU in each
// of the eight slots) comes from the reference configuration.
module fu_alu
  import vliw_pkg::*;
(
  input  opcode_e         opc,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] val
);
  always_comb begin
    unique case (opc)
      OP_ADD, OP_ADDI:  val = a + b;
      OP_SUB:           val = a - b;
      OP_AND, OP_ANDI:  val = a & b;
      OP_OR,  OP_ORI:   val = a | b;
      OP_XOR, OP_XORI:  val = a ^ b;
      OP_SHL, OP_SHLI:  val = a << b[4:0];
      OP_SHR, OP_SHRI:  val = a >> b[4:0];
      OP_SRA:           val = $unsigned($signed(a) >>> b[4:0]);
      OP_SLT:           val = {{(XLEN-1){1'b0}}, $signed(a) < $signed(b)};
      OP_SLTU:          val = {{(XLEN-1){1'b0}}, a < b};
      OP_CMPEQ:         val = {{(XLEN-1){1'b0}}, a == b};
      OP_CMPNE:         val = {{(XLEN-1){1'b0}}, a != b};
      OP_MOVI:          val = b;
      default:          val = '0;
    endcase
  end
endmodule
