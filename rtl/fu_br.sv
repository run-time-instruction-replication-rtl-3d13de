// fu_br: branch unit (issue slot 0, the only one).
//
// Resolves a branch: BR is taken when a != 0, BRF when a == 0, GOTO always.
// The target is the immediate, an absolute bundle address.  The outcome is
// only acted on when the bundle commits, after comparison or voting of all
// copies.  Combinational, single-cycle.
//   val[0] = taken, aux = target
// The upper bits of val are zero and aux is the immediate unchanged; they
// are kept so that every unit delivers the same result record, which the
// fault detector compares as a whole.
module fu_br
  import vliw_pkg::*;
(
  input  opcode_e         opc,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] imm,
  output fu_res_t         res
);
  logic taken;

  always_comb begin
    unique case (opc)
      OP_BR:   taken = (a != '0);
      OP_BRF:  taken = (a == '0);
      OP_GOTO: taken = 1'b1;
      default: taken = 1'b0;
    endcase
    res.val = {{(XLEN-1){1'b0}}, taken};
    res.aux = imm;
  end
endmodule
