// fu_mul: multiplier functional unit (issue slots 2, 3, 6 and 7).
//
// Combinational 32x32 multiply, single-cycle latency (this design's choice;
// the source configuration gives no latency).  MUL and MULI return the low
// word of the product, MULHU the high word of the unsigned product.
module fu_mul
  import vliw_pkg::*;
(
  input  opcode_e         opc,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] val
);
  logic [2*XLEN-1:0] prod;

  always_comb begin
    prod = a * b;   // unsigned full product; low word is sign-independent
    unique case (opc)
      OP_MUL, OP_MULI: val = prod[XLEN-1:0];
      OP_MULHU:        val = prod[2*XLEN-1:XLEN];
      default:         val = '0;
    endcase
  end
endmodule
