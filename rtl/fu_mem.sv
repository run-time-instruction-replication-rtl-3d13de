// fu_mem: memory operation unit (issue slots 1 and 5).
//
// The unit computes what a memory operation will do: the word address
// base + offset and, for a store, the data to write.  The data memory itself
// is accessed only when the fault detector has compared or voted these
// values, in the M/WB stage, so a faulty memory unit can never write a wrong
// address.  Splitting address generation from the memory access is this
// design's choice.  Combinational, single-cycle.
//   val = a + imm (word address), aux = store data (0 for a load)
module fu_mem
  import vliw_pkg::*;
(
  input  opcode_e         opc,
  input  logic [XLEN-1:0] a,      // base register
  input  logic [XLEN-1:0] imm,    // offset
  input  logic [XLEN-1:0] data,   // store data register
  output fu_res_t         res
);
  always_comb begin
    res = '0;
    if (opc == OP_LDW || opc == OP_STW) res.val = a + imm;
    if (opc == OP_STW)                  res.aux = data;
  end
endmodule
