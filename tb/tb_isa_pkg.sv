// tb_isa_pkg: helpers for testbenches that build programs for the VLIW core.
//
// Encoders for the three operation formats (register, immediate, store) and
// a bundle type.  Field layout: [31:26] opcode, [25:20] rd, [19:14] rs1,
// [13:8] rs2 or [13:0] signed immediate.
package tb_isa_pkg;
  import vliw_pkg::*;

  typedef logic [ISSUE_W-1:0][XLEN-1:0] bundle_t;

  function automatic logic [31:0] op_r(opcode_e opc, int rd, int rs1, int rs2);
    return {opc, 6'(rd), 6'(rs1), 6'(rs2), 8'd0};
  endfunction

  function automatic logic [31:0] op_i(opcode_e opc, int rd, int rs1, int imm);
    return {opc, 6'(rd), 6'(rs1), 14'(imm)};
  endfunction

  // Store: mem[reg[base] + imm] = reg[data]
  function automatic logic [31:0] op_st(int data, int base, int imm);
    return {OP_STW, 6'(data), 6'(base), 14'(imm)};
  endfunction

  // Branch on reg (BR: taken if reg != 0) to an absolute bundle address.
  function automatic logic [31:0] op_b(opcode_e opc, int rs, int target);
    return {opc, 6'd0, 6'(rs), 14'(target)};
  endfunction

  localparam logic [31:0] NOP = 32'd0;
endpackage
