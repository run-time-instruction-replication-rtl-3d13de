// ex_slot: one EX-stage issue slot with the functional units it holds.
//
// CAPS selects the units ({BR, MEM, MUL, ALU}); every slot has an ALU.  The
// slot executes whichever copy of an operation the IRB bound to it: the
// operation's class picks the unit, and the slot returns that unit's result.
// Register operands are read by the slot (ra1/ra2 out, rd1/rd2 in), so a
// copy moved to another slot reads the same registers as the original.
//
// fi_flip[cls] is a fault-injection input per unit: while set it inverts bit
// 0 of that unit's result, modelling a soft error (one cycle) or a
// permanent error (held).  The injection point is this design's own test aid.
// Combinational; results are registered in the EX/M-WB register.
module ex_slot
  import vliw_pkg::*;
#(
  parameter caps_t CAPS = 4'b0001
) (
  input  bind_t                 sbind,
  input  dec_op_t               op,
  output logic [RIDX_W-1:0]     ra1,
  output logic [RIDX_W-1:0]     ra2,
  input  logic [XLEN-1:0]       rd1,
  input  logic [XLEN-1:0]       rd2,
  input  logic [NCLASS-1:0]     fi_flip,
  output fu_res_t               res
);
  logic [XLEN-1:0] b;
  fu_res_t r_alu, r_mul, r_mem, r_br;

  assign ra1 = op.rs1;
  assign ra2 = op.rd_is_src ? op.rd : op.rs2;
  assign b   = op.use_imm ? op.imm : rd2;

  logic [XLEN-1:0] alu_val;
  fu_alu u_alu (.opc(op.opc), .a(rd1), .b(b), .val(alu_val));

  always_comb begin
    r_alu     = '0;
    r_alu.val = alu_val;
    r_alu.val[0] ^= fi_flip[FU_ALU];
  end

  generate
    if (CAPS[FU_MUL]) begin : g_mul
      logic [XLEN-1:0] mul_val;
      fu_mul u_mul (.opc(op.opc), .a(rd1), .b(b), .val(mul_val));
      always_comb begin
        r_mul     = '0;
        r_mul.val = mul_val;
        r_mul.val[0] ^= fi_flip[FU_MUL];
      end
    end else begin : g_no_mul
      assign r_mul = '0;
    end
    if (CAPS[FU_MEM]) begin : g_mem
      fu_res_t mem_res;
      fu_mem u_mem (.opc(op.opc), .a(rd1), .imm(op.imm), .data(rd2), .res(mem_res));
      always_comb begin
        r_mem = mem_res;
        r_mem.val[0] ^= fi_flip[FU_MEM];
      end
    end else begin : g_no_mem
      assign r_mem = '0;
    end
    if (CAPS[FU_BR]) begin : g_br
      fu_res_t br_res;
      fu_br u_br (.opc(op.opc), .a(rd1), .imm(op.imm), .res(br_res));
      always_comb begin
        r_br = br_res;
        r_br.val[0] ^= fi_flip[FU_BR];
      end
    end else begin : g_no_br
      assign r_br = '0;
    end
  endgenerate

  always_comb begin
    res = '0;
    if (sbind.valid) begin
      unique case (op.cls)
        FU_ALU: res = r_alu;
        FU_MUL: res = r_mul;
        FU_MEM: res = r_mem;
        FU_BR:  res = r_br;
      endcase
    end
  end

  // The IRB must never bind an operation to a slot without its unit.
  always_comb begin
    if (sbind.valid) assert (CAPS[op.cls]) else $error("ex_slot: class %0d bound to slot without unit", op.cls);
  end
endmodule
