// tb_ex_slot: three issue slots (ALU+BR, ALU+MEM, ALU+MUL) are given random
// operations of the classes they hold.  Register operands are returned as a
// fixed function of the read address, so expected results are computed here.
// Checks the unit selection, immediate selection, store-data register
// selection (ra2 = rd for a store), the injected bit flip per unit and that
// an unbound slot outputs zero.
module tb_ex_slot;
  import vliw_pkg::*;

  int checks = 0, failures = 0;
  bind_t   bnd [3];
  dec_op_t op [3];
  logic [RIDX_W-1:0] ra1 [3], ra2 [3];
  logic [XLEN-1:0] rd1 [3], rd2 [3];
  logic [NCLASS-1:0] fi [3];
  fu_res_t res [3];

  ex_slot #(.CAPS(4'b1001)) s0 (.sbind(bnd[0]), .op(op[0]), .ra1(ra1[0]), .ra2(ra2[0]), .rd1(rd1[0]), .rd2(rd2[0]), .fi_flip(fi[0]), .res(res[0]));
  ex_slot #(.CAPS(4'b0101)) s1 (.sbind(bnd[1]), .op(op[1]), .ra1(ra1[1]), .ra2(ra2[1]), .rd1(rd1[1]), .rd2(rd2[1]), .fi_flip(fi[1]), .res(res[1]));
  ex_slot #(.CAPS(4'b0011)) s2 (.sbind(bnd[2]), .op(op[2]), .ra1(ra1[2]), .ra2(ra2[2]), .rd1(rd1[2]), .rd2(rd2[2]), .fi_flip(fi[2]), .res(res[2]));

  function automatic logic [31:0] regval(logic [5:0] r);
    return {r, 2'b01, r, 2'b10, r, 2'b11, 2'b00, r} ^ 32'h1357_9bdf;
  endfunction

  always_comb for (int k = 0; k < 3; k++) begin
    rd1[k] = regval(ra1[k]);
    rd2[k] = regval(ra2[k]);
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fu_res_t e;
    logic [31:0] a, b;
    int k, pick;
    for (int n = 0; n < 3000; n++) begin
      k = n % 3;
      for (int j = 0; j < 3; j++) begin bnd[j] = '0; op[j] = '0; fi[j] = '0; end
      op[k].valid = 1;
      op[k].rd  = 6'($urandom); op[k].rs1 = 6'($urandom); op[k].rs2 = 6'($urandom);
      op[k].imm = $urandom;
      bnd[k].valid = (n % 11 != 0);
      pick = $urandom_range(0, 2);
      a = regval(op[k].rs1);
      e = '0;
      if (pick == 0) begin                  // ALU op (ADD or ADDI)
        op[k].cls = FU_ALU;
        op[k].use_imm = $urandom_range(0, 1);
        op[k].opc = op[k].use_imm ? OP_ADDI : OP_ADD;
        b = op[k].use_imm ? op[k].imm : regval(op[k].rs2);
        e.val = a + b;
        fi[k][FU_ALU] = ($urandom_range(0, 3) == 0);
        e.val[0] ^= fi[k][FU_ALU];
      end else if (k == 0) begin            // branch
        op[k].cls = FU_BR; op[k].opc = OP_BRF;
        e.val = (a == 0) ? 1 : 0; e.aux = op[k].imm;
        fi[k][FU_BR] = ($urandom_range(0, 3) == 0);
        e.val[0] ^= fi[k][FU_BR];
      end else if (k == 1) begin            // store
        op[k].cls = FU_MEM; op[k].opc = OP_STW; op[k].rd_is_src = 1;
        e.val = a + op[k].imm; e.aux = regval(op[k].rd);
        fi[k][FU_MEM] = ($urandom_range(0, 3) == 0);
        e.val[0] ^= fi[k][FU_MEM];
      end else begin                        // multiply
        op[k].cls = FU_MUL; op[k].opc = OP_MUL;
        e.val = a * regval(op[k].rs2);
        fi[k][FU_MUL] = ($urandom_range(0, 3) == 0);
        e.val[0] ^= fi[k][FU_MUL];
      end
      if (!bnd[k].valid) e = '0;
      #1;
      checks++;
      if (res[k] !== e) begin
        failures++;
        $display("FAIL n=%0d slot %0d cls %0d got %h exp %h", n, k, op[k].cls, res[k], e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
