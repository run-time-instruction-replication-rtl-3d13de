// tb_wb_stage: commits hand-built bundles into the write-back stage and
// checks register writes, load data, store effects in the data memory (read
// back through its load port), the assignment of two memory operations to
// the two ports, uncommitted operations having no effect, and the branch
// redirect.
module tb_wb_stage;
  import vliw_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, commit_valid = 0, redirect, dbg_we = 0;
  dec_bundle_t commit_ops = '0;
  res_vec_t commit_res = '0;
  logic [ISSUE_W-1:0] commit_ok = '0, rf_we;
  logic [ISSUE_W-1:0][RIDX_W-1:0] rf_wa;
  logic [ISSUE_W-1:0][XLEN-1:0] rf_wd;
  logic [PC_W-1:0] redirect_pc;
  logic [5:0] dbg_addr = '0;
  logic [XLEN-1:0] dbg_wdata = '0, dbg_rdata;

  wb_stage #(.DMEM_DEPTH(64)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic dec_op_t mk(fu_class_e cls, opcode_e opc, int rd);
    dec_op_t o = '0;
    o.valid = 1; o.cls = cls; o.opc = opc; o.rd = 6'(rd);
    o.wr_rd = (opc != OP_STW && cls != FU_BR && rd != 0);
    o.rd_is_src = (opc == OP_STW);
    return o;
  endfunction

  task automatic dw(int a, int v);
    @(negedge clk) dbg_we = 1; dbg_addr = 6'(a); dbg_wdata = 32'(v);
    @(negedge clk) dbg_we = 0;
  endtask

  function automatic logic [31:0] dr(int a);
    return dut.u_dmem.mem[a];
  endfunction

  initial begin
    for (int a = 0; a < 64; a++) dw(a, 1000 + a);

    for (int n = 0; n < 200; n++) begin
      int la, sa, lslot, sslot, bt;
      logic [31:0] sd;
      logic ok_st, ok_ld, taken;
      @(negedge clk);
      commit_ops = '0; commit_res = '0; commit_ok = '0;
      // ALU result to r5 on op 7, a load and a store in random order, a branch on op 0
      la = $urandom_range(0, 63); sa = $urandom_range(0, 63); sd = $urandom;
      lslot = $urandom_range(1, 3); sslot = $urandom_range(4, 6);
      if (n % 2) begin lslot = lslot + 3; sslot = sslot - 3; end
      ok_st = $urandom_range(0, 3) != 0; ok_ld = $urandom_range(0, 3) != 0;
      taken = $urandom_range(0, 1); bt = $urandom_range(0, 1023);
      commit_ops[7] = mk(FU_ALU, OP_ADD, 5); commit_res[7].val = 32'h55 + n; commit_ok[7] = 1;
      commit_ops[lslot] = mk(FU_MEM, OP_LDW, 9); commit_res[lslot].val = 32'(la); commit_ok[lslot] = ok_ld;
      commit_ops[sslot] = mk(FU_MEM, OP_STW, 4); commit_res[sslot].val = 32'(sa); commit_res[sslot].aux = sd; commit_ok[sslot] = ok_st;
      commit_ops[0] = mk(FU_BR, OP_BR, 0); commit_res[0].val = 32'(taken); commit_res[0].aux = 32'(bt); commit_ok[0] = 1;
      commit_valid = (n % 10 != 9);
      #1;
      expect_true(rf_we[7] == commit_valid && rf_wa[7] == 5 && rf_wd[7] == 32'h55 + n, "ALU write-back");
      expect_true(rf_we[lslot] == (commit_valid && ok_ld) && rf_wa[lslot] == 9, "load write enable");
      if (commit_valid && ok_ld) expect_true(rf_wd[lslot] == dr(la), "load data");
      expect_true(!rf_we[sslot] && !rf_we[0], "store and branch write no register");
      expect_true(redirect == (commit_valid && taken) && (!redirect || redirect_pc == 10'(bt)), "branch redirect");
      begin
        logic [31:0] prev_v; prev_v = dr(sa);
        @(posedge clk); #1;
        expect_true(dr(sa) == ((commit_valid && ok_st) ? sd : prev_v), $sformatf("store effect n=%0d sa=%0d got %h sd %h prev %h v=%0d ok=%0d ls=%0d ss=%0d", n, sa, dr(sa), sd, prev_v, commit_valid, ok_st, lslot, sslot));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
