// tb_vliw_top: end-to-end test of the fault-tolerant VLIW core at its
// default size.
//
// Program (bundle addresses 0..5): for i in 0..N-1 load A[i] and B[i],
// store A[i]+B[i] to C[i] and 3*(A[i]^B[i]) to D[i], accumulate A[i]*B[i],
// loop with a branch, then store the sum and spin on a GOTO.  Expected memory
// contents are computed here from the input arrays.  The program runs once
// per scenario: every mode without faults, a unit disabled from outside,
// permanent and transient errors injected at unit outputs.  Each scenario
// checks the results, the error/status outputs, and counts how often each
// mechanism of the core happened (fetch stall, multi-slot bundle, branch
// flush, rebinding around a faulty unit, re-execution, TMR correction, DMR
// detection, permanent-fault declaration, out of service); a mechanism that
// never happened is a failure.  The protected runs must also finish in fewer
// cycles than the replication factor times the unprotected run.
module tb_vliw_top;
  import vliw_pkg::*;
  import tb_isa_pkg::*;

  localparam int N     = 12;     // array length
  localparam int A_B   = 0, B_B = 64, C_B = 128, D_B = 160, S_A = 200;
  localparam int END_PC = 5;

  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_OFF;
  logic imem_we = 0;
  logic [PC_W-1:0] imem_waddr = '0;
  bundle_t imem_wdata = '0;
  logic dmem_dbg_we = 0;
  logic [9:0] dmem_dbg_addr = '0;
  logic [XLEN-1:0] dmem_dbg_wdata = '0, dmem_dbg_rdata;
  logic [RIDX_W-1:0] rf_dbg_addr = '0;
  logic [XLEN-1:0] rf_dbg_rdata;
  logic [ISSUE_W-1:0][NCLASS-1:0] fi_flip = '0, fu_disable = '0, fu_faulty;
  logic commit_valid, fetch_stall, ts_valid, ts_reexec, replay, redirect;
  logic [PC_W-1:0] commit_pc;
  logic err_detected, err_corrected, err_uncorrectable, perm_declared, out_of_service;

  vliw_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_stall, n_multislot, n_flush, n_replay, n_corr, n_det, n_uncorr, n_perm, n_rebind, n_mul2;
  int slots_this_bundle;
  always @(posedge clk) if (rst_n) begin
    if (fetch_stall) n_stall++;
    if (redirect) n_flush++;
    if (replay) n_replay++;
    if (commit_valid && err_corrected) n_corr++;
    if (err_detected) n_det++;
    if (commit_valid && err_uncorrectable) n_uncorr++;
    if (perm_declared) n_perm++;
    if (ts_valid && !ts_reexec) begin
      if (dut.exwb_d.last) begin
        if (slots_this_bundle > 0) n_multislot++;
        slots_this_bundle = 0;
      end else slots_this_bundle++;
    end
    // a copy bound away from its own slot into a slot whose unit of that
    // class is healthy, while the original slot's unit is faulty
    for (int s = 0; s < ISSUE_W; s++)
      if (dut.binding[s].valid) begin
        if (fu_faulty[dut.binding[s].op_idx][dut.slot_op[s].cls] && dut.binding[s].copy == 0)
          n_rebind++;
        if (fu_faulty[s][dut.slot_op[s].cls]) begin
          failures++;
          $display("bound to faulty unit: slot %0d class %0d", s, dut.slot_op[s].cls);
        end
        if (s == 2 && dut.slot_op[s].cls == FU_MUL) n_mul2++;
      end
  end

  function automatic logic [31:0] a_val(int i); return 32'(i * 7 + 3); endfunction
  function automatic logic [31:0] b_val(int i); return 32'(i * 13 + 5 + (i % 3) * 1000); endfunction

  task automatic load_program();
    bundle_t b [6];
    foreach (b[k]) b[k] = '{default: NOP};
    // B0: init
    b[0][0] = op_i(OP_MOVI, 1, 0, 0);
    b[0][1] = op_i(OP_MOVI, 2, 0, N);
    b[0][2] = op_i(OP_MOVI, 3, 0, 0);
    b[0][3] = op_i(OP_MOVI, 4, 0, A_B);
    b[0][4] = op_i(OP_MOVI, 5, 0, B_B);
    b[0][5] = op_i(OP_MOVI, 6, 0, C_B);
    // B1: loads, i++
    b[1][1] = op_i(OP_LDW, 7, 4, 0);
    b[1][5] = op_i(OP_LDW, 8, 5, 0);
    b[1][0] = op_i(OP_ADDI, 1, 1, 1);
    // B2: compute
    b[2][2] = op_r(OP_MUL, 9, 7, 8);
    b[2][0] = op_r(OP_ADD, 10, 7, 8);
    b[2][1] = op_r(OP_XOR, 11, 7, 8);
    b[2][3] = op_r(OP_SUB, 12, 1, 2);
    // B3: accumulate, store, advance pointers, loop
    b[3][0] = op_b(OP_BR, 12, 1);
    b[3][1] = op_st(10, 6, 0);
    b[3][2] = op_i(OP_MULI, 13, 11, 3);
    b[3][3] = op_r(OP_ADD, 3, 3, 9);
    b[3][4] = op_i(OP_ADDI, 4, 4, 1);
    b[3][6] = op_i(OP_ADDI, 5, 5, 1);
    b[3][7] = op_i(OP_ADDI, 6, 6, 1);
    // B4: D[i] needs r13 of the last iteration only; store sum
    b[4][1] = op_st(3, 0, S_A);
    b[4][5] = op_st(13, 0, D_B);
    b[4][0] = op_b(OP_GOTO, 0, END_PC);
    // B5: spin
    b[5][0] = op_b(OP_GOTO, 0, END_PC);
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      imem_we = 1; imem_waddr = PC_W'(k); imem_wdata = b[k];
    end
    @(negedge clk) imem_we = 0;
  endtask

  task automatic dwrite(int addr, logic [31:0] v);
    @(negedge clk);
    dmem_dbg_we = 1; dmem_dbg_addr = 10'(addr); dmem_dbg_wdata = v;
    @(negedge clk) dmem_dbg_we = 0;
  endtask

  task automatic init_data();
    for (int i = 0; i < N; i++) begin
      dwrite(A_B + i, a_val(i));
      dwrite(B_B + i, b_val(i));
      dwrite(C_B + i, 32'hdead_beef);
    end
    dwrite(S_A, 0);
    dwrite(D_B, 0);
  endtask

  function automatic logic [31:0] dread(int addr);
    return dut.u_wb.u_dmem.mem[addr];
  endfunction

  // Run the program; returns cycles from reset release to the first commit
  // of the spin bundle.
  task automatic run(input mode_e m, output int cycles, input int tfault_cycle = -1,
                     input int tfault_slot = 0, input int tfault_cls = 0);
    int start;
    init_data();
    mode = m;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    start = cyc;
    fork
      begin
        while (!(commit_valid && commit_pc == END_PC)) begin
          @(posedge clk);
          #1;
        end
      end
      if (tfault_cycle >= 0) begin
        repeat (tfault_cycle) @(posedge clk);
        @(negedge clk) fi_flip[tfault_slot][tfault_cls] = 1;
        @(negedge clk) fi_flip[tfault_slot][tfault_cls] = 0;
      end
    join
    cycles = cyc - start;
  endtask

  task automatic check_results(string tag, bit expect_ok = 1);
    logic [31:0] sum, exp, got;
    int bad;
    sum = 0; bad = 0;
    for (int i = 0; i < N; i++) begin
      sum += a_val(i) * b_val(i);
      if (dread(C_B + i) !== a_val(i) + b_val(i)) bad++;
    end
    exp = 3 * (a_val(N-1) ^ b_val(N-1));
    got = dread(D_B);
    if (got !== exp) bad++;
    if (dread(S_A) !== sum) bad++;
    checks++;
    if (expect_ok && bad != 0) begin
      failures++;
      $display("%s: %0d wrong results (sum got %0d exp %0d)", tag, bad, dread(S_A), sum);
    end
    if (!expect_ok && bad == 0) $display("%s: results happen to be intact", tag);
  endtask

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int c_off, c_dmr, c_tmr, c_x;

  initial begin
    load_program();

    // 1. unprotected reference
    run(MODE_OFF, c_off);
    check_results("OFF");
    $display("OFF  cycles=%0d", c_off);

    // 2. DMR, no faults
    run(MODE_DMR, c_dmr);
    check_results("DMR");
    expect_true(c_dmr > c_off && c_dmr < 2 * c_off, "DMR cycles between N and 2N");
    $display("DMR  cycles=%0d", c_dmr);

    // 3. TMR, no faults
    run(MODE_TMR, c_tmr);
    check_results("TMR");
    expect_true(c_tmr > c_dmr && c_tmr < 3 * c_off, "TMR cycles between DMR and 3N");
    $display("TMR  cycles=%0d", c_tmr);

    // 4. DMR with the multiplier of slot 2 declared faulty: rebinding
    fu_disable[2][FU_MUL] = 1;
    n_mul2 = 0;
    run(MODE_DMR, c_x);
    check_results("DMR mul2 off");
    expect_true(n_mul2 == 0, "no multiplication bound to slot 2");
    expect_true(!out_of_service, "one faulty MUL is not out of service");
    $display("DMR with MUL2 faulty cycles=%0d", c_x);
    fu_disable = '0;

    // 5. TMR with a permanent error on the ALU of slot 4: corrected, then declared
    fi_flip[4][FU_ALU] = 1;
    run(MODE_TMR, c_x);
    check_results("TMR perm alu4");
    expect_true(fu_faulty[4][FU_ALU], "ALU4 declared permanently faulty");
    expect_true(fu_faulty == (1 << (4*NCLASS + FU_ALU)), "only ALU4 declared");
    $display("TMR with ALU4 permanent error cycles=%0d", c_x);
    fi_flip = '0;

    // 6. DMR with re-execution, one transient error on the ALU of slot 0
    run(MODE_DMR_REEXEC, c_x, 30, 0, FU_ALU);
    check_results("REEXEC transient");
    expect_true(fu_faulty == '0, "transient error not declared permanent");
    $display("DMR+re-exec transient cycles=%0d", c_x);

    // 7. DMR with re-execution, permanent error on the MUL of slot 3
    n_replay = 0;
    fi_flip[3][FU_MUL] = 1;
    run(MODE_DMR_REEXEC, c_x);
    check_results("REEXEC perm mul3");
    expect_true(fu_faulty[3][FU_MUL], "MUL3 declared permanently faulty");
    expect_true(n_replay >= 3 && n_replay <= 4, "re-executions stop after the unit is declared");
    $display("DMR+re-exec MUL3 permanent cycles=%0d replays=%0d", c_x, n_replay);
    fi_flip = '0;

    // 8. plain DMR with a permanent error: detected, not correctable
    n_det = 0; n_uncorr = 0;
    fi_flip[6][FU_ALU] = 1;
    run(MODE_DMR, c_x);
    expect_true(n_det > 0 && n_uncorr > 0, "DMR detects the error");
    fi_flip = '0;

    // 9. no healthy branch unit: out of service
    fu_disable[0][FU_BR] = 1;
    #1;
    expect_true(out_of_service, "out of service without a branch unit");
    fu_disable = '0;
    #1;
    expect_true(!out_of_service, "back in service");

    // every mechanism must have happened
    expect_true(n_stall > 0, "fetch stall");
    expect_true(n_multislot > 0, "extra time slot");
    expect_true(n_flush > 0, "branch flush");
    expect_true(n_replay > 0, "re-execution");
    expect_true(n_corr > 0, "error correction");
    expect_true(n_det > 0, "error detection");
    expect_true(n_uncorr > 0, "uncorrectable error report");
    expect_true(n_perm > 0, "permanent fault declaration");
    expect_true(n_rebind > 0, "rebinding around a faulty unit");
    $display("stall=%0d multislot=%0d flush=%0d replay=%0d corr=%0d det=%0d uncorr=%0d perm=%0d rebind=%0d",
             n_stall, n_multislot, n_flush, n_replay, n_corr, n_det, n_uncorr, n_perm, n_rebind);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
