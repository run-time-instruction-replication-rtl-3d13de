// tb_fault_detector: drives hand-built executed time slots (binding,
// results, bundle) into the fault detector and checks its commit, error
// events, re-execution requests and permanent-fault diagnosis.
//   - unreplicated, DMR agree, DMR mismatch (detected, not committed)
//   - TMR with copies split over two time slots; a dissenting copy is
//     outvoted (corrected) and the majority value is committed
//   - three consecutive outvotes of one unit mark it faulty (PERM_THRESH=3);
//     an agreeing execution in between resets the count
//   - DMR with re-execution: mismatch -> replay request naming the operation
//     and the units used; the third copy's result decides
//   - fu_disable shows in the faulty mask
//   - 600 random bundles in the OFF, DMR and TMR modes, with copies
//     scattered over random slots and time slots and random corrupted
//     results, checked against a reference model of the vote and of the
//     consecutive-outvote counters
module tb_fault_detector;
  import vliw_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_DMR;
  exwb_t ts = '0;
  logic [ISSUE_W-1:0][NCLASS-1:0] fu_disable = '0, faulty;
  logic commit_valid, replay_req, err_detected, err_corrected, err_uncorrectable, perm_declared;
  logic [PC_W-1:0] commit_pc;
  dec_bundle_t commit_ops, replay_ops;
  res_vec_t commit_res;
  logic [ISSUE_W-1:0] commit_ok, replay_mask;
  logic [ISSUE_W-1:0][ISSUE_W-1:0] replay_used;

  fault_detector #(.PERM_THRESH(3)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  dec_bundle_t ops;

  function automatic dec_op_t mk(fu_class_e cls);
    dec_op_t o = '0;
    o.valid = 1; o.cls = cls; o.rd = 6'd3; o.wr_rd = 1;
    return o;
  endfunction

  function automatic fu_res_t rv(int v);
    fu_res_t r; r.val = 32'(v); r.aux = 32'(v * 3); return r;
  endfunction

  // Put one copy into the time slot being built.
  task automatic put(int s, int op, int copy, int v);
    ts.bnd[s].valid = 1; ts.bnd[s].op_idx = 3'(op); ts.bnd[s].copy = 2'(copy);
    ts.res[s] = rv(v);
  endtask

  task automatic start_ts(bit last, bit reexec = 0);
    ts = '0; ts.valid = 1; ts.last = last; ts.reexec = reexec; ts.ops = ops; ts.pc = 10'd77;
  endtask

  // Apply the built time slot for one cycle; sample outputs before the edge.
  task automatic apply();
    #1;
  endtask
  task automatic next();
    @(negedge clk); ts = '0;
  endtask

  // One TMR bundle with a single ALU op: copies on slots a, b, c with values.
  task automatic tmr_alu(int a, int va, int b, int vb, int c, int vc);
    ops = '0; ops[0] = mk(FU_ALU);
    start_ts(1); put(a, 0, 0, va); put(b, 0, 1, vb); put(c, 0, 2, vc);
    apply();
  endtask

  // Random bundles against a reference model: modes OFF/DMR/TMR, 1..8
    // operations, copies scattered over random slots of up to three time
    // slots, random corrupted copies plus two units that always corrupt.
  task automatic random_test();
    fu_disable = '0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    begin
      int cnt_m [ISSUE_W][NCLASS];
      bit flt_m [ISSUE_W][NCLASS];
      int bad_s [2], bad_k [2];
      int ndecl = 0, ncorr = 0, nunc = 0;
      foreach (cnt_m[a, b]) begin cnt_m[a][b] = 0; flt_m[a][b] = 0; end
      bad_s[0] = 3; bad_k[0] = int'(FU_MUL); bad_s[1] = 7; bad_k[1] = int'(FU_ALU);
      for (int iter = 0; iter < 600; iter++) begin
        mode_e m;
        int nc, npair, pidx, nts, flip_bit;
        int pop [24], pcp [24];
        int slot_of [ISSUE_W][NCOPY];
        fu_res_t val [ISSUE_W][NCOPY];
        fu_res_t base [ISSUE_W];
        bit exp_ok [ISSUE_W];
        fu_res_t exp_res [ISSUE_W];
        bit e_det, e_cor, e_unc;
        bit dis_u [ISSUE_W][NCLASS], agr_u [ISSUE_W][NCLASS];
        bit new_decl;
        case ($urandom_range(2))
          0: m = MODE_OFF;
          1: m = MODE_DMR;
          default: m = MODE_TMR;
        endcase
        mode = m;
        nc = mode_copies(m);
        ops = '0;
        while (ops == '0)
          for (int i = 0; i < ISSUE_W; i++)
            if ($urandom_range(1) != 0) begin
              ops[i] = mk(fu_class_e'($urandom_range(NCLASS - 1)));
              ops[i].rd = 6'($urandom_range(63));
            end
        npair = 0;
        for (int i = 0; i < ISSUE_W; i++)
          if (ops[i].valid)
            for (int c = 0; c < nc; c++) begin pop[npair] = i; pcp[npair] = c; npair++; end
        for (int k = npair - 1; k > 0; k--) begin      // shuffle the copies
          int j = $urandom_range(k);
          int t0 = pop[k], t1 = pcp[k];
          pop[k] = pop[j]; pcp[k] = pcp[j]; pop[j] = t0; pcp[j] = t1;
        end
        // values
        for (int i = 0; i < ISSUE_W; i++) begin
          base[i].val = $urandom; base[i].aux = $urandom;
        end
        // issue in time slots of random width on random slots
        pidx = 0; nts = 0;
        while (pidx < npair) begin
          int perm [ISSUE_W];
          int width = $urandom_range(ISSUE_W, 1);
          for (int k = 0; k < ISSUE_W; k++) perm[k] = k;
          for (int k = ISSUE_W - 1; k > 0; k--) begin
            int j = $urandom_range(k);
            int t = perm[k]; perm[k] = perm[j]; perm[j] = t;
          end
          if (width > npair - pidx) width = npair - pidx;
          start_ts(pidx + width == npair);
          ts.pc = 10'($urandom);
          for (int k = 0; k < width; k++) begin
            int i = pop[pidx + k], c = pcp[pidx + k], sl = perm[k];
            fu_res_t v = base[i];
            bit bad = 0;
            for (int b = 0; b < 2; b++) if (sl == bad_s[b] && int'(ops[i].cls) == bad_k[b]) bad = 1;
            flip_bit = $urandom_range(XLEN - 1);
            if (bad || $urandom_range(9) == 0) v.val[flip_bit] ^= 1'b1;
            slot_of[i][c] = sl; val[i][c] = v;
            ts.bnd[sl].valid = 1; ts.bnd[sl].op_idx = 3'(i); ts.bnd[sl].copy = 2'(c);
            ts.res[sl] = v;
          end
          pidx += width;
          apply();
          if (pidx < npair) begin
            expect_true(!commit_valid && !err_detected, "random: no commit before the last time slot");
            next();
          end
          nts++;
        end
        // reference outcome
        e_det = 0; e_cor = 0; e_unc = 0;
        foreach (dis_u[a, b]) begin dis_u[a][b] = 0; agr_u[a][b] = 0; end
        for (int i = 0; i < ISSUE_W; i++) begin
          exp_ok[i] = 0; exp_res[i] = '0;
          if (!ops[i].valid) continue;
          if (nc == 1) begin
            exp_ok[i] = 1; exp_res[i] = val[i][0];
          end else if (nc == 2) begin
            if (val[i][0] == val[i][1]) begin
              exp_ok[i] = 1; exp_res[i] = val[i][0];
              agr_u[slot_of[i][0]][ops[i].cls] = 1;     // agreement clears
              agr_u[slot_of[i][1]][ops[i].cls] = 1;
            end else begin e_det = 1; e_unc = 1; end
          end else begin
            int odd = -1;
            if (val[i][0] == val[i][1]) begin
              exp_ok[i] = 1; exp_res[i] = val[i][0];
              if (val[i][2] != val[i][0]) odd = 2;
            end else if (val[i][0] == val[i][2]) begin
              exp_ok[i] = 1; exp_res[i] = val[i][0]; odd = 1;
            end else if (val[i][1] == val[i][2]) begin
              exp_ok[i] = 1; exp_res[i] = val[i][1]; odd = 0;
            end else begin e_det = 1; e_unc = 1; end
            if (exp_ok[i])
              for (int c = 0; c < 3; c++)
                if (c == odd) dis_u[slot_of[i][c]][ops[i].cls] = 1;
                else          agr_u[slot_of[i][c]][ops[i].cls] = 1;
            if (odd >= 0) begin e_det = 1; e_cor = 1; end
          end
        end
        new_decl = 0;
        foreach (cnt_m[a, b]) begin
          if (dis_u[a][b]) begin
            if (cnt_m[a][b] + 1 >= 3 && !flt_m[a][b]) begin flt_m[a][b] = 1; new_decl = 1; end
            if (cnt_m[a][b] < 3) cnt_m[a][b]++;
          end else if (agr_u[a][b]) cnt_m[a][b] = 0;
        end
        begin
          bit ok_all = commit_valid && !replay_req;
          for (int i = 0; i < ISSUE_W; i++) begin
            if (commit_ok[i] != exp_ok[i]) ok_all = 0;
            if (exp_ok[i] && commit_res[i] != exp_res[i]) ok_all = 0;
          end
          expect_true(ok_all, $sformatf("random %0d: commit mask and values", iter));
        end
        expect_true(err_detected == e_det && err_corrected == e_cor && err_uncorrectable == e_unc,
                    $sformatf("random %0d: error events", iter));
        expect_true(perm_declared == new_decl, $sformatf("random %0d: permanent declaration", iter));
        expect_true(commit_ops == ops && commit_pc == ts.pc, $sformatf("random %0d: bundle passed on", iter));
        ndecl += int'(new_decl); ncorr += int'(e_cor); nunc += int'(e_unc);
        next();
        begin
          bit same = 1;
          foreach (flt_m[a, b]) if (faulty[a][b] != flt_m[a][b]) same = 0;
          expect_true(same, $sformatf("random %0d: faulty mask", iter));
        end
      end
      expect_true(ndecl >= 2 && ncorr > 0 && nunc > 0, "random: declarations, corrections and failures all seen");
      $display("random: %0d declarations, %0d corrected, %0d uncorrectable bundles", ndecl, ncorr, nunc);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;

    // unreplicated
    mode = MODE_OFF; ops = '0; ops[1] = mk(FU_ALU);
    start_ts(1); put(6, 1, 0, 42); apply();
    expect_true(commit_valid && commit_ok == 8'b10 && commit_res[1] == rv(42) && commit_pc == 77, "OFF commit");
    next();

    // DMR agree, two ops
    mode = MODE_DMR; ops = '0; ops[0] = mk(FU_ALU); ops[2] = mk(FU_MUL);
    start_ts(1); put(0, 0, 0, 5); put(4, 0, 1, 5); put(2, 2, 0, 9); put(3, 2, 1, 9); apply();
    expect_true(commit_valid && commit_ok == 8'b101 && !err_detected, "DMR agree commit");
    expect_true(commit_res[0] == rv(5) && commit_res[2] == rv(9), "DMR values");
    next();

    // DMR mismatch
    start_ts(1); put(0, 0, 0, 5); put(4, 0, 1, 6); put(2, 2, 0, 9); put(3, 2, 1, 9); apply();
    expect_true(commit_valid && commit_ok == 8'b100 && err_detected && err_uncorrectable, "DMR mismatch detected");
    expect_true(!replay_req && faulty == '0, "DMR: no replay, no diagnosis");
    next();

    // TMR over two time slots, copy 2 wrong on slot 5
    mode = MODE_TMR; ops = '0; ops[0] = mk(FU_ALU);
    start_ts(0); put(0, 0, 0, 11); put(4, 0, 1, 11); apply();
    expect_true(!commit_valid, "no commit before the last time slot");
    next();
    start_ts(1); put(5, 0, 2, 12); apply();
    expect_true(commit_valid && commit_ok[0] && commit_res[0] == rv(11) && err_corrected, "TMR corrects copy 2");
    next();

    // slot 5 outvoted twice more -> faulty (3 consecutive)
    tmr_alu(0, 7, 5, 8, 4, 7);
    expect_true(commit_res[0] == rv(7) && err_corrected && !perm_declared, "second outvote");
    next();
    tmr_alu(5, 1, 1, 2, 2, 2);
    expect_true(commit_res[0] == rv(2) && perm_declared, "third outvote declares");
    next();
    expect_true(faulty == (1 << (5*NCLASS + FU_ALU)), "ALU5 faulty");

    // count reset by agreement: slot 6 outvoted, outvoted, agrees, outvoted
    tmr_alu(6, 1, 1, 2, 2, 2); next();
    tmr_alu(6, 1, 1, 2, 2, 2); next();
    tmr_alu(6, 3, 1, 3, 2, 3); next();
    tmr_alu(6, 1, 1, 2, 2, 2); next();
    expect_true(!faulty[6][FU_ALU], "agreement resets the count");

    // all three differ
    tmr_alu(0, 1, 1, 2, 2, 3);
    expect_true(commit_valid && !commit_ok[0] && err_uncorrectable, "no majority");
    next();

    // DMR with re-execution
    mode = MODE_DMR_REEXEC; ops = '0; ops[0] = mk(FU_ALU); ops[3] = mk(FU_MUL);
    start_ts(1); put(0, 0, 0, 4); put(4, 0, 1, 4); put(2, 3, 0, 20); put(6, 3, 1, 21); apply();
    expect_true(replay_req && !commit_valid && err_detected, "mismatch requests re-execution");
    expect_true(replay_mask == 8'b1000 && replay_used[3] == 8'b0100_0100 && replay_ops[3].cls == FU_MUL, "replay names op 3 and units 2, 6");
    next();
    ops = '0;                       // bundle in EX is a different one now
    start_ts(1, 1); put(7, 3, 2, 21); apply();
    expect_true(commit_valid && commit_ok == 8'b1001 && commit_res[3] == rv(21) && commit_res[0] == rv(4), "third copy decides");
    expect_true(commit_ops[3].cls == FU_MUL && commit_pc == 77 && err_corrected, "held bundle committed");
    next();

    // external declaration
    fu_disable[1][FU_MEM] = 1; #1;
    expect_true(faulty[1][FU_MEM], "fu_disable reaches faulty mask");


    random_test();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
