// tb_irb: tests of the Instruction Replication and Binding unit.
//
// Directed cases: the four-operation example bundle ADD1 ADD2 MUL1 ADD3 in
// DMR, fault free and with the multiplier of slot 2 faulty (expected
// binding ADD1 ADD2 ADD3 MUL1 | ADD1 ADD2 MUL1 ADD3 in one time slot); the
// same bundle in TMR (12 copies: two time slots, fetch stalled in the
// first); a duplicated branch (single branch unit: two time slots); a
// re-execution request (third copy on an unused unit, marked reexec, then
// the held bundle is issued again); a flush.
// Random cases: legal bundles (at most 1 BR, 2 MEM, 4 MUL), random modes
// and faulty units.  Checked from the outputs alone: every copy is issued
// exactly once, never to a slot lacking a healthy unit of its class, copies
// of one operation use different units whenever the class has enough
// healthy ones, fetch_stall is high exactly until the last time slot, and
// the number of time slots equals a count computed here from the
// per-class demand (ceil(copies/healthy units), and ceil(all/8)) except
// where the greedy binding needs more, which is reported as a failure if it
// exceeds that bound by more than one.
module tb_irb;
  import vliw_pkg::*;
  import tb_isa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  mode_e mode = MODE_DMR;
  logic [ISSUE_W-1:0][NCLASS-1:0] faulty = '0;
  dcex_t bundle = '0;
  logic flush = 0, replay_req = 0;
  logic [ISSUE_W-1:0] replay_mask = '0;
  logic [ISSUE_W-1:0][ISSUE_W-1:0] replay_used = '0;
  dec_bundle_t replay_ops = '0;
  bind_vec_t binding;
  dec_bundle_t slot_op;
  logic ts_valid, ts_last, ts_reexec, fetch_stall;

  irb dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic dec_op_t mk(fu_class_e cls, opcode_e opc);
    dec_op_t o = '0;
    o.valid = 1; o.cls = cls; o.opc = opc; o.rd = 6'd1;
    return o;
  endfunction

  // Issue the bundle: present it, record every time slot until the last one.
  // Returns the number of time slots; records[slot] per time slot.
  bind_vec_t rec [16];
  int        nrec;
  task automatic issue(dec_bundle_t ops, output int nts);
    int guard;
    @(negedge clk);
    bundle.valid = 1; bundle.ops = ops; bundle.pc = '0;
    nts = 0; guard = 0;
    forever begin
      #1;
      expect_true(ts_valid && !ts_reexec, "time slot valid");
      expect_true(fetch_stall == !ts_last, "fetch_stall until last time slot");
      rec[nts] = binding;
      nts++;
      guard++;
      if (ts_last || guard == 15) break;
      @(negedge clk);
    end
    nrec = nts;
    @(negedge clk);
    bundle = '0;
  endtask

  function automatic bit bound(bind_vec_t b, int s, int op, int c);
    return b[s].valid && b[s].op_idx == 3'(op) && b[s].copy == 2'(c);
  endfunction

  // Property checks over a recorded issue.
  task automatic check_issue(dec_bundle_t ops, int ncopy);
    int cnt [ISSUE_W][NCOPY];
    int unit_of [ISSUE_W][NCOPY];
    int healthy;
    foreach (cnt[i, c]) begin cnt[i][c] = 0; unit_of[i][c] = -1; end
    for (int t = 0; t < nrec; t++)
      for (int s = 0; s < ISSUE_W; s++)
        if (rec[t][s].valid) begin
          int i, c;
          i = rec[t][s].op_idx; c = rec[t][s].copy;
          cnt[i][c]++;
          unit_of[i][c] = s;
          checks++;
          if (!slot_caps(s)[ops[i].cls] || faulty[s][ops[i].cls]) begin
            failures++; $display("FAIL: op %0d bound to slot %0d without healthy unit", i, s);
          end
        end
    for (int i = 0; i < ISSUE_W; i++) begin
      healthy = 0;
      for (int s = 0; s < ISSUE_W; s++) healthy += (slot_caps(s)[ops[i].cls] && !faulty[s][ops[i].cls]);
      for (int c = 0; c < NCOPY; c++) begin
        checks++;
        if (cnt[i][c] != ((ops[i].valid && c < ncopy) ? 1 : 0)) begin
          failures++; $display("FAIL: op %0d copy %0d issued %0d times", i, c, cnt[i][c]);
        end
      end
      if (ops[i].valid && healthy >= ncopy)
        for (int c = 1; c < ncopy; c++)
          for (int d = 0; d < c; d++) begin
            checks++;
            if (unit_of[i][c] == unit_of[i][d]) begin
              failures++; $display("FAIL: op %0d copies %0d,%0d on one unit", i, d, c);
            end
          end
    end
  endtask

  function automatic int ceil_div(int a, int b); return (a + b - 1) / b; endfunction

  initial begin
    dec_bundle_t ops;
    int nts, lb, tot, ncopy;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- example bundle: ADD1 ADD2 MUL1 ADD3 ----
    ops = '0;
    ops[0] = mk(FU_ALU, OP_ADD); ops[1] = mk(FU_ALU, OP_ADD);
    ops[2] = mk(FU_MUL, OP_MUL); ops[3] = mk(FU_ALU, OP_ADD);
    mode = MODE_DMR;
    issue(ops, nts);
    expect_true(nts == 1, "DMR example fits one time slot");
    check_issue(ops, 2);

    faulty[2][FU_MUL] = 1;
    issue(ops, nts);
    expect_true(nts == 1, "DMR example with MUL2 faulty: one time slot");
    expect_true(bound(rec[0], 0, 0, 0) && bound(rec[0], 1, 1, 0) && bound(rec[0], 2, 3, 0) &&
                bound(rec[0], 3, 2, 0) && bound(rec[0], 4, 0, 1) && bound(rec[0], 5, 1, 1) &&
                bound(rec[0], 6, 2, 1) && bound(rec[0], 7, 3, 1),
                "rebinding ADD1 ADD2 ADD3 MUL1 | ADD1 ADD2 MUL1 ADD3");
    check_issue(ops, 2);
    faulty = '0;

    mode = MODE_TMR;
    issue(ops, nts);
    expect_true(nts == 2, "TMR example: two time slots");
    check_issue(ops, 3);

    mode = MODE_OFF;
    issue(ops, nts);
    expect_true(nts == 1, "unreplicated: one time slot");
    check_issue(ops, 1);

    // ---- duplicated branch on the single branch unit ----
    mode = MODE_DMR;
    ops = '0; ops[0] = mk(FU_BR, OP_BR); ops[1] = mk(FU_ALU, OP_ADD);
    issue(ops, nts);
    expect_true(nts == 2, "DMR branch: two time slots");
    expect_true(bound(rec[0], 0, 0, 0) && bound(rec[1], 0, 0, 1), "both branch copies on slot 0");
    check_issue(ops, 2);

    // ---- empty bundle still takes a time slot ----
    ops = '0;
    issue(ops, nts);
    expect_true(nts == 1, "NOP bundle: one time slot");

    // ---- re-execution request ----
    mode = MODE_DMR_REEXEC;
    ops = '0;
    ops[0] = mk(FU_ALU, OP_ADD); ops[1] = mk(FU_ALU, OP_ADD); ops[2] = mk(FU_MUL, OP_MUL);
    ops[3] = mk(FU_ALU, OP_ADD); ops[4] = mk(FU_ALU, OP_ADD);
    @(negedge clk);
    bundle.valid = 1; bundle.ops = ops;           // 10 copies: 2 time slots
    #1 expect_true(fetch_stall && !ts_last, "held bundle first time slot");
    // fault detector asks to re-execute op 2 of the previous bundle (used 3, 6)
    replay_req = 1; replay_mask = 8'b0000_0100;
    replay_used = '0; replay_used[2] = 8'b0100_1000;
    replay_ops = '0; replay_ops[2] = mk(FU_MUL, OP_MULHU);
    @(negedge clk);
    replay_req = 0;
    #1;
    expect_true(ts_valid && ts_reexec && ts_last && fetch_stall, "re-execution time slot");
    expect_true((bound(binding, 2, 2, 2) || bound(binding, 7, 2, 2)) &&
                !binding[3].valid && !binding[6].valid, "third copy on an unused MUL");
    expect_true(slot_op[2].opc == OP_MULHU || slot_op[7].opc == OP_MULHU, "replayed operation");
    @(negedge clk);
    #1;
    expect_true(ts_valid && !ts_reexec && !ts_last && fetch_stall, "held bundle issued again from its start");
    expect_true(bound(binding, 0, 0, 0), "first copy issued again");
    @(negedge clk);
    #1 expect_true(ts_last && !fetch_stall, "held bundle completes");
    @(negedge clk);
    bundle = '0;

    // ---- flush in the middle of a bundle ----
    mode = MODE_TMR;
    @(negedge clk);
    bundle.valid = 1; bundle.ops = ops;
    flush = 1;
    @(negedge clk);
    flush = 0;
    #1 expect_true(bound(binding, 0, 0, 0) && fetch_stall, "flush restarts the bundle");
    @(negedge clk); bundle = '0; flush = 1;     // drop the partly issued bundle
    @(negedge clk); flush = 0;

    // ---- random legal bundles ----
    for (int n = 0; n < 400; n++) begin
      int nbr, nmem, nmul, per [NCLASS], hl [NCLASS];
      ops = '0; nbr = 0; nmem = 0; nmul = 0;
      for (int i = 0; i < ISSUE_W; i++) begin
        int r; r = $urandom_range(0, 9);
        if (r < 3) continue;
        if (r == 3 && nbr < 1)       begin ops[i] = mk(FU_BR,  OP_BR);  nbr++;  end
        else if (r == 4 && nmem < 2) begin ops[i] = mk(FU_MEM, OP_LDW); nmem++; end
        else if (r <= 6 && nmul < 4) begin ops[i] = mk(FU_MUL, OP_MUL); nmul++; end
        else ops[i] = mk(FU_ALU, OP_ADD);
      end
      mode = mode_e'($urandom_range(0, 3));
      ncopy = mode_copies(mode);
      faulty = '0;
      for (int f = 0; f < $urandom_range(0, 5); f++) begin
        int s, c; s = $urandom_range(0, 7); c = $urandom_range(0, 2);
        if (slot_caps(s)[c]) faulty[s][c] = 1;
      end
      // keep one healthy unit per class
      faulty[0][FU_ALU] = 0; faulty[7][FU_MUL] = 0; faulty[5][FU_MEM] = 0;
      issue(ops, nts);
      check_issue(ops, ncopy);
      // lower bound on time slots from demand per class
      tot = 0; lb = 1;
      for (int c = 0; c < NCLASS; c++) begin per[c] = 0; hl[c] = 0; end
      for (int i = 0; i < ISSUE_W; i++) if (ops[i].valid) begin per[ops[i].cls] += ncopy; tot += ncopy; end
      for (int s = 0; s < ISSUE_W; s++) for (int c = 0; c < NCLASS; c++) hl[c] += (slot_caps(s)[c] && !faulty[s][c]);
      for (int c = 0; c < NCLASS; c++) if (per[c] > 0 && ceil_div(per[c], hl[c]) > lb) lb = ceil_div(per[c], hl[c]);
      if (ceil_div(tot, 8) > lb) lb = ceil_div(tot, 8);
      expect_true(nts >= lb && nts <= lb + 1, $sformatf("time slots %0d against bound %0d", nts, lb));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
