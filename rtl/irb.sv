// irb: Instruction Replication and Binding unit, at the entry of the EX stage.
//
// It takes the decoded bundle from the DC/EX register, makes one, two or
// three copies of each operation according to the mode (off, DMR, TMR, DMR
// with re-execution) and binds the copies to issue slots whose unit of the
// needed class is healthy (faulty mask from the fault detector).  Copies that
// do not fit in the current time slot are carried into the next one, and the
// fetch is stalled until the whole bundle has been issued.
//
// Binding rule (a greedy pass, this design's own): classes are served from
// the scarcest, BR, MEM, MUL, then ALU; within a class all originals, then
// all first replicas, then all second replicas, in bundle order; each copy
// takes the lowest-numbered free healthy slot not already used by another
// copy of the same operation.  The "different unit" rule is dropped only when
// the class has no healthy unused unit left (e.g. the single branch unit),
// and the copy then goes to a later time slot.  With the MUL of slot 2
// faulty and the bundle ADD1 ADD2 MUL1 ADD3, DMR gives in one time slot
// ADD1 ADD2 ADD3 MUL1 | ADD1 ADD2 MUL1 ADD3, the rebinding the source uses as
// its example.
//
// Re-execution: when the fault detector reports a duplicate mismatch
// (replay_req, in the cycle the bundle's last time slot is in M/WB), the
// time slot now in EX is dropped by the top, the IRB's bundle state is left
// as it was, and in the following cycle(s) the IRB issues a third copy of
// every mismatching operation on a unit not used by its first two copies,
// marked reexec.  Afterwards the interrupted bundle is issued again.
//
// Outputs per cycle: binding (op index and copy per slot), the operation
// each slot executes, ts_valid/ts_last/ts_reexec, and fetch_stall, which
// holds F, F/DC and DC/EX while the bundle in DC/EX is not fully issued.
// Combinational schedule, registered progress; one time slot per cycle.
module irb
  import vliw_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst_n,
  input  mode_e                              mode,
  input  logic [ISSUE_W-1:0][NCLASS-1:0]     faulty,
  input  dcex_t                              bundle,
  input  logic                               flush,
  input  logic                               replay_req,
  input  logic [ISSUE_W-1:0]                 replay_mask,
  input  logic [ISSUE_W-1:0][ISSUE_W-1:0]    replay_used,
  input  dec_bundle_t                        replay_ops,
  output bind_vec_t                          binding,
  output dec_bundle_t                        slot_op,
  output logic                               ts_valid,
  output logic                               ts_last,
  output logic                               ts_reexec,
  output logic                               fetch_stall
);
  typedef logic [ISSUE_W-1:0][NCOPY-1:0]   pend_t;
  typedef logic [ISSUE_W-1:0][ISSUE_W-1:0] used_t;

  // Progress through the bundle in DC/EX.
  logic  active;
  pend_t pend_q;
  used_t used_q;
  // Re-execution in progress.
  logic               rx_active;
  logic [ISSUE_W-1:0] rx_pend_q;
  used_t              rx_used_q;
  dec_bundle_t        rx_ops_q;

  dec_bundle_t eff_ops;
  pend_t       eff_pend, assigned, remaining;
  used_t       eff_used, new_used;
  logic        all_done;
  logic        bundle_done;   // bundle fully issued: DC/EX may load the next

  // Work to schedule this cycle.
  always_comb begin
    eff_ops  = bundle.ops;
    eff_pend = '0;
    eff_used = '0;
    if (rx_active) begin
      eff_ops = rx_ops_q;
      for (int i = 0; i < ISSUE_W; i++) eff_pend[i][2] = rx_pend_q[i];
      eff_used = rx_used_q;
    end else if (active) begin
      eff_pend = pend_q;
      eff_used = used_q;
    end else if (bundle.valid) begin
      for (int i = 0; i < ISSUE_W; i++)
        for (int c = 0; c < NCOPY; c++)
          eff_pend[i][c] = bundle.ops[i].valid && (c < mode_copies(mode));
    end
  end

  // Greedy binding of pending copies to free healthy slots.
  always_comb begin
    logic [ISSUE_W-1:0] free, healthy, elig;
    logic               relax, found;
    logic [SLOT_W-1:0]  sel;
    fu_class_e          cls;
    free     = '1;
    healthy  = '0;
    elig     = '0;
    relax    = 1'b0;
    found    = 1'b0;
    sel      = '0;
    cls      = FU_ALU;
    assigned = '0;
    new_used = eff_used;
    binding  = '0;
    for (int k = 0; k < NCLASS; k++) begin
      cls = fu_class_e'(NCLASS - 1 - k);        // BR, MEM, MUL, ALU
      for (int s = 0; s < ISSUE_W; s++)
        healthy[s] = slot_caps(s)[cls] && !faulty[s][cls];
      for (int c = 0; c < NCOPY; c++) begin
        for (int i = 0; i < ISSUE_W; i++) begin
          if (eff_pend[i][c] && eff_ops[i].cls == cls) begin
            relax = ((healthy & ~new_used[i]) == '0);
            elig  = healthy & free & (relax ? '1 : ~new_used[i]);
            found = 1'b0;
            sel   = '0;
            for (int s = 0; s < ISSUE_W; s++)
              if (!found && elig[s]) begin
                found = 1'b1;
                sel   = SLOT_W'(s);
              end
            if (found) begin
              free[sel]        = 1'b0;
              new_used[i][sel] = 1'b1;
              assigned[i][c]   = 1'b1;
              binding[sel].valid  = 1'b1;
              binding[sel].op_idx = SLOT_W'(i);
              binding[sel].copy   = 2'(c);
            end
          end
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < ISSUE_W; s++)
      slot_op[s] = binding[s].valid ? eff_ops[binding[s].op_idx] : '0;
  end

  assign remaining   = eff_pend & ~assigned;
  assign all_done    = (remaining == '0);
  assign ts_valid    = rx_active || bundle.valid;
  assign ts_last     = ts_valid && all_done;
  assign ts_reexec   = rx_active;
  assign bundle_done = !rx_active && bundle.valid && all_done && !replay_req;
  assign fetch_stall = bundle.valid && !bundle_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      pend_q    <= '0;
      used_q    <= '0;
      rx_active <= 1'b0;
      rx_pend_q <= '0;
      rx_used_q <= '0;
      rx_ops_q  <= '0;
    end else if (flush) begin
      active    <= 1'b0;
      rx_active <= 1'b0;
    end else if (replay_req) begin
      rx_active <= 1'b1;
      rx_pend_q <= replay_mask;
      rx_used_q <= replay_used;
      rx_ops_q  <= replay_ops;
    end else if (rx_active) begin
      if (all_done) rx_active <= 1'b0;
      for (int i = 0; i < ISSUE_W; i++) rx_pend_q[i] <= remaining[i][2];
      rx_used_q <= new_used;
    end else if (bundle.valid) begin
      active <= !all_done;
      pend_q <= remaining;
      used_q <= new_used;
    end
  end

  // A bound slot must hold a unit of the operation's class.
  always_comb begin
    for (int s = 0; s < ISSUE_W; s++)
      if (binding[s].valid)
        assert (slot_caps(s)[slot_op[s].cls]) else $error("irb: slot %0d lacks unit", s);
  end
endmodule
