// fault_detector: compares or votes the copies of each operation, commits,
// asks for re-execution and diagnoses permanently faulty units.
//
// Each cycle it takes one executed time slot from the EX/M-WB register.  The
// binding information tells it, for every slot, which copy of which
// operation the slot ran; results are gathered per operation and copy until
// the bundle's last time slot arrives.  Then, per operation:
//   MODE_OFF         the single result commits.
//   MODE_DMR         equal copies commit; a mismatch is reported
//                    (err_detected, err_uncorrectable) and the operation is
//                    not committed.
//   MODE_TMR         majority of three commits; a single dissenting copy is a
//                    corrected error; no majority is uncorrectable.
//   MODE_DMR_REEXEC  equal copies commit; on a mismatch the bundle is held,
//                    replay_req asks the IRB for a third copy on another unit,
//                    and when it returns the majority of three commits.
// The commit (commit_* outputs) is a combinational output in the cycle of
// the last time slot, so the next bundle in EX reads the new register values.
//
// Permanent-fault diagnosis: every unit has a counter of consecutive
// executions in which it was outvoted (or, in DMR, disagreed with its twin
// when a third opinion decided).  An agreeing execution clears it; reaching
// PERM_THRESH marks the unit faulty, and the mask goes to the IRB, which no
// longer binds to it.  A plain DMR mismatch has no majority and diagnoses
// nothing.  fu_disable lets a start-up test declare units faulty as well.
// The threshold value and fu_disable are this design's choices; the source
// says only that "a number of sequential instructions" decides.
module fault_detector
  import vliw_pkg::*;
#(
  parameter int unsigned PERM_THRESH = 3
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  mode_e                          mode,
  input  exwb_t                          ts,
  input  logic [ISSUE_W-1:0][NCLASS-1:0] fu_disable,
  // commit to the write-back stage
  output logic                           commit_valid,
  output logic [PC_W-1:0]                commit_pc,
  output dec_bundle_t                    commit_ops,
  output res_vec_t                       commit_res,
  output logic [ISSUE_W-1:0]             commit_ok,
  // re-execution request to the IRB
  output logic                           replay_req,
  output logic [ISSUE_W-1:0]             replay_mask,
  output logic [ISSUE_W-1:0][ISSUE_W-1:0] replay_used,
  output dec_bundle_t                    replay_ops,
  // unit status and error events
  output logic [ISSUE_W-1:0][NCLASS-1:0] faulty,
  output logic                           err_detected,
  output logic                           err_corrected,
  output logic                           err_uncorrectable,
  output logic                           perm_declared
);
  localparam int unsigned CW = $clog2(PERM_THRESH + 1);

  typedef logic [ISSUE_W-1:0][NCOPY-1:0]              have_t;
  typedef fu_res_t [ISSUE_W-1:0][NCOPY-1:0]           rbuf_t;
  typedef logic [ISSUE_W-1:0][NCOPY-1:0][SLOT_W-1:0]  fbuf_t;

  have_t       have_q, cur_have;
  rbuf_t       res_q, cur_res;
  fbuf_t       fu_q, cur_fu;
  dec_bundle_t ops_q, cur_ops;
  logic [PC_W-1:0] pc_q, cur_pc;
  logic        waiting;                 // held for re-execution results
  logic        eval;

  logic [ISSUE_W-1:0][NCLASS-1:0]          faulty_q, agree_hit, dis_hit, new_faulty;
  logic [ISSUE_W-1:0][NCLASS-1:0][CW-1:0]  cnt_q;
  logic [ISSUE_W-1:0]                      need;

  // Merge the incoming time slot into the per-operation buffer.
  always_comb begin
    cur_have = have_q;
    cur_res  = res_q;
    cur_fu   = fu_q;
    cur_ops  = waiting ? ops_q : ts.ops;
    cur_pc   = waiting ? pc_q  : ts.pc;
    if (ts.valid) begin
      for (int s = 0; s < ISSUE_W; s++) begin
        if (ts.bnd[s].valid) begin
          cur_have[ts.bnd[s].op_idx][ts.bnd[s].copy] = 1'b1;
          cur_res [ts.bnd[s].op_idx][ts.bnd[s].copy] = ts.res[s];
          cur_fu  [ts.bnd[s].op_idx][ts.bnd[s].copy] = SLOT_W'(s);
        end
      end
    end
  end

  assign eval = ts.valid && ts.last;

  // Compare / vote per operation.
  always_comb begin
    fu_res_t   r0, r1, r2;
    fu_class_e cls;
    logic      vote3;
    logic [NCOPY-1:0] agree, dis;
    commit_res        = '0;
    commit_ok         = '0;
    need              = '0;
    agree_hit         = '0;
    dis_hit           = '0;
    err_detected      = 1'b0;
    err_corrected     = 1'b0;
    err_uncorrectable = 1'b0;
    vote3             = waiting || (mode == MODE_TMR);
    for (int i = 0; i < ISSUE_W; i++) begin
      r0    = cur_res[i][0];
      r1    = cur_res[i][1];
      r2    = cur_res[i][2];
      cls   = cur_ops[i].cls;
      agree = '0;
      dis   = '0;
      if (eval && cur_ops[i].valid) begin
        if (mode == MODE_OFF && !waiting) begin
          commit_res[i] = r0;
          commit_ok[i]  = 1'b1;
        end else if (vote3 && (!waiting || cur_have[i][2])) begin
          if (r0 == r1) begin
            commit_res[i] = r0;
            commit_ok[i]  = 1'b1;
            agree         = 3'b011;
            if (r2 == r0) agree[2] = 1'b1;
            else          dis[2]   = 1'b1;
          end else if (r0 == r2) begin
            commit_res[i] = r0;
            commit_ok[i]  = 1'b1;
            agree         = 3'b101;
            dis[1]        = 1'b1;
          end else if (r1 == r2) begin
            commit_res[i] = r1;
            commit_ok[i]  = 1'b1;
            agree         = 3'b110;
            dis[0]        = 1'b1;
          end else begin
            err_detected      = 1'b1;
            err_uncorrectable = 1'b1;
          end
          if (dis != '0) begin
            err_corrected = 1'b1;
            if (!waiting) err_detected = 1'b1;   // counted when first seen
          end
        end else if (waiting) begin
          // operation already compared equal before the re-execution
          commit_res[i] = r0;
          commit_ok[i]  = 1'b1;
        end else begin          // two copies
          if (r0 == r1) begin
            commit_res[i] = r0;
            commit_ok[i]  = 1'b1;
            agree         = 3'b011;
          end else begin
            err_detected = 1'b1;
            if (mode == MODE_DMR_REEXEC) need[i] = 1'b1;
            else                         err_uncorrectable = 1'b1;
          end
        end
        for (int c = 0; c < NCOPY; c++) begin
          if (agree[c]) agree_hit[cur_fu[i][c]][cls] = 1'b1;
          if (dis[c])   dis_hit[cur_fu[i][c]][cls]   = 1'b1;
        end
      end
    end
  end

  assign replay_req   = eval && !waiting && (need != '0);
  assign replay_mask  = need;
  assign replay_ops   = cur_ops;
  always_comb begin
    for (int i = 0; i < ISSUE_W; i++) begin
      replay_used[i] = '0;
      replay_used[i][cur_fu[i][0]] = 1'b1;
      replay_used[i][cur_fu[i][1]] = 1'b1;
    end
  end

  assign commit_valid = eval && !replay_req;
  assign commit_pc    = cur_pc;
  assign commit_ops   = cur_ops;

  // Consecutive-error counters.
  always_comb begin
    new_faulty = faulty_q;
    for (int s = 0; s < ISSUE_W; s++)
      for (int k = 0; k < NCLASS; k++)
        if (commit_valid && dis_hit[s][k] && (cnt_q[s][k] + 1'b1 >= CW'(PERM_THRESH)))
          new_faulty[s][k] = 1'b1;
  end
  assign perm_declared = (new_faulty != faulty_q);
  assign faulty        = faulty_q | fu_disable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_q   <= '0;
      res_q    <= '0;
      fu_q     <= '0;
      ops_q    <= '0;
      pc_q     <= '0;
      waiting  <= 1'b0;
      faulty_q <= '0;
      cnt_q    <= '0;
    end else begin
      if (replay_req) begin
        have_q  <= cur_have;
        res_q   <= cur_res;
        fu_q    <= cur_fu;
        ops_q   <= cur_ops;
        pc_q    <= cur_pc;
        waiting <= 1'b1;
      end else if (eval) begin
        have_q  <= '0;
        waiting <= 1'b0;
      end else if (ts.valid) begin
        have_q  <= cur_have;
        res_q   <= cur_res;
        fu_q    <= cur_fu;
      end
      if (commit_valid) begin
        faulty_q <= new_faulty;
        for (int s = 0; s < ISSUE_W; s++)
          for (int k = 0; k < NCLASS; k++)
            if (dis_hit[s][k])        cnt_q[s][k] <= (cnt_q[s][k] == CW'(PERM_THRESH)) ? cnt_q[s][k] : cnt_q[s][k] + 1'b1;
            else if (agree_hit[s][k]) cnt_q[s][k] <= '0;
      end
    end
  end
endmodule
