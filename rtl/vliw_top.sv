// vliw_top: 8-issue VLIW pipeline with run-time instruction replication and
// binding (IRB) and a fault detector.
//
// Four stages: F (fetch_unit) -> F/DC -> DC (eight op_decoders) -> DC/EX ->
// EX (irb + eight ex_slots + register read) -> EX/M-WB -> M/WB
// (fault_detector + wb_stage with the data memory, register write-back).
// The IRB copies each operation two or three times by mode, binds the copies
// to idle healthy units of the bundle and stalls the fetch when a bundle
// needs more than one time slot.  The fault detector gathers the copies
// using the binding information, commits compared/voted results, asks for
// a re-execution in DMR-with-re-execution mode and marks units that keep
// failing as permanently faulty, which makes the IRB bind around them.
//
// Timing: one time slot per cycle in EX.  A bundle commits in the cycle its
// last time slot is in M/WB; the register file is write-through, so the next
// bundle, then in EX, sees the results.  A taken branch redirects the fetch
// at commit and flushes the three younger stages (three-cycle penalty).
// A re-execution drops the time slot in EX and issues the third copies in
// the next cycle; the bundle then commits one cycle later and the dropped
// time slot is issued again.
//
// Test/observation ports (this design's own): imem_* and dmem_dbg_* load
// and inspect the memories, rf_dbg_* reads a register, fi_flip injects an
// error into the result of unit [slot][class], fu_disable declares units
// faulty from outside.  mode is a static configuration input.
module vliw_top
  import vliw_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH  = 1 << PC_W,
  parameter int unsigned DMEM_DEPTH  = 1024,
  parameter int unsigned PERM_THRESH = 3,
  localparam int unsigned DAW = $clog2(DMEM_DEPTH)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  mode_e                          mode,
  // program load
  input  logic                           imem_we,
  input  logic [PC_W-1:0]                imem_waddr,
  input  logic [ISSUE_W-1:0][XLEN-1:0]   imem_wdata,
  // data memory access from outside
  input  logic                           dmem_dbg_we,
  input  logic [DAW-1:0]                 dmem_dbg_addr,
  input  logic [XLEN-1:0]                dmem_dbg_wdata,
  output logic [XLEN-1:0]                dmem_dbg_rdata,
  input  logic [RIDX_W-1:0]              rf_dbg_addr,
  output logic [XLEN-1:0]                rf_dbg_rdata,
  // faults
  input  logic [ISSUE_W-1:0][NCLASS-1:0] fi_flip,
  input  logic [ISSUE_W-1:0][NCLASS-1:0] fu_disable,
  // status
  output logic                           commit_valid,
  output logic [PC_W-1:0]                commit_pc,
  output logic                           fetch_stall,
  output logic                           ts_valid,
  output logic                           ts_reexec,
  output logic                           replay,
  output logic                           redirect,
  output logic                           err_detected,
  output logic                           err_corrected,
  output logic                           err_uncorrectable,
  output logic                           perm_declared,
  output logic [ISSUE_W-1:0][NCLASS-1:0] fu_faulty,
  output logic                           out_of_service
);
  localparam int unsigned NRD = 2*ISSUE_W + 1;

  fdc_t  fetched, fdc_q;
  dcex_t dcex_d, dcex_q;
  exwb_t exwb_d, exwb_q;

  logic [PC_W-1:0] redirect_pc;

  // ---------------- F ----------------
  fetch_unit #(.DEPTH(IMEM_DEPTH)) u_fetch (
    .clk, .rst_n, .fetch_stall, .redirect, .redirect_pc,
    .imem_we, .imem_waddr, .imem_wdata, .fetched
  );

  pipe_reg #(.T(fdc_t)) u_fdc (
    .clk, .rst_n, .en(!fetch_stall), .clr(redirect), .d(fetched), .q(fdc_q)
  );

  // ---------------- DC ----------------
  for (genvar s = 0; s < ISSUE_W; s++) begin : g_dec
    op_decoder u_dec (.word(fdc_q.ops[s]), .op(dcex_d.ops[s]));
  end
  assign dcex_d.valid = fdc_q.valid;
  assign dcex_d.pc    = fdc_q.pc;

  pipe_reg #(.T(dcex_t)) u_dcex (
    .clk, .rst_n, .en(!fetch_stall), .clr(redirect), .d(dcex_d), .q(dcex_q)
  );

  // ---------------- EX ----------------
  bind_vec_t   binding;
  dec_bundle_t slot_op;
  logic        ts_last;

  logic                            replay_req;
  logic [ISSUE_W-1:0]              replay_mask;
  logic [ISSUE_W-1:0][ISSUE_W-1:0] replay_used;
  dec_bundle_t                     replay_ops;

  irb u_irb (
    .clk, .rst_n, .mode, .faulty(fu_faulty), .bundle(dcex_q), .flush(redirect),
    .replay_req, .replay_mask, .replay_used, .replay_ops,
    .binding, .slot_op, .ts_valid, .ts_last, .ts_reexec, .fetch_stall
  );

  logic [NRD-1:0][RIDX_W-1:0]     rf_ra;
  logic [NRD-1:0][XLEN-1:0]       rf_rd;
  logic [ISSUE_W-1:0]             rf_we;
  logic [ISSUE_W-1:0][RIDX_W-1:0] rf_wa;
  logic [ISSUE_W-1:0][XLEN-1:0]   rf_wd;
  res_vec_t                       ex_res;

  for (genvar s = 0; s < ISSUE_W; s++) begin : g_slot
    ex_slot #(.CAPS(slot_caps(s))) u_slot (
      .sbind(binding[s]), .op(slot_op[s]),
      .ra1(rf_ra[2*s]), .ra2(rf_ra[2*s+1]), .rd1(rf_rd[2*s]), .rd2(rf_rd[2*s+1]),
      .fi_flip(fi_flip[s]), .res(ex_res[s])
    );
  end
  assign rf_ra[NRD-1]  = rf_dbg_addr;
  assign rf_dbg_rdata  = rf_rd[NRD-1];

  regfile #(.NRD(NRD), .NWR(ISSUE_W)) u_rf (
    .clk, .rst_n, .ra(rf_ra), .rd(rf_rd), .we(rf_we), .wa(rf_wa), .wd(rf_wd)
  );

  assign exwb_d.valid  = ts_valid;
  assign exwb_d.last   = ts_last;
  assign exwb_d.reexec = ts_reexec;
  assign exwb_d.pc     = dcex_q.pc;
  assign exwb_d.bnd    = binding;
  assign exwb_d.res    = ex_res;
  assign exwb_d.ops    = dcex_q.ops;

  // A time slot in EX is dropped when the bundle ahead of it is flushed by a
  // branch or must re-execute first.
  pipe_reg #(.T(exwb_t)) u_exwb (
    .clk, .rst_n, .en(1'b1), .clr(redirect || replay_req), .d(exwb_d), .q(exwb_q)
  );

  // ---------------- M/WB ----------------
  dec_bundle_t        commit_ops;
  res_vec_t           commit_res;
  logic [ISSUE_W-1:0] commit_ok;

  fault_detector #(.PERM_THRESH(PERM_THRESH)) u_fd (
    .clk, .rst_n, .mode, .ts(exwb_q), .fu_disable,
    .commit_valid, .commit_pc, .commit_ops, .commit_res, .commit_ok,
    .replay_req, .replay_mask, .replay_used, .replay_ops,
    .faulty(fu_faulty), .err_detected, .err_corrected, .err_uncorrectable, .perm_declared
  );

  wb_stage #(.DMEM_DEPTH(DMEM_DEPTH)) u_wb (
    .clk, .commit_valid, .commit_ops, .commit_res, .commit_ok,
    .rf_we, .rf_wa, .rf_wd, .redirect, .redirect_pc,
    .dbg_we(dmem_dbg_we), .dbg_addr(dmem_dbg_addr), .dbg_wdata(dmem_dbg_wdata),
    .dbg_rdata(dmem_dbg_rdata)
  );

  assign replay = replay_req;

  // Out of service: some class has no healthy unit left.
  always_comb begin
    logic [NCLASS-1:0] any_ok;
    any_ok = '0;
    for (int s = 0; s < ISSUE_W; s++)
      any_ok |= slot_caps(s) & ~fu_faulty[s];
    out_of_service = (any_ok != '1);
  end
endmodule
