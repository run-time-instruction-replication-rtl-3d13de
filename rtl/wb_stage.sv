// wb_stage: memory access and write-back of a committed bundle (M/WB).
//
// Receives the fault detector's commit: the bundle's operations, the agreed
// result of each and which of them may commit.  Committed memory operations
// are given the data-memory ports in bundle order (a bundle holds at most
// two, one per memory unit); loads return their word in the same cycle and
// stores write at the clock edge.  Register writes go out to the register
// file, one port per operation.  A committed taken branch redirects the
// fetch.  Port assignment and same-cycle load return are this design's choices.
module wb_stage
  import vliw_pkg::*;
#(
  parameter int unsigned DMEM_DEPTH = 1024,
  localparam int unsigned AW = $clog2(DMEM_DEPTH)
) (
  input  logic                            clk,
  input  logic                            commit_valid,
  input  dec_bundle_t                     commit_ops,
  input  res_vec_t                        commit_res,
  input  logic [ISSUE_W-1:0]              commit_ok,
  output logic [ISSUE_W-1:0]              rf_we,
  output logic [ISSUE_W-1:0][RIDX_W-1:0]  rf_wa,
  output logic [ISSUE_W-1:0][XLEN-1:0]    rf_wd,
  output logic                            redirect,
  output logic [PC_W-1:0]                 redirect_pc,
  input  logic                            dbg_we,
  input  logic [AW-1:0]                   dbg_addr,
  input  logic [XLEN-1:0]                 dbg_wdata,
  output logic [XLEN-1:0]                 dbg_rdata
);
  localparam int unsigned NPORT = 2;

  logic [NPORT-1:0]           m_we;
  logic [NPORT-1:0][AW-1:0]   m_addr;
  logic [NPORT-1:0][XLEN-1:0] m_wdata, m_rdata;
  logic [ISSUE_W-1:0]         port_of;     // memory port used by each op
  logic [ISSUE_W-1:0]         go;

  assign go = commit_valid ? commit_ok : '0;

  always_comb begin
    int unsigned n;
    n       = 0;
    m_we    = '0;
    m_addr  = '0;
    m_wdata = '0;
    port_of = '0;
    for (int i = 0; i < ISSUE_W; i++) begin
      if (go[i] && commit_ops[i].cls == FU_MEM && n < NPORT) begin
        port_of[i]  = n[0];
        m_addr[n]   = commit_res[i].val[AW-1:0];
        m_wdata[n]  = commit_res[i].aux;
        m_we[n]     = (commit_ops[i].opc == OP_STW);
        n           = n + 1;
      end
    end
  end

  dmem #(.DEPTH(DMEM_DEPTH), .NPORT(NPORT)) u_dmem (
    .clk, .we(m_we), .addr(m_addr), .wdata(m_wdata), .rdata(m_rdata),
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata
  );

  always_comb begin
    redirect    = 1'b0;
    redirect_pc = '0;
    for (int i = 0; i < ISSUE_W; i++) begin
      rf_we[i] = go[i] && commit_ops[i].wr_rd;
      rf_wa[i] = commit_ops[i].rd;
      rf_wd[i] = (commit_ops[i].opc == OP_LDW) ? m_rdata[port_of[i]] : commit_res[i].val;
    end
    for (int i = ISSUE_W - 1; i >= 0; i--)
      if (go[i] && commit_ops[i].cls == FU_BR && commit_res[i].val[0]) begin
        redirect    = 1'b1;
        redirect_pc = commit_res[i].aux[PC_W-1:0];
      end
  end
endmodule
