// fetch_unit: the F stage.
//
// Holds the bundle program counter and the instruction memory (DEPTH bundles
// of ISSUE_W operation words) and presents the bundle at pc to the F/DC
// register.  The PC advances by one bundle per cycle unless fetch_stall is
// high; the IRB raises fetch_stall while a bundle needs more time slots.
// A committed taken branch (redirect) loads the target and wins over the
// stall.  The memory is loaded through the imem_* port.  Reset sets pc to 0.
// Memory size and the load port are this design's choices.
module fetch_unit
  import vliw_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << PC_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         fetch_stall,
  input  logic                         redirect,
  input  logic [PC_W-1:0]              redirect_pc,
  input  logic                         imem_we,
  input  logic [PC_W-1:0]              imem_waddr,
  input  logic [ISSUE_W-1:0][XLEN-1:0] imem_wdata,
  output fdc_t                         fetched
);
  logic [ISSUE_W-1:0][XLEN-1:0] imem [DEPTH];
  logic [PC_W-1:0] pc;

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_waddr[$clog2(DEPTH)-1:0]] <= imem_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           pc <= '0;
    else if (redirect)    pc <= redirect_pc;
    else if (!fetch_stall) pc <= pc + 1'b1;
  end

  always_comb begin
    fetched.valid = 1'b1;
    fetched.pc    = pc;
    fetched.ops   = imem[pc[$clog2(DEPTH)-1:0]];
  end
endmodule
