// regfile: general-purpose register file, written back at commit.
//
// NREGS x XLEN registers, r0 always reads 0.  NRD combinational read ports
// and NWR write ports.  Reads are write-through: a register written in this
// cycle reads as the new value, so the bundle in EX sees what the bundle
// committing in M/WB writes in the same cycle (no exposed latency).  When
// several ports write one register the highest port wins.  All registers
// clear on reset.  Port counts and bypass are this design's choices.
module regfile
  import vliw_pkg::*;
#(
  parameter int unsigned NRD = 2*ISSUE_W + 1,
  parameter int unsigned NWR = ISSUE_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NRD-1:0][RIDX_W-1:0] ra,
  output logic [NRD-1:0][XLEN-1:0]   rd,
  input  logic [NWR-1:0]             we,
  input  logic [NWR-1:0][RIDX_W-1:0] wa,
  input  logic [NWR-1:0][XLEN-1:0]   wd
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int w = 0; w < NWR; w++)
        if (we[w] && wa[w] != '0) regs[wa[w]] <= wd[w];
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rd[p] = regs[ra[p]];
      for (int w = 0; w < NWR; w++)
        if (we[w] && wa[w] == ra[p]) rd[p] = wd[w];
      if (ra[p] == '0) rd[p] = '0;
    end
  end
endmodule
