// dmem: word-addressed data memory used by the M/WB stage.
//
// NPORT access ports (one per memory unit), each with a combinational read
// and a write on the clock edge; a later port wins when two write one word.
// An extra port (dbg_*) loads and inspects the memory from outside.  Only
// committed (compared or voted) addresses reach it.  The address is taken
// modulo DEPTH.  Size and port structure are this design's choices; the
// source shows only the MEM/WB boxes of the two memory slots.
module dmem
  import vliw_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned NPORT = 2,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic [NPORT-1:0]         we,
  input  logic [NPORT-1:0][AW-1:0] addr,
  input  logic [NPORT-1:0][XLEN-1:0] wdata,
  output logic [NPORT-1:0][XLEN-1:0] rdata,
  input  logic                     dbg_we,
  input  logic [AW-1:0]            dbg_addr,
  input  logic [XLEN-1:0]          dbg_wdata,
  output logic [XLEN-1:0]          dbg_rdata
);
  logic [XLEN-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORT; p++)
      if (we[p]) mem[addr[p]] <= wdata[p];
    if (dbg_we) mem[dbg_addr] <= dbg_wdata;
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) rdata[p] = mem[addr[p]];
    dbg_rdata = mem[dbg_addr];
  end
endmodule
