// tb_dmem: random two-port accesses plus the load port against an array
// model; checks combinational reads, writes at the edge and that port 1
// wins over port 0 on the same word.
module tb_dmem;
  import vliw_pkg::*;
  localparam int DEPTH = 64, AW = 6;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic [1:0] we = '0;
  logic [1:0][AW-1:0] addr = '0;
  logic [1:0][XLEN-1:0] wdata = '0, rdata;
  logic dbg_we = 0;
  logic [AW-1:0] dbg_addr = '0;
  logic [XLEN-1:0] dbg_wdata = '0, dbg_rdata;
  logic [XLEN-1:0] model [DEPTH];

  dmem #(.DEPTH(DEPTH), .NPORT(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL got %h exp %h", got, exp); end
  endtask

  initial begin
    // fill through the load port
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk) dbg_we = 1; dbg_addr = AW'(i); dbg_wdata = $urandom; model[i] = dbg_wdata;
    end
    @(negedge clk) dbg_we = 0;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        we[p] = $urandom_range(0, 1);
        addr[p] = AW'($urandom_range(0, 7));
        wdata[p] = $urandom;
      end
      dbg_addr = AW'($urandom_range(0, 7));
      #1;
      chk(rdata[0], model[addr[0]]);
      chk(rdata[1], model[addr[1]]);
      chk(dbg_rdata, model[dbg_addr]);
      @(posedge clk);
      for (int p = 0; p < 2; p++) if (we[p]) model[addr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
