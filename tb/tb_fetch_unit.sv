// tb_fetch_unit: loads bundles, then checks that the fetched bundle follows
// the PC, which advances one bundle per cycle, holds under fetch_stall and
// jumps on a redirect (redirect wins over stall).  Reset starts at 0.
module tb_fetch_unit;
  import vliw_pkg::*;
  localparam int DEPTH = 64;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, fetch_stall = 0, redirect = 0, imem_we = 0;
  logic [PC_W-1:0] redirect_pc = '0, imem_waddr = '0, pc_model;
  logic [ISSUE_W-1:0][XLEN-1:0] imem_wdata = '0;
  fdc_t fetched;

  fetch_unit #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ISSUE_W-1:0][XLEN-1:0] content(int a);
    logic [ISSUE_W-1:0][XLEN-1:0] c;
    for (int s = 0; s < ISSUE_W; s++) c[s] = 32'(a * 256 + s * 17 + 1);
    return c;
  endfunction

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk) imem_we = 1; imem_waddr = PC_W'(i); imem_wdata = content(i);
    end
    @(negedge clk) imem_we = 0; fetch_stall = 1; rst_n = 1;
    pc_model = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      checks++;
      if (!fetched.valid || fetched.pc !== pc_model || fetched.ops !== content(int'(pc_model) % DEPTH)) begin
        failures++;
        $display("FAIL n=%0d pc=%0d exp %0d", n, fetched.pc, pc_model);
      end
      fetch_stall = ($urandom_range(0, 3) == 0);
      redirect    = ($urandom_range(0, 15) == 0);
      redirect_pc = PC_W'($urandom_range(0, DEPTH-1));
      @(posedge clk);
      if (redirect) pc_model = redirect_pc;
      else if (!fetch_stall) pc_model = pc_model + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
