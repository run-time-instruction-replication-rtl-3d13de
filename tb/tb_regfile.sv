// tb_regfile: random multi-port writes and reads against an array model;
// checks write-through of same-cycle writes, highest-port priority,
// r0 = 0 and reset to zero.
module tb_regfile;
  import vliw_pkg::*;
  localparam int NRD = 17, NWR = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NRD-1:0][RIDX_W-1:0] ra = '0;
  logic [NRD-1:0][XLEN-1:0]   rd;
  logic [NWR-1:0] we = '0;
  logic [NWR-1:0][RIDX_W-1:0] wa = '0;
  logic [NWR-1:0][XLEN-1:0]   wd = '0;
  logic [XLEN-1:0] model [NREGS];

  regfile #(.NRD(NRD), .NWR(NWR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [XLEN-1:0] e;
    foreach (model[r]) model[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      for (int w = 0; w < NWR; w++) begin
        we[w] = ($urandom_range(0, 2) == 0);
        wa[w] = RIDX_W'($urandom_range(0, 15));   // small range: collisions
        wd[w] = $urandom;
      end
      for (int p = 0; p < NRD; p++) ra[p] = RIDX_W'($urandom_range(0, 15));
      #1;
      for (int p = 0; p < NRD; p++) begin
        e = model[ra[p]];
        for (int w = 0; w < NWR; w++) if (we[w] && wa[w] == ra[p]) e = wd[w];
        if (ra[p] == 0) e = 0;
        checks++;
        if (rd[p] !== e) begin
          failures++;
          $display("FAIL n=%0d port %0d r%0d got %h exp %h", n, p, ra[p], rd[p], e);
        end
      end
      @(posedge clk);
      for (int w = 0; w < NWR; w++) if (we[w] && wa[w] != 0) model[wa[w]] = wd[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
