// tb_pipe_reg: random enable / clear / data sequences against a one-line
// model of a stage register (reset and clear give zero, clear beats enable,
// no enable holds).
module tb_pipe_reg;
  typedef struct packed { logic v; logic [15:0] x; } pl_t;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  pl_t d = '0, q, model;

  pipe_reg #(.T(pl_t)) dut (.clk, .rst_n, .en, .clr, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    checks++; if (q !== '0) failures++;
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 9) == 0);
      d   = pl_t'($urandom);
      @(posedge clk);
      if (clr) model = '0; else if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d q=%h exp=%h", n, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
