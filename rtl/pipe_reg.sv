// pipe_reg: pipeline stage register (F/DC, DC/EX, EX/M-WB).
//
// Loads d when en is high, keeps its value otherwise (stall), and clears to
// all zeros (an invalid, empty stage) on clr, which wins over en; clr is used
// for branch flushes and to drop a time slot that has to be replayed.
// Asynchronous active-low reset also clears.  T is the payload type.
module pipe_reg #(
  parameter type T = logic [7:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic clr,
  input  T     d,
  output T     q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= d;
  end
endmodule
