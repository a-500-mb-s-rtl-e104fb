// sova_fifo: fixed-delay flip-flop FIFO (shift register) of DEPTH words.
//
// The decoder keeps the CSA decisions and metric differences in such
// flip-flop FIFOs so that they reach the equivalence detector and the
// reliability unit at the same time as the survivor memory has traced the
// most likely state. One word enters and one leaves every cycle; dout is din
// delayed by exactly DEPTH cycles. Contents are cleared by reset.
module sova_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 17
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage <= '{default: '0};
    end else begin
      stage[0] <= din;
      for (int k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
    end
  end

  assign dout = stage[DEPTH-1];

endmodule
