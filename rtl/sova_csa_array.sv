// sova_csa_array: the eight CSA units wired as the radix-2 trellis.
//
// CSA j takes the partial sums of the branches entering state j, which the
// CSAs of its predecessors p0 = {0,j[2:1]} and p1 = {1,j[2:1]} produced for
// new bit a = j[0] in the previous cycle, and the two branch metrics leaving
// state j for the current symbol. Each cycle consumes one symbol's branch
// metrics and emits one decision vector and eight metric differences for the
// trellis step completed by the previous symbol. After reset the trellis is
// taken to start in state 0: the partial sum of branch 0->0 is zero and all
// others are START_PENALTY, so the first compare after reset leaves state 0
// with metric 0 and every other state with START_PENALTY; that first vector
// is a dummy step. A known start state is a choice of this design; it is
// needed for the Octal(13) code, whose rate-one trellis cannot otherwise tell
// its eight start states apart.
module sova_csa_array
  import sova_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  bm_t  bm [NS][2],       // branch metrics of the current symbol
  output logic [NS-1:0] dec,     // decision per state (MSB of chosen predecessor)
  output mag_t delta [NS],       // metric difference per state
  output pm_t  metric [NS]       // path metric per state
);

  localparam pm_t START_PENALTY = pm_t'(1) << (PM_W - 3);

  pm_t part [NS][2];             // part[p][a]: sm_p + bm for branch p -> (p<<1|a)

  for (genvar j = 0; j < NS; j++) begin : g_csa
    localparam state_t P0 = pred(state_t'(j), 1'b0);
    localparam state_t P1 = pred(state_t'(j), 1'b1);
    localparam int     A  = j % 2;
    sova_csa #(
      .RESET_SUM0 ((j == 0) ? pm_t'(0) : START_PENALTY),
      .RESET_SUM1 (START_PENALTY)
    ) u_csa (
      .clk     (clk),
      .rst_n   (rst_n),
      .in0     (part[P0][A]),
      .in1     (part[P1][A]),
      .bm_next (bm[j]),
      .out     (part[j]),
      .dec     (dec[j]),
      .delta   (delta[j]),
      .metric  (metric[j])
    );
  end

endmodule
