// sova_smu: L-step register-exchange survivor memory unit.
//
// A grid of one-bit registers, L columns by 8 rows, wired like the trellis.
// Each cycle the decision of state i enters column 1 of row i and also drives
// the select of every multiplexer in row i; the multiplexer of row i in
// column k passes the column-k register of predecessor {dec_i, i[2:1]} on
// to column k+1. Column k of row i thus holds the decision found k steps back
// along the survivor of state i: the register exchange performs an L-step
// traceback every cycle with only a multiplexer and a register in the path.
//
// Because three consecutive decisions spell out a state (see sova_pkg), the
// last three columns of one row give the state that the survivor passed L
// steps earlier. The row read is start_state, the best state at time t
// (supplied by sova_best_state); this is a choice of this design.
//
// Timing: with decision vector D[t] at the input in cycle c (and start_state
// the best state of time t), ml_state in the same cycle is the trellis state
// at time t-L on the survivor of start_state. Reset clears the grid.
module sova_smu
  import sova_pkg::*;
#(
  parameter int unsigned L = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NS-1:0] dec,
  input  state_t        start_state,
  output state_t        ml_state
);

  logic [NS-1:0] col [L];        // col[k-1][i]: decision k steps back from state i

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col <= '{default: '0};
    end else begin
      col[0] <= dec;
      for (int k = 1; k < L; k++)
        for (int i = 0; i < NS; i++)
          col[k][i] <= col[k-1][pred(state_t'(i), dec[i])];
    end
  end

  assign ml_state = {col[L-1][start_state], col[L-2][start_state], col[L-3][start_state]};

  initial assert (L >= 3) else $error("sova_smu: L must be at least 3");

endmodule
