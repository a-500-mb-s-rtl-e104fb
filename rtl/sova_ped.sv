// sova_ped: M-step path-equivalence detector.
//
// The same register exchange as the survivor memory, fed with decisions
// delayed to the time of the traced most likely state, plus an XOR at every
// multiplexer. The two inputs of the multiplexer of row i, column k are the
// decisions k+1 steps back along the two paths competing for state i; their
// XOR is 1 when the paths differ there. Step 1 (the point where the two
// paths meet) always differs and needs no gate.
//
// Output eqbar[i][j-1], j = 1..M, tells stage j of the reliability unit
// whether the two paths into state i disagree on the bit that stage j is
// rating. For CODE_OCT13 that bit is a trellis bit, so eqbar is the XOR of
// step j. For CODE_EPR4 the rated bit is the user bit a[t] xor a[t-1], so
// the paths disagree when exactly one of steps j and j-1 differs; eqbar is
// the XOR of the two step results. This adaptation to the precoder is a
// choice of this design.
//
// Timing: dec_d in cycle c is the delayed decision vector D[t'] and eqbar in
// the same cycle describes the paths entering each state at time t'+1.
module sova_ped
  import sova_pkg::*;
#(
  parameter code_e       CODE = CODE_EPR4,
  parameter int unsigned M    = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NS-1:0] dec_d,
  output logic [M-1:0]  eqbar [NS]
);

  logic [NS-1:0] col [M-1];      // col[k-1][i]: decision k steps back from state i
  logic [M-1:0]  diff [NS];      // diff[i][s-1]: paths into i differ at step s

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col <= '{default: '0};
    end else begin
      col[0] <= dec_d;
      for (int k = 1; k < M - 1; k++)
        for (int i = 0; i < NS; i++)
          col[k][i] <= col[k-1][pred(state_t'(i), dec_d[i])];
    end
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      diff[i][0] = 1'b1;
      for (int s = 1; s < M; s++)
        diff[i][s] = col[s-1][pred(state_t'(i), 1'b0)] ^ col[s-1][pred(state_t'(i), 1'b1)];
      for (int j = 0; j < M; j++)
        if (CODE == CODE_EPR4)
          eqbar[i][j] = diff[i][j] ^ ((j > 0) ? diff[i][(j > 0) ? j - 1 : 0] : 1'b0);
        else
          eqbar[i][j] = diff[i][j];
    end
  end

  initial assert (M >= 2) else $error("sova_ped: M must be at least 2");

endmodule
