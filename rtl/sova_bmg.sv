// sova_bmg: branch metric generator. For one received symbol it produces the
// metric of every one of the 16 trellis branches (8 source states x new bit).
//
// The decoder architecture only names this block; the metrics are this
// design's choice:
//   CODE_EPR4 : |y - STEP*level(p,a)| with level the noiseless EPR4 output of
//               the branch (0, +-2, +-4), plus |ap| when the sign of the
//               a-priori value ap disagrees with the branch's user bit.
//   CODE_OCT13: |x| when the sign of the soft code-bit value x disagrees with
//               the branch's Octal(13) code bit, else 0 (ap is unused).
// Smaller metric = more likely. Purely combinational; metric bm[p][a]
// belongs to the branch from state p with new trellis bit a.
module sova_bmg
  import sova_pkg::*;
#(
  parameter code_e CODE = CODE_EPR4
) (
  input  smag_t sample,                // channel sample (EPR4) or code-bit LLR (OCT13)
  input  smag_t apriori,               // a-priori user-bit value (EPR4 only)
  output bm_t   bm [NS][2]
);

  function automatic int smag_to_int(input smag_t v);
    return v[SM_W-1] ? -int'(v[MAG_W-1:0]) : int'(v[MAG_W-1:0]);
  endfunction

  always_comb begin
    for (int p = 0; p < NS; p++) begin
      for (int a = 0; a < 2; a++) begin
        int   m;
        logic ubit;
        if (CODE == CODE_EPR4) begin
          m = smag_to_int(sample) - EPR4_STEP * epr4_level(state_t'(p), a[0]);
          if (m < 0) m = -m;
          ubit = branch_user_bit(CODE, state_t'(p), a[0]);
          if (apriori[SM_W-1] != ubit) m = m + int'(apriori[MAG_W-1:0]);
        end else begin
          m = (sample[SM_W-1] != oct13_code_bit(state_t'(p), a[0]))
              ? int'(sample[MAG_W-1:0]) : 0;
        end
        bm[p][a] = bm_t'(m);
      end
    end
  end

endmodule
