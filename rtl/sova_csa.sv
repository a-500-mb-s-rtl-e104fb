// sova_csa: transformed compare-select-add unit for one trellis state.
//
// The classic add-compare-select is retimed so that the registers hold the
// partial sums sm_p(n) + bm_pj(n) of the two branches entering state j. One
// cycle then compares the two sums, selects the smaller and adds the branch
// metrics of the two branches leaving state j for the next symbol. The two
// additions are done on both candidates in parallel with the comparison and
// the result is picked by a multiplexer, so the critical path is one
// comparator plus one multiplexer (transformed CSA of the architecture).
//
// Path metrics wrap modulo 2^PM_W; the comparison looks at the sign of the
// wrapped difference, which is exact while all metrics lie within 2^(PM_W-1)
// of each other (true for bounded branch metrics). This normalisation is a
// choice of this design. Ties keep the predecessor with decision 0.
// RESET_SUM0/1 set the partial sums after reset, which is how the array
// marks the known start state.
//
// Interface: in0/in1 are the candidate sums through predecessor {0,j[2:1]}
// and {1,j[2:1]}; bm_next[a] the metrics of the two outgoing branches for the
// next symbol. Registered outputs, one cycle latency: out[a] = selected +
// bm_next[a], dec = 1 when in1 won, delta = |in0 - in1| saturated to 6 bits,
// metric = the selected sum itself (used only to find the best state).
module sova_csa
  import sova_pkg::*;
#(
  parameter pm_t RESET_SUM0 = '0,  // out[0] after reset
  parameter pm_t RESET_SUM1 = '0   // out[1] after reset
) (
  input  logic clk,
  input  logic rst_n,
  input  pm_t  in0,
  input  pm_t  in1,
  input  bm_t  bm_next [2],
  output pm_t  out [2],
  output logic dec,
  output mag_t delta,
  output pm_t  metric             // selected path metric sm_j(n+1)
);

  pm_t  diff;
  pm_t  absdiff;
  logic sel;
  pm_t  sum0 [2];
  pm_t  sum1 [2];

  always_comb begin
    diff    = in0 - in1;
    sel     = !diff[PM_W-1] && (diff != '0);   // in1 strictly smaller
    absdiff = diff[PM_W-1] ? (in1 - in0) : diff;
    for (int a = 0; a < 2; a++) begin
      sum0[a] = in0 + pm_t'(bm_next[a]);
      sum1[a] = in1 + pm_t'(bm_next[a]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out   <= '{RESET_SUM0, RESET_SUM1};
      dec    <= 1'b0;
      delta  <= '0;
      metric <= '0;
    end else begin
      for (int a = 0; a < 2; a++) out[a] <= sel ? sum1[a] : sum0[a];
      dec    <= sel;
      metric <= sel ? in1 : in0;
      delta <= (absdiff > pm_t'(MAG_MAX)) ? MAG_MAX : absdiff[MAG_W-1:0];
    end
  end

endmodule
