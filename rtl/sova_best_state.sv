// sova_best_state: finds the state with the smallest path metric.
//
// A three-level tree of modulo comparators (a is smaller than b when the
// wrapped difference a - b is negative) reduces the eight path metrics to
// the index of the smallest; ties go to the lower index. The result is
// registered, so best is the most likely state of the trellis step whose
// metrics were presented one cycle earlier. The survivor memory starts its
// traceback from this state. The architecture does not say from which state
// the traceback starts; this finder is this design's choice. Starting from
// a fixed state only works when all survivors merge within L steps, which the
// rate-one Octal(13) trellis does not guarantee.
module sova_best_state
  import sova_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  pm_t    metric [NS],
  output state_t best
);

  state_t idx1 [4], idx2 [2], win;
  pm_t    val1 [4], val2 [2];

  function automatic logic less(input pm_t a, input pm_t b);
    pm_t d;
    d = a - b;
    return d[PM_W-1];
  endfunction

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (less(metric[2*k+1], metric[2*k])) begin
        idx1[k] = state_t'(2*k+1); val1[k] = metric[2*k+1];
      end else begin
        idx1[k] = state_t'(2*k);   val1[k] = metric[2*k];
      end
    end
    for (int k = 0; k < 2; k++) begin
      if (less(val1[2*k+1], val1[2*k])) begin
        idx2[k] = idx1[2*k+1]; val2[k] = val1[2*k+1];
      end else begin
        idx2[k] = idx1[2*k];   val2[k] = val1[2*k];
      end
    end
    win = less(val2[1], val2[0]) ? idx2[1] : idx2[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) best <= '0;
    else        best <= win;
  end

endmodule
