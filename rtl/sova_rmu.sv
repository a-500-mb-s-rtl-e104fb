// sova_rmu: M-step pipelined reliability measure unit.
//
// Each stage j holds a six-bit reliability r_j and the hard bit it belongs
// to. A bit enters stage 1 with reliability 111111 (most reliable). In every
// cycle the metric difference delta of the most likely state is broadcast to
// all stages; stage j replaces r_(j-1) by delta when delta < r_(j-1) and the
// equivalence input eqbar[j-1] says that the competing path disagrees on the
// bit of that stage (comparator AND eqbar driving a 2:1 multiplexer). After M
// stages r_M is the smallest metric difference of any competing path that
// would have flipped the bit, i.e. its log-likelihood magnitude.
//
// Output: soft_out = {hard bit, r_M}, seven-bit sign-magnitude, registered. A bit
// presented on hard_in in cycle c appears on soft_out in cycle c + M.
module sova_rmu
  import sova_pkg::*;
#(
  parameter int unsigned M = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  mag_t         delta,     // metric difference at the most likely state
  input  logic [M-1:0] eqbar,     // per-stage equivalence tests (1 = differ)
  input  logic         hard_in,   // decided bit entering stage 1
  output smag_t        soft_out
);

  mag_t r [M];
  logic h [M];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r <= '{default: MAG_MAX};
      h <= '{default: 1'b0};
    end else begin
      for (int j = 0; j < M; j++) begin
        mag_t prev;
        prev = (j == 0) ? MAG_MAX : r[(j == 0) ? 0 : j - 1];
        r[j] <= (eqbar[j] && (delta < prev)) ? delta : prev;
        h[j] <= (j == 0) ? hard_in : h[(j == 0) ? 0 : j - 1];
      end
    end
  end

  assign soft_out = {h[M-1], r[M-1]};

endmodule
