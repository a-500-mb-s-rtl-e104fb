// sova_decoder: eight-state soft-output Viterbi decoder, one bit per clock.
//
// Structure (two-stage traceback):
//   sova_bmg        branch metrics of the received symbol
//   sova_csa_array  eight transformed CSA units: decisions and metric
//                   differences (delta) for every state, every cycle
//   sova_best_state state with the smallest path metric at time t
//   sova_smu        L-step register exchange traced from that state ->
//                   most likely (ML) state m at time t-L
//   sova_fifo x2    decisions and deltas delayed by L+1 so they line up with m
//   sova_ped        M-step register exchange with XORs -> which traceback
//                   steps separate the two paths entering each state
//   select          m picks delta_m and the equivalence vector of state m
//   sova_rmu        M-stage pipelined minimum -> six-bit reliability
// Output soft_out is seven-bit sign-magnitude: sign = decoded bit, magnitude =
// log-likelihood that the decision is right (111111 = no competitor within
// the window). CODE selects the trellis labelling: CODE_EPR4 decodes the user
// bits in front of a 1/(1 xor D) precoder and EPR4 channel from channel
// samples plus optional a-priori values; CODE_OCT13 decodes Octal(13) code
// bits given as soft values.
//
// Timing: one symbol is taken on every clock after reset is released (no
// stall); the branch metrics of the input symbol go straight into the CSA
// array, which registers them. The decision for user bit T leaves
// LATENCY = L+M+5 (EPR4) or L+M+6 (OCT13) cycles after its symbol entered;
// soft_valid rises when the first bit leaves. The architecture's latency is
// L+M; the few extra cycles come from the CSA output register, the
// three-bit state span and the RMU output register, and are this design's
// choice.
module sova_decoder
  import sova_pkg::*;
#(
  parameter code_e       CODE = CODE_EPR4,
  parameter int unsigned L    = 16,
  parameter int unsigned M    = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  smag_t sample,      // channel sample (EPR4) or code-bit soft value (OCT13)
  input  smag_t apriori,     // a-priori soft value of the user bit (EPR4), else unused
  output smag_t soft_out,    // decoded bit and reliability
  output logic  soft_valid
);

  localparam int unsigned LATENCY = L + M + ((CODE == CODE_EPR4) ? 5 : 6);

  bm_t           bm [NS][2];
  logic [NS-1:0] dec, dec_d;
  mag_t          delta [NS];
  logic [NS*MAG_W-1:0] delta_flat, delta_d_flat;
  pm_t           metric [NS];
  state_t        best;
  state_t        ml_state;
  logic [M-1:0]  eqbar [NS];
  mag_t          delta_sel;
  logic [M-1:0]  eq_sel;
  logic          m2_q, hard_in;
  logic [$clog2(LATENCY+1)-1:0] fill;

  sova_bmg #(.CODE(CODE)) u_bmg (
    .sample  (sample),
    .apriori (apriori),
    .bm      (bm)
  );

  sova_csa_array u_csa (
    .clk   (clk),
    .rst_n (rst_n),
    .bm    (bm),
    .dec   (dec),
    .delta (delta),
    .metric(metric)
  );

  sova_best_state u_best (
    .clk    (clk),
    .rst_n  (rst_n),
    .metric (metric),
    .best   (best)
  );

  sova_smu #(.L(L)) u_smu (
    .clk         (clk),
    .rst_n       (rst_n),
    .dec         (dec),
    .start_state (best),
    .ml_state    (ml_state)
  );

  always_comb
    for (int i = 0; i < NS; i++) delta_flat[i*MAG_W +: MAG_W] = delta[i];

  sova_fifo #(.WIDTH(NS), .DEPTH(L + 1)) u_dec_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (dec),
    .dout  (dec_d)
  );

  sova_fifo #(.WIDTH(NS * MAG_W), .DEPTH(L + 1)) u_delta_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .din   (delta_flat),
    .dout  (delta_d_flat)
  );

  sova_ped #(.CODE(CODE), .M(M)) u_ped (
    .clk   (clk),
    .rst_n (rst_n),
    .dec_d (dec_d),
    .eqbar (eqbar)
  );

  // ML-state multiplexers in front of the RMU.
  assign delta_sel = delta_d_flat[ml_state*MAG_W +: MAG_W];
  assign eq_sel    = eqbar[ml_state];

  // Bit entering the RMU: the oldest bit of the previous ML state (OCT13),
  // or its XOR with the oldest bit of the current one (EPR4 user bit).
  always_ff @(posedge clk) begin
    if (!rst_n) m2_q <= 1'b0;
    else        m2_q <= ml_state[SW-1];
  end
  assign hard_in = (CODE == CODE_EPR4) ? (m2_q ^ ml_state[SW-1]) : m2_q;

  sova_rmu #(.M(M)) u_rmu (
    .clk     (clk),
    .rst_n   (rst_n),
    .delta   (delta_sel),
    .eqbar   (eq_sel),
    .hard_in (hard_in),
    .soft_out   (soft_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)                    fill <= '0;
    else if (fill != LATENCY[$bits(fill)-1:0]) fill <= fill + 1'b1;
  end
  assign soft_valid = (fill == LATENCY[$bits(fill)-1:0]);

  // The output stream never pauses: once valid, valid until the next reset.
  a_valid_stays: assert property (@(posedge clk) disable iff (!rst_n)
                                  soft_valid |=> soft_valid)
    else $error("sova_decoder: soft_valid dropped without reset");

endmodule
