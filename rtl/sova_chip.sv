// sova_chip: the two decoders of the test chip, side by side.
//
// SOVA_EPR4 is matched to an EPR4 recording channel with a 1/(1 xor D)
// precoder (equivalent generator (1 + D - D^2 - D^3)/(1 xor D)); SOVA_13 to
// the Octal(13) convolutional code (1 xor D^2 xor D^3). Both run the same
// eight-state architecture (sova_decoder) at one bit per clock and produce
// seven-bit sign-magnitude soft decisions. In a serial turbo receiver they
// would be linked through an interleaver and deinterleaver; those are not
// part of this block, so each decoder has its own input and output ports and
// a shared clock and reset.
module sova_chip
  import sova_pkg::*;
#(
  parameter int unsigned L = 16,
  parameter int unsigned M = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  // SOVA_EPR4
  input  smag_t epr4_sample,
  input  smag_t epr4_apriori,
  output smag_t epr4_soft,
  output logic  epr4_valid,
  // SOVA_13
  input  smag_t oct13_sample,
  output smag_t oct13_soft,
  output logic  oct13_valid
);

  sova_decoder #(.CODE(CODE_EPR4), .L(L), .M(M)) u_sova_epr4 (
    .clk        (clk),
    .rst_n      (rst_n),
    .sample     (epr4_sample),
    .apriori    (epr4_apriori),
    .soft_out   (epr4_soft),
    .soft_valid (epr4_valid)
  );

  sova_decoder #(.CODE(CODE_OCT13), .L(L), .M(M)) u_sova_13 (
    .clk        (clk),
    .rst_n      (rst_n),
    .sample     (oct13_sample),
    .apriori    ('0),
    .soft_out   (oct13_soft),
    .soft_valid (oct13_valid)
  );

endmodule
