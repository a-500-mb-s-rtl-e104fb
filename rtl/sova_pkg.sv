// sova_pkg: types, widths and trellis functions shared by the soft-output
// Viterbi decoder blocks.
//
// Trellis: eight states on a three-bit shift register of trellis bits b.
// The state at time t is s(t) = {b[t-3], b[t-2], b[t-1]} (MSB oldest); the
// branch that shifts in bit a leads from state p to ((p << 1) | a) & 7, so
// state j is reached from states {0, j[2:1]} and {1, j[2:1]} (the radix-2
// trellis with sm_0 and sm_4 feeding sm_0 and sm_1). The decision of the
// compare-select for state j is the MSB of the chosen predecessor, i.e. the
// oldest trellis bit, so a chain of three decisions spells out a state.
//
// Two codes share this trellis:
//   CODE_EPR4  - EPR4 channel 1 + D - D^2 - D^3 behind a 1/(1 xor D) precoder.
//                Trellis bits are the precoded channel bits a; the user bit
//                is u[t] = a[t] xor a[t-1].
//   CODE_OCT13 - feedforward Octal(13) code 1 xor D^2 xor D^3. Trellis bits
//                are the user bits u; the code bit is u[t]^u[t-2]^u[t-3].
// Soft values (inputs and outputs) are seven-bit sign-magnitude words: bit 6
// is the sign, which carries a bit decision (1 = bit 1), bits 5:0 the size.
// Internal widths (branch and path metrics) are choices of this design.
package sova_pkg;

  localparam int unsigned NS    = 8;   // trellis states
  localparam int unsigned SW    = 3;   // state index width
  localparam int unsigned MAG_W = 6;   // reliability / magnitude width
  localparam int unsigned SM_W  = MAG_W + 1; // sign-magnitude word width
  localparam int unsigned BM_W  = 8;   // branch metric width
  localparam int unsigned PM_W  = 12;  // path metric width (modulo arithmetic)

  // Scale of the EPR4 noiseless levels: ideal output k in {-4..4} maps to
  // k * EPR4_STEP on the seven-bit sample scale (so +-4 -> +-32).
  localparam int EPR4_STEP = 8;

  typedef enum logic {CODE_EPR4 = 1'b0, CODE_OCT13 = 1'b1} code_e;

  typedef logic [SM_W-1:0]  smag_t;  // sign-magnitude soft value
  typedef logic [MAG_W-1:0] mag_t;   // reliability / metric difference
  typedef logic [BM_W-1:0]  bm_t;    // branch metric
  typedef logic [PM_W-1:0]  pm_t;    // path metric (wraps modulo 2^PM_W)
  typedef logic [SW-1:0]    state_t;

  localparam mag_t MAG_MAX = '1;     // 111111, "most reliable"

  // Predecessor of state j whose oldest bit (the decision) is d.
  function automatic state_t pred(input state_t j, input logic d);
    return {d, j[SW-1:1]};
  endfunction

  // Noiseless EPR4 output for the branch from state p with new bit a,
  // bits mapped to +-1: a[n] + a[n-1] - a[n-2] - a[n-3].
  function automatic int epr4_level(input state_t p, input logic a);
    int v;
    v = (a ? 1 : -1) + (p[0] ? 1 : -1) - (p[1] ? 1 : -1) - (p[2] ? 1 : -1);
    return v;
  endfunction

  // Bit a branch carries that the soft input speaks about:
  // EPR4: the user bit before the precoder; OCT13: the Octal(13) code bit.
  function automatic logic branch_user_bit(input code_e code, input state_t p, input logic a);
    return (code == CODE_EPR4) ? (a ^ p[0]) : a;
  endfunction

  function automatic logic oct13_code_bit(input state_t p, input logic a);
    return a ^ p[1] ^ p[2];
  endfunction

endpackage
