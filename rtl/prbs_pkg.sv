// prbs_pkg: constants shared by the PRBS scrambler modules.
//
// The scrambler runs an eight-stage linear feedback shift register a7..a0.
// Each clock that it advances, a7..a1 shift one place towards a0 and the new
// a7 is a7 ^ a5 ^ a3 ^ a1; a0 is the keystream bit that is XORed onto the
// data. LFSR_TAPS marks the stages that feed the XOR chain (bit i = stage ai).
// Register length, taps and the 8-bit data width follow the published design;
// the all-ones seed is this implementation's choice (any nonzero value works,
// scrambler and descrambler only need to agree on it).
package prbs_pkg;

  localparam int unsigned LFSR_W = 8;

  // Stages a7, a5, a3 and a1 feed the feedback XOR chain.
  localparam logic [LFSR_W-1:0] LFSR_TAPS = 8'b1010_1010;

  // Value loaded into a7..a0 by reset.
  localparam logic [LFSR_W-1:0] LFSR_SEED = 8'hFF;

  // Width of the data word scrambled per clock.
  localparam int unsigned PRBS_DATA_W = 8;

endpackage
