// prbs_pkg: constants and types shared by the multi-length PRBS generator.
//
// The generator is built around a 3-stage shift register whose feedback tap
// is switched between stage 1 (tap t1) and stage 2 (tap t2), each XORed with
// the last stage t3. Both taps give a maximal-length sequence of 7 bits. The
// numbers below are the design's own: 3 stages, segments of 7 clocks, 8
// preset values (all 2^3 register contents), hence 2 * 8 * 7 = 112 bits.
package prbs_pkg;

  // Number of shift-register stages (D0..D2).
  localparam int unsigned NStages = 3;

  // Length of one maximal-length segment: 2^NStages - 1.
  localparam int unsigned SegLen = (1 << NStages) - 1;

  // Number of distinct preset values cycled by counter 2: 2^NStages.
  localparam int unsigned NPresets = 1 << NStages;

  // Full period of the main generator: taps * presets * segment length.
  localparam int unsigned FullLen = 2 * NPresets * SegLen;

  // Position of the tap switch. Low selects t2 (stage D1), high selects t1
  // (stage D0).
  typedef enum logic {
    TAP_T2 = 1'b0,
    TAP_T1 = 1'b1
  } tap_sel_e;

endpackage
