// flam_pkg -- types, defaults and helper functions shared by the FLAM-PUF RTL.
//
// FLAM-PUF closes a loop between a reconfigurable Galois LFSR and an arbiter
// PUF (APUF): the LFSR turns the original challenge into a sequence of
// direct challenges, and every 1-bit direct response is fed back into one
// LFSR tap. This package holds what more than one module needs:
//   * the default stage count (128, the larger of the two sizes evaluated),
//   * the controller's state encoding and the coefficient-source selector,
//   * the deterministic hash used by the behavioural APUF model to draw the
//     per-instance stage weights. Process variation is not something RTL can
//     express, so an APUF instance is identified by a SEED and its weights are
//     derived from it; testbenches use the same functions to build an
//     independent reference.
package flam_pkg;

  // Default number of APUF stages / LFSR registers.
  parameter int unsigned N_DEFAULT = 128;

  // Controller states.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,   // waiting for a challenge
    ST_RUN  = 2'd1    // LFSR/APUF loop running, one direct CRP per clock
  } flam_state_e;

  // Which coefficient set drives the LFSR taps in the current cycle.
  typedef enum logic [1:0] {
    GSRC_G1     = 2'd0, // first confusion: the fixed initial set G1
    GSRC_BYPASS = 2'd1, // last first-confusion cycle: buffered R* plus the live r*
    GSRC_G2     = 2'd2  // secondary confusion: G2 = R* held in the buffer
  } gsrc_e;

  // 32-bit integer mixing function (finaliser of a well-known hash); used
  // only to derive reproducible pseudo-random model parameters.
  function automatic int unsigned mix32(input int unsigned x);
    int unsigned v;
    v = x;
    v = v ^ (v >> 16);
    v = v * 32'h7feb352d;
    v = v ^ (v >> 15);
    v = v * 32'h846ca68b;
    v = v ^ (v >> 16);
    return v;
  endfunction

  // Approximately Gaussian integer: sum of 12 uniform draws in [0,1000)
  // minus 6000 has mean 0 and standard deviation ~1000 (Irwin-Hall).
  function automatic int gauss1000(input int unsigned seed, input int unsigned idx);
    int acc;
    acc = 0;
    for (int t = 0; t < 12; t++) begin
      acc += int'(mix32(seed * 32'h9e3779b9 + idx * 12 + t + 1) % 1000);
    end
    return acc - 6000;
  endfunction

  // Weight w^l (l = 1..n+1) of the additive delay model of APUF instance
  // `seed`, in units of 1/1000 of a stage delay: mean 0.1, std. dev. 1.
  function automatic int apuf_weight(input int unsigned seed, input int unsigned l);
    return gauss1000(seed, l) + 100;
  endfunction

endpackage
