// apuf -- behavioural model of an N-stage arbiter PUF (not synthesizable as
// a PUF: a real arbiter PUF is a delay race shaped by process variation).
//
// The silicon part is a chain of N stages, each a pair of 2-to-1 MUXes that
// pass a launched edge straight through (challenge bit 0) or crossed
// (challenge bit 1) along a top and a bottom path; a flip-flop at the end
// acts as arbiter and records which path's edge arrived first. That delay race
// cannot be written as logic, so this model uses the additive linear delay
// model of the part:
//     Phi_l(C) = prod_{i=l..N} (1 - 2 c_i),  l = 1..N,   Phi_{N+1} = 1
//     Delta    = sum_{l=1..N+1} w^l Phi_l(C)
//     r        = 1 when Delta > 0, else 0
// Stage l of the chain is steered by challenge bit l-1 (c_l), i.e. by LFSR
// register a_{l-1}. The weights w^l of an instance are drawn from a Gaussian
// with mean 0.1 and standard deviation 1 (scaled by 1000 to integers) by a
// deterministic hash of SEED (flam_pkg::apuf_weight): different SEEDs model
// different chips. Optional additive Gaussian noise of standard deviation
// NOISE_SIGMA (same units) is drawn at each new challenge to model an
// unreliable arbiter; the default 0 gives a noise-free instance.
// The delay model and weight statistics follow the design's evaluation model;
// the integer scaling, the hash and the mapping Delta > 0 -> 1 are own choices.
// Interface: challenge in, response out; the response is valid within the
// same clock cycle the challenge is applied (the race settles well inside a
// clock period), which is how the surrounding loop uses it.
module apuf #(
  parameter int unsigned N           = flam_pkg::N_DEFAULT,
  parameter int unsigned SEED        = 1,
  parameter int unsigned NOISE_SIGMA = 0
) (
  input  logic [N-1:0] challenge,  // direct challenge C*, bit l-1 steers stage l
  output logic         response    // direct response r*
);

  int  w [N+1];     // w[l-1] = w^l, l = 1..N+1
  bit  w_ready = 1'b0;

  initial begin
    for (int unsigned l = 1; l <= N + 1; l++) w[l-1] = flam_pkg::apuf_weight(SEED, l);
    w_ready = 1'b1;
  end

  always @(challenge or w_ready) begin : race
    int phi;
    int delta;
    phi   = 1;
    delta = w[N];
    for (int l = int'(N); l >= 1; l--) begin
      phi   = challenge[l-1] ? -phi : phi;
      delta += w[l-1] * phi;
    end
    if (NOISE_SIGMA != 0) begin
      int g;
      g = 0;
      for (int t = 0; t < 12; t++) g += int'($urandom % 1000);
      delta += ((g - 6000) * int'(NOISE_SIGMA)) / 1000;
    end
    response = (delta > 0);
  end

endmodule
