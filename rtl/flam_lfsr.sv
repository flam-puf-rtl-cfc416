// flam_lfsr -- reconfigurable Galois LFSR of the FLAM-PUF.
//
// N registers a_0..a_{N-1}. On `load` the original challenge C is copied in as
// the initial state S^0. On every `step` the state advances by one Galois
// transition whose taps are set by the coefficient vector g:
//     s_0 <= s_{N-1}                                  (g_0 = 1, fixed)
//     s_j <= s_{j-1} XOR (g_j AND s_{N-1})   j = 1..N-1, j != FB_POS
//     s_j <= s_{j-1} XOR tap(r_fb, s_{N-1})  j = FB_POS (flam_fb_module)
// g_N (the feedback from the last register) is always 1, so N-1 coefficients
// g_1..g_{N-1} are configurable; the one at FB_POS is ignored because that
// tap is controlled by the direct response r_fb instead (N-2 AND gates, N-1
// XOR gates and the two NANDs of the feedback module in total).
// The current state is the direct challenge C* given to the APUF.
//
// Timing: one transition per clock while `step` is high; `load` has priority.
// Reset clears the registers (an all-zero state is never run: the controller
// refuses an all-zero challenge).
// Follows the design: Galois form, AND-gated coefficients, NAND feedback
// module, challenge loaded as initial state. Own choices: synchronous load and
// enable, active-low asynchronous reset, FB_POS default 2 (the feedback point
// between a_1 and a_2 used in the design's worked example).
module flam_lfsr #(
  parameter int unsigned N      = flam_pkg::N_DEFAULT,
  parameter int unsigned FB_POS = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,      // load `load_val` as S^0
  input  logic [N-1:0]   load_val,  // original challenge C, bit j -> a_j
  input  logic           step,      // advance one transition
  input  logic [N-1:1]   g,         // feedback coefficients g_1..g_{N-1}
  input  logic           r_fb,      // direct response fed back this cycle
  output logic [N-1:0]   state      // S^i = direct challenge C*_i
);

  logic [N-1:0] nxt;
  logic         fb_tap;

  flam_fb_module u_fb (
    .r_fb   (r_fb),
    .s_last (state[N-1]),
    .tap    (fb_tap)
  );

  always_comb begin
    nxt[0] = state[N-1];
    for (int unsigned j = 1; j < N; j++) begin
      if (j == FB_POS) nxt[j] = state[j-1] ^ fb_tap;
      else             nxt[j] = state[j-1] ^ (g[j] & state[N-1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= '0;
    else if (load) state <= load_val;
    else if (step) state <= nxt;
  end

  initial begin
    assert (N >= 3) else $error("flam_lfsr: N must be at least 3");
    assert (FB_POS >= 1 && FB_POS <= N - 1) else $error("flam_lfsr: FB_POS out of range 1..N-1");
  end

endmodule
