// flam_puf -- FLAM-PUF: response-feedback strong PUF built from one arbiter
// PUF and one reconfigurable Galois LFSR.
//
// The original challenge C is never applied to the arbiter PUF directly. It is
// loaded into the LFSR, whose state is the APUF's direct challenge C*; the
// APUF's 1-bit direct response r* goes back into the LFSR every clock, where
// it controls the tap at the feedback point FB_POS (flam_fb_module), and into
// a buffer. After the first confusion (N-1 clocks with the fixed coefficient
// set G1) the buffer holds R* = (r*_1..r*_{N-1}), which becomes the LFSR's
// coefficient set G2 for the secondary confusion. From clock K on, the direct
// responses r*_K..r*_{K+M-1} form the final response R. Only C and R are ever
// visible outside; the intermediate challenges and responses are not.
//
// Interface: pulse `start` with `challenge` valid while `busy` is low. The
// LFSR is loaded in that cycle, and K+M clocks later `done` pulses with
// `response` valid (it holds until the next start). Bit b of `response` is
// r*_{K+b}. The same bits also appear serially on `r_out` when `r_valid` is
// high; `r_out` is held at 0 otherwise, so no first-confusion response is
// visible outside. An all-zero challenge is refused with an `err` pulse.
// Defaults: N = 128 stages, final response from cycle K = N, M = N bits, feedback
// point between a_1 and a_2, G1 with only g_1 set (the design's example
// configuration). The serial output, the err pulse and the parallel response
// register are this implementation's own interface choices.
module flam_puf
  import flam_pkg::*;
#(
  parameter int unsigned   N           = flam_pkg::N_DEFAULT,
  parameter int unsigned   K           = N,
  parameter int unsigned   M           = N,
  parameter int unsigned   FB_POS      = 2,
  parameter logic [N-1:1]  G1          = (N-1)'(1),   // g_1 = 1, others 0
  parameter int unsigned   SEED        = 1,
  parameter int unsigned   NOISE_SIGMA = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  challenge,   // original challenge C, bit j -> register a_j
  output logic          busy,
  output logic          done,
  output logic          err,
  output logic [M-1:0]  response,    // final response R, bit b = r*_{K+b}
  output logic          r_out,       // serial final-response bit
  output logic          r_valid
);

  logic          lfsr_load, lfsr_step;
  gsrc_e         gsrc;
  logic          buf_clear, buf_shift, resp_clear, resp_shift;
  logic [N-1:0]  c_star;      // direct challenge (LFSR state)
  logic          r_star;      // direct response
  logic [N-1:1]  g;           // coefficients applied this cycle
  logic [N-2:0]  rbuf_q, rbuf_next;

  flam_ctrl #(.N(N), .K(K), .M(M)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .chal_zero  (challenge == '0),
    .lfsr_load  (lfsr_load),
    .lfsr_step  (lfsr_step),
    .gsrc       (gsrc),
    .buf_clear  (buf_clear),
    .buf_shift  (buf_shift),
    .resp_clear (resp_clear),
    .resp_shift (resp_shift),
    .busy       (busy),
    .done       (done),
    .err        (err)
  );

  flam_lfsr #(.N(N), .FB_POS(FB_POS)) u_lfsr (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (lfsr_load),
    .load_val (challenge),
    .step     (lfsr_step),
    .g        (g),
    .r_fb     (r_star),
    .state    (c_star)
  );

  apuf #(.N(N), .SEED(SEED), .NOISE_SIGMA(NOISE_SIGMA)) u_apuf (
    .challenge (c_star),
    .response  (r_star)
  );

  // Response buffer: q[i] = r*_{i+1}, so G2 = (r*_1..r*_{N-1}) maps onto g_1..g_{N-1}.
  flam_shift_buffer #(.W(N-1)) u_rbuf (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (buf_clear),
    .shift  (buf_shift),
    .d      (r_star),
    .q      (rbuf_q),
    .q_next (rbuf_next)
  );

  // Final-response register: response[b] = r*_{K+b}.
  flam_shift_buffer #(.W(M)) u_resp (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (resp_clear),
    .shift  (resp_shift),
    .d      (r_star),
    .q      (response),
    .q_next ()
  );

  // Coefficient source for this cycle's LFSR step.
  always_comb begin
    unique case (gsrc)
      GSRC_G1:     g = G1;
      GSRC_BYPASS: g = rbuf_next;   // R* completed by this cycle's r*
      default:     g = rbuf_q;      // G2
    endcase
  end

  // Direct responses outside the final-response window never leave the PUF.
  assign r_out   = r_star & resp_shift;
  assign r_valid = resp_shift;

endmodule
