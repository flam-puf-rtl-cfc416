// tb_flam_metrics_grp -- PUF quality figures for one stage count.
//
// NI noise-free FLAM-PUF instances (SEED 1..NI, i.e. NI different chips) and
// one noisy copy of chip 1 (arbiter noise NOISE_SIGMA) receive the same NCH
// random challenges, each evaluated to the full N-bit final response.
// Computed:
//   uniformity  P1  = fraction of ones in each chip's responses
//   uniqueness  HD  = mean normalised Hamming distance between chip pairs
//   reliability REL = 1 - normalised Hamming distance noisy vs. clean chip 1
// Checks: every chip's P1 lies within 35%..65% (a chip's own bias shows here)
// and the mean HD within 40%..60% (ideal 50% for both).
// Reliability is reported, and checked only to be above 50%: a single
// flipped direct response changes all later LFSR states, so this figure
// depends strongly on the noise model.
module tb_flam_metrics_grp #(
  parameter int unsigned N           = 64,
  parameter int unsigned NI          = 4,
  parameter int unsigned NCH         = 200,
  parameter int unsigned NOISE_SIGMA = 100
) (
  input  logic clk,
  input  logic rst_n,
  output bit   finished,
  output int   checks,
  output int   failures
);
  logic         start;
  logic [N-1:0] challenge;
  logic         busy [NI+1];
  logic         done [NI+1];
  logic         err  [NI+1];
  logic [N-1:0] resp [NI+1];
  logic         ro   [NI+1];
  logic         rv   [NI+1];

  for (genvar i = 0; i < NI; i++) begin : g_chip
    flam_puf #(.N(N), .SEED(i + 1)) u (
      .clk, .rst_n, .start, .challenge, .busy(busy[i]), .done(done[i]), .err(err[i]),
      .response(resp[i]), .r_out(ro[i]), .r_valid(rv[i]));
  end
  flam_puf #(.N(N), .SEED(1), .NOISE_SIGMA(NOISE_SIGMA)) u_noisy (
    .clk, .rst_n, .start, .challenge, .busy(busy[NI]), .done(done[NI]), .err(err[NI]),
    .response(resp[NI]), .r_out(ro[NI]), .r_valid(rv[NI]));

  initial begin
    longint ones [NI];
    longint hd, hd_pairs, rel_err;
    real p1, hdn, rel;
    finished = 0; checks = 0; failures = 0;
    start = 0; challenge = '0;
    hd = 0; hd_pairs = 0; rel_err = 0;
    for (int i = 0; i < int'(NI); i++) ones[i] = 0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int t = 0; t < int'(NCH); t++) begin
      for (int b = 0; b < int'(N); b++) challenge[b] = 1'($urandom);
      if (challenge == '0) challenge[0] = 1'b1;
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done[0]) @(negedge clk);
      for (int i = 0; i < int'(NI); i++) begin
        ones[i] += $countones(resp[i]);
        for (int j = i + 1; j < int'(NI); j++) begin
          hd += $countones(resp[i] ^ resp[j]);
          hd_pairs++;
        end
      end
      rel_err += $countones(resp[0] ^ resp[NI]);
      @(negedge clk);
    end
    for (int i = 0; i < int'(NI); i++) begin
      p1 = 100.0 * real'(ones[i]) / real'(NCH * N);
      $display("N=%0d chip %0d uniformity P1 = %0.2f%%", N, i + 1, p1);
      checks++;
      if (p1 < 35.0 || p1 > 65.0) begin
        failures++;
        $display("FAIL N=%0d chip %0d uniformity out of range", N, i + 1);
      end
    end
    hdn = 100.0 * real'(hd) / real'(hd_pairs * N);  // hd_pairs counts pairs x challenges
    rel = 100.0 - 100.0 * real'(rel_err) / real'(NCH * N);
    $display("N=%0d uniqueness HD = %0.2f%%, reliability (noise %0d) = %0.2f%%", N, hdn, NOISE_SIGMA, rel);
    checks++;
    if (hdn < 40.0 || hdn > 60.0) begin
      failures++;
      $display("FAIL N=%0d uniqueness out of range", N);
    end
    checks++;
    if (rel <= 50.0) begin
      failures++;
      $display("FAIL N=%0d reliability not above 50%%", N);
    end
    finished = 1;
  end
endmodule
