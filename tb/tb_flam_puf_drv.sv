// tb_flam_puf_drv -- stimulus and checker for one flam_puf instance.
//
// Applies NCHAL random non-zero original challenges and predicts every step
// of each evaluation with the reference models: the LFSR state S^i (compared
// with the DUT's direct challenge every clock), the direct response r*_i
// (compared on the serial output while r_valid is high), the switch from G1
// to G2 = (r*_1..r*_{N-1}) after the first confusion, the final response
// R = (r*_K..r*_{K+M-1}) and the latency: `done` must rise exactly K+M clocks
// after the start cycle. It also offers an all-zero challenge (must be
// refused with `err`) and a start while busy (must be ignored).
// Counts how often each mechanism of the design was exercised.
module tb_flam_puf_drv
  import tb_flam_ref_pkg::*;
#(
  parameter int unsigned  N      = 128,
  parameter int unsigned  K      = N,
  parameter int unsigned  M      = N,
  parameter int unsigned  FB_POS = 2,
  parameter logic [N-1:1] G1     = (N-1)'(1),
  parameter int unsigned  SEED   = 1,
  parameter int unsigned  NCHAL  = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          start,
  output logic [N-1:0]  challenge,
  input  logic          busy,
  input  logic          done,
  input  logic          err,
  input  logic [M-1:0]  response,
  input  logic          r_out,
  input  logic          r_valid,
  input  logic [N-1:0]  c_star,     // DUT's LFSR state (direct challenge)
  output bit            finished,
  output int            checks,
  output int            failures,
  // mechanism counters
  output int            n_eval,      // evaluations completed
  output int            n_fb_inv,    // first confusion steps with r* = 0 (inverting tap)
  output int            n_fb_xor,    // first confusion steps with r* = 1 (XOR tap)
  output int            n_switch,    // G1 -> G2 switches
  output int            n_g2_diff,   // evaluations whose G2 differs from G1
  output int            n_second,    // secondary confusion steps
  output int            n_zero_ref,  // all-zero challenges refused
  output int            n_busy_ign   // starts ignored while busy
);

  localparam int unsigned L = K + M;

  vec_t s_ref [L+1];
  bit   r_ref [L];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [N=%0d K=%0d M=%0d] %s", N, K, M, msg);
    end
  endtask

  // Reference evaluation of original challenge c.
  task automatic predict(input logic [N-1:0] c);
    vec_t g1v, g2v, g;
    g1v = '0; g1v[N-1:1] = G1;
    g2v = '0;
    s_ref[0] = '0; s_ref[0][N-1:0] = c;
    for (int i = 0; i < int'(L); i++) begin
      r_ref[i] = apuf_ref(SEED, N, s_ref[i]);
      if (i >= 1 && i <= int'(N) - 1) g2v[i] = r_ref[i];   // G2 = (r*_1..r*_{N-1})
      g = (i < int'(N) - 1) ? g1v : g2v;
      if (i < int'(N) - 1) begin
        if (r_ref[i]) n_fb_xor++; else n_fb_inv++;
      end else begin
        n_second++;
      end
      s_ref[i+1] = lfsr_ref(N, s_ref[i], g, r_ref[i], FB_POS);
    end
    n_switch++;
    if (g2v[N-1:1] != g1v[N-1:1]) n_g2_diff++;
  endtask

  initial begin
    logic [N-1:0] c;
    logic [M-1:0] exp_r;
    finished = 0; checks = 0; failures = 0;
    n_eval = 0; n_fb_inv = 0; n_fb_xor = 0; n_switch = 0; n_g2_diff = 0;
    n_second = 0; n_zero_ref = 0; n_busy_ign = 0;
    start = 0; challenge = '0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    for (int unsigned t = 0; t < NCHAL; t++) begin
      for (int b = 0; b < int'(N); b++) c[b] = 1'($urandom);
      if (c == '0) c[0] = 1'b1;
      predict(c);
      for (int b = 0; b < int'(M); b++) exp_r[b] = r_ref[K+b];
      // start cycle
      @(negedge clk);
      chk(!busy, "busy before start");
      start = 1; challenge = c;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < int'(L); i++) begin
        chk(busy, $sformatf("busy at cycle %0d", i));
        chk(c_star == s_ref[i][N-1:0], $sformatf("direct challenge at cycle %0d: %h expected %h", i, c_star, s_ref[i][N-1:0]));
        chk(r_valid == (i >= int'(K)), $sformatf("r_valid at cycle %0d", i));
        if (i >= int'(K)) chk(r_out == r_ref[i], $sformatf("serial response at cycle %0d", i));
        else              chk(r_out == 1'b0, $sformatf("direct response hidden at cycle %0d", i));
        chk(!done, $sformatf("early done at cycle %0d", i));
        // on odd evaluations try to restart in the middle: must be ignored
        if ((t % 2) == 1 && i == 2) begin
          start = 1; challenge = ~c;
        end else begin
          start = 0;
        end
        @(negedge clk);
        if ((t % 2) == 1 && i == 2) n_busy_ign++;
      end
      start = 0;
      chk(done, "done exactly K+M clocks after start");
      chk(!busy, "idle after done");
      chk(response == exp_r, $sformatf("final response %h expected %h", response, exp_r));
      if (done && response == exp_r) n_eval++;
      // all-zero challenge after the first evaluation
      if (t == 0) begin
        start = 1; challenge = '0;
        @(negedge clk);
        start = 0;
        chk(err, "err for all-zero challenge");
        chk(!busy, "not busy after refused challenge");
        if (err && !busy) n_zero_ref++;
        @(negedge clk);
        chk(response == exp_r, "response held after refusal");
      end
    end
    finished = 1;
  end

endmodule
