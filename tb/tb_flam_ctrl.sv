// tb_flam_ctrl -- cycle-by-cycle test of the FLAM-PUF controller.
// Configuration N = 5, K = 6, M = 3. After an accepted start the controller
// must step the LFSR for exactly K+M clocks, shift the response buffer at
// cycles 1..N-1, select G1 before cycle N-1, the look-ahead G2 at N-1 and G2
// after, shift the final-response register at cycles K..K+M-1, and pulse
// `done` K+M clocks after the start cycle. A start with an all-zero challenge
// must give an `err` pulse and no load; a start while busy must be ignored.
module tb_flam_ctrl;
  import flam_pkg::*;

  localparam int N = 5, K = 6, M = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  start, chal_zero;
  logic  lfsr_load, lfsr_step, buf_clear, buf_shift, resp_clear, resp_shift, busy, done, err;
  gsrc_e gsrc;

  flam_ctrl #(.N(N), .K(K), .M(M)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input logic got, input logic exp_v, input string what, input int cyc);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL cycle %0d %s = %0b expected %0b", cyc, what, got, exp_v);
    end
  endtask

  task automatic run_one(input bool_ignored_start);
    gsrc_e eg;
    // start cycle
    @(negedge clk); start = 1; chal_zero = 0;
    #1;
    expect1(lfsr_load, 1, "lfsr_load", -1);
    expect1(buf_clear, 1, "buf_clear", -1);
    expect1(resp_clear, 1, "resp_clear", -1);
    for (int i = 0; i < K + M; i++) begin
      @(negedge clk);
      start = bool_ignored_start && (i == 2);   // a start while busy is ignored
      #1;
      expect1(busy, 1, "busy", i);
      expect1(lfsr_step, 1, "lfsr_step", i);
      expect1(lfsr_load, 0, "lfsr_load", i);
      expect1(buf_shift, (i >= 1 && i <= N - 1), "buf_shift", i);
      expect1(resp_shift, (i >= K && i <= K + M - 1), "resp_shift", i);
      expect1(done, 0, "done", i);
      eg = (i < N - 1) ? GSRC_G1 : (i == N - 1) ? GSRC_BYPASS : GSRC_G2;
      checks++;
      if (gsrc !== eg) begin
        failures++;
        $display("FAIL cycle %0d gsrc %0d expected %0d", i, gsrc, eg);
      end
    end
    start = 0;
    @(negedge clk); #1;
    expect1(done, 1, "done", K + M);
    expect1(busy, 0, "busy", K + M);
    @(negedge clk); #1;
    expect1(done, 0, "done after pulse", K + M + 1);
  endtask

  initial begin
    start = 0; chal_zero = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run_one(0);
    run_one(1);
    // all-zero challenge refused
    @(negedge clk); start = 1; chal_zero = 1; #1;
    expect1(lfsr_load, 0, "lfsr_load on zero challenge", 0);
    @(negedge clk); start = 0; chal_zero = 0; #1;
    expect1(err, 1, "err", 0);
    expect1(busy, 0, "busy after refusal", 0);
    @(negedge clk); #1;
    expect1(err, 0, "err after pulse", 1);
    run_one(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
