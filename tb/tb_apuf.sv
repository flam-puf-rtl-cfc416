// tb_apuf -- test of the behavioural arbiter-PUF model.
// Two instances (128 stages, seed 1; 16 stages, seed 7) receive random
// challenges; each response must equal the sign of the additive delay model
// evaluated term by term by the reference. Checks also that the two seeds
// behave as different chips (their responses to the shared low 16 challenge
// bits are not all equal) and that the 128-stage responses are neither
// constant nor wildly biased (ones between 25% and 75% over 400 challenges).
module tb_apuf;
  import tb_flam_ref_pkg::*;

  logic [127:0] c;
  logic         r128, r16, r16b;
  int checks = 0, failures = 0;

  apuf                                  dut128 (.challenge(c),        .response(r128));
  apuf #(.N(16), .SEED(7))              dut16  (.challenge(c[15:0]),  .response(r16));
  apuf #(.N(16), .SEED(8))              dut16b (.challenge(c[15:0]),  .response(r16b));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, diff;
    vec_t v;
    ones = 0; diff = 0;
    #1;
    for (int t = 0; t < 400; t++) begin
      c = {$urandom, $urandom, $urandom, $urandom};
      #1;
      v = '0; v[127:0] = c;
      checks++;
      if (r128 !== apuf_ref(1, 128, v)) begin
        failures++;
        $display("FAIL t=%0d N=128 response %0b", t, r128);
      end
      checks++;
      if (r16 !== apuf_ref(7, 16, v)) begin
        failures++;
        $display("FAIL t=%0d N=16 response %0b", t, r16);
      end
      ones += r128;
      diff += (r16 != r16b);
    end
    checks++;
    if (ones < 100 || ones > 300) begin
      failures++;
      $display("FAIL 128-stage ones = %0d of 400", ones);
    end
    checks++;
    if (diff == 0) begin
      failures++;
      $display("FAIL seeds 7 and 8 gave identical responses");
    end
    $display("apuf: 128-stage ones %0d/400, seed 7 vs 8 differ on %0d/400", ones, diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
