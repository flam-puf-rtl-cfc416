// tb_flam_fb_module -- exhaustive test of the two-NAND feedback module.
// Expected: with r* = 1 the tap equals the last register (acts as g = 1);
// with r* = 0 the tap is 1, so the register at the feedback point receives
// the inverse of its predecessor. Checks the register input for all
// combinations of r*, s_{j-1} and s_{n-1}.
module tb_flam_fb_module;
  logic r_fb, s_last, tap;
  int checks = 0, failures = 0;

  flam_fb_module dut (.r_fb(r_fb), .s_last(s_last), .tap(tap));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic s_prev, exp_in;
      {r_fb, s_last, s_prev} = 3'(v);
      #1;
      exp_in = r_fb ? (s_prev ^ s_last) : !s_prev;
      checks++;
      if ((s_prev ^ tap) !== exp_in) begin
        failures++;
        $display("FAIL r=%0b s_last=%0b s_prev=%0b: reg input %0b expected %0b",
                 r_fb, s_last, s_prev, s_prev ^ tap, exp_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
